// tb_img_pkg: synthetic test pictures shared by the testbenches.
//
// ref_pix gives the reference picture: a smooth pattern (so motion searches have a clear
// descent) with a little texture. cur_pix gives the current picture: the reference moved by a
// true motion (MOT_X, MOT_Y) plus small noise. Both are defined for any integer coordinate,
// which stands in for picture padding.
package tb_img_pkg;
  localparam int MOT_X = 7;
  localparam int MOT_Y = -5;

  function automatic int hash2(int x, int y);
    logic [31:0] h;
    h = 32'(x) * 32'd374761393 + 32'(y) * 32'd668265263;
    h = (h ^ (h >> 13)) * 32'd1274126177;
    h = h ^ (h >> 16);
    return int'({1'b0, h[30:0]});
  endfunction

  function automatic int ref_pix(int x, int y);
    int v;
    v = ((x * 5 + y * 3) & 255);
    v = (v < 128) ? v * 2 : (255 - v) * 2;          // triangle wave along a diagonal
    v = (v + (((x & 1023) * (y & 1023)) / 64) + (hash2(x, y) & 7)) & 255;
    return v;
  endfunction

  function automatic int cur_pix(int x, int y);
    int v;
    v = ref_pix(x + MOT_X, y + MOT_Y) + (hash2(y, x) & 3) - 1;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction
endpackage
