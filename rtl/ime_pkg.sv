// ime_pkg: types and constants shared by the integer motion estimation (IME) engine.
//
// The engine searches one 64x64 coding unit (CU64) at a time. Pixels are 8-bit luma samples.
// Motion vectors are integer-pel, signed 9 bits per component. Reference pixels are addressed
// inside the search buffers by 9-bit coordinates relative to a window origin that sits REL_OFS
// pixels above and to the left of the CU64 (the document uses 9-bit x and y cache addresses tied
// to the CU64 position; the offset of 128 is this design's choice). MVP candidates are clamped to
// +/-MVP_CLAMP so that every search point stays inside the 512x512 window.
package ime_pkg;

  localparam int PIX_W     = 8;
  localparam int MV_W      = 9;
  localparam int SAD_W     = 20;   // SAD of a 64x64 block: 4096*255 < 2^20
  localparam int SAD4_W    = 12;   // SAD of a 4x4 block: 16*255 < 2^12
  localparam int REL_W     = 9;    // search-buffer coordinate width (document: 9 bits)
  localparam int REL_OFS   = 128;  // window origin = CU64 origin - REL_OFS
  localparam int MVP_CLAMP = 96;   // candidates limited to +/-96 so search stays in window
  localparam int FRM_W     = 14;   // signed frame coordinate width (3840 < 2^13)

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [SAD_W-1:0]  sad_t;
  typedef logic [SAD4_W-1:0] sad4_t;
  typedef logic [63:0]       word_t;   // one cache word: 8 pixels, pixel 0 in bits [7:0]

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // PU shapes handled by the engine (non-square PUs above 16x16 are not searched).
  typedef enum logic [2:0] {
    PU_16X16 = 3'd0,
    PU_16X8  = 3'd1,
    PU_8X16  = 3'd2,
    PU_8X8   = 3'd3,
    PU_8X4   = 3'd4,
    PU_4X8   = 3'd5,
    PU_32X32 = 3'd6,
    PU_64X64 = 3'd7
  } pu_shape_e;

  // Identifies one PU of the CU64.
  //   16x16/16x8/8x16: blk = CU16 index (Z order, 0..15)
  //   8x8/8x4/4x8    : blk = CU8 index (Z order, 0..63)
  //   32x32          : blk = CU32 index (0..3); 64x64: blk = 0
  //   part           : which half of a two-PU partition
  typedef struct packed {
    pu_shape_e  shape;
    logic [5:0] blk;
    logic       part;
  } pu_id_t;

  // One SAD job for the PEPZS module: a PU inside the current CU16 at one motion vector.
  typedef struct packed {
    mv_t        mv;
    pu_shape_e  shape;   // 32x32 and 64x64 are evaluated 16x16 at a time as PU_16X16
    logic [1:0] sub8;    // CU8 inside the CU16 for 8x8/8x4/4x8
    logic       part;
    logic       buf_sel; // 0: AMVP search buffer, 1: PEPZS search buffer
    logic [2:0] tag;     // returned with the result (search point number)
  } sad_job_t;

  // Position (x, y, width, height) of a PU of size <= 16x16 inside its CU16.
  function automatic logic [19:0] pu_geom(pu_shape_e shape, logic [1:0] sub8, logic part);
    logic [4:0] px, py, w, h;
    logic [4:0] ox, oy;
    ox = sub8[0] ? 5'd8 : 5'd0;
    oy = sub8[1] ? 5'd8 : 5'd0;
    case (shape)
      PU_16X8: begin px = 0;  py = part ? 5'd8 : 5'd0; w = 16; h = 8; end
      PU_8X16: begin px = part ? 5'd8 : 5'd0; py = 0;  w = 8;  h = 16; end
      PU_8X8:  begin px = ox; py = oy; w = 8; h = 8; end
      PU_8X4:  begin px = ox; py = oy + (part ? 5'd4 : 5'd0); w = 8; h = 4; end
      PU_4X8:  begin px = ox + (part ? 5'd4 : 5'd0); py = oy; w = 4; h = 8; end
      default: begin px = 0;  py = 0;  w = 16; h = 16; end
    endcase
    return {px, py, w, h};
  endfunction

  function automatic mv_t clamp_mv(mv_t m);
    logic signed [MV_W-1:0] lim;
    mv_t r;
    lim = MV_W'(MVP_CLAMP);
    r   = m;
    if (m.x >  lim) r.x =  lim;
    if (m.x < -lim) r.x = -lim;
    if (m.y >  lim) r.y =  lim;
    if (m.y < -lim) r.y = -lim;
    return r;
  endfunction

endpackage
