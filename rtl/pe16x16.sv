// pe16x16: processing element for a 16x16 unit, built from 16 pe4x4.
//
// Takes a 16x16 block of current pixels and a 16x16 block of reference pixels (index
// row*16+col) and returns the 16 SADs of its 4x4 sub-blocks (index by*4+bx), as the document's
// PE_16x16 does; the sums for the different PU shapes are formed afterwards (sad_merge).
// Combinational.
module pe16x16
  import ime_pkg::*;
(
  input  pix_t  cur [256],
  input  pix_t  ref_px [256],
  output sad4_t sad4 [16]
);
  for (genvar b = 0; b < 16; b++) begin : g_pe
    pix_t c_blk [16];
    pix_t r_blk [16];
    always_comb begin
      for (int i = 0; i < 16; i++) begin
        c_blk[i] = cur[((b / 4) * 4 + i / 4) * 16 + (b % 4) * 4 + i % 4];
        r_blk[i] = ref_px[((b / 4) * 4 + i / 4) * 16 + (b % 4) * 4 + i % 4];
      end
    end
    pe4x4 u_pe (.cur(c_blk), .ref_px(r_blk), .sad(sad4[b]));
  end
endmodule
