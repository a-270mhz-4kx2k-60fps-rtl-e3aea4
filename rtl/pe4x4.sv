// pe4x4: processing element for one 4x4 block.
//
// Computes the sum of absolute differences (SAD) between 16 current pixels and 16 reference
// pixels in one combinational stage: 16 absolute differences followed by an adder tree. It is
// the unit the document builds its 16x16 processing element from. Pixel i is row i/4, column
// i%4. Purely combinational; the caller registers the result.
module pe4x4
  import ime_pkg::*;
(
  input  pix_t  cur [16],
  input  pix_t  ref_px [16],
  output sad4_t sad
);
  always_comb begin
    sad = '0;
    for (int i = 0; i < 16; i++) begin
      sad = sad + sad4_t'(pix_t'((cur[i] > ref_px[i]) ? (cur[i] - ref_px[i]) : (ref_px[i] - cur[i])));
    end
  end
endmodule
