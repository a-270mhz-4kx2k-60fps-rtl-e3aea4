// sad_merge: sums the 4x4 SADs of a PE_16x16 into the SAD of one PU.
//
// The document's PE_16x16 delivers 16 4x4 SADs and the system adds them "according to the PU
// size". Here the PU (shape, CU8 number sub8, half part) selects a mask of the 4x4 blocks it
// covers and the masked SADs are added. Shapes 32x32 and 64x64 are handled 16x16 at a time and
// use the 16x16 mask. Combinational.
module sad_merge
  import ime_pkg::*;
(
  input  sad4_t      sad4 [16],
  input  pu_shape_e  shape,
  input  logic [1:0] sub8,
  input  logic       part,
  output sad_t       sad
);
  logic [19:0] g;
  logic [4:0]  px, py, w, h;
  logic [15:0] mask;

  always_comb begin
    g  = pu_geom(shape, sub8, part);
    px = g[19:15];
    py = g[14:10];
    w  = g[9:5];
    h  = g[4:0];
    for (int b = 0; b < 16; b++) begin
      mask[b] = (5'(4 * (b % 4)) >= px) && (5'(4 * (b % 4)) < px + w) &&
                (5'(4 * (b / 4)) >= py) && (5'(4 * (b / 4)) < py + h);
    end
    sad = '0;
    for (int b = 0; b < 16; b++) begin
      if (mask[b]) sad = sad + sad_t'(sad4[b]);
    end
  end
endmodule
