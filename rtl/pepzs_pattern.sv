// pepzs_pattern: search point generator of the predictive diamond EPZS (PEPZS).
//
// All steps are centred on the start point chosen by AMVP. Step s (1-based) lies at distance
// 2^(s-1). Step 1 checks all 8 directions; every later step checks only the direction chosen in
// the previous step and its two 45-degree neighbours (point 0: dir-1, 1: dir, 2: dir+1).
// Directions are numbered counter-clockwise from +x: 0 E, 1 NE, 2 N, 3 NW, 4 W, 5 SW, 6 S, 7 SE
// (y grows downwards). Following the diamond variant, from step DIAMOND_FROM+1 on the four
// diagonal points use half the distance. Combinational.
module pepzs_pattern
  import ime_pkg::*;
#(
  parameter int DIAMOND_FROM = 4
) (
  input  mv_t        center,
  input  logic [2:0] step,      // 1..7
  input  logic [2:0] pred_dir,  // direction chosen in the previous step
  input  logic [2:0] pt,        // point number: 0..7 in step 1, 0..2 afterwards
  output mv_t        pt_mv,
  output logic [2:0] pt_dir
);
  logic signed [MV_W-1:0] dstep, ddiag;
  logic signed [1:0] ux, uy;

  always_comb begin
    pt_dir = (step == 3'd1) ? pt : 3'(pred_dir + pt - 3'd1);
    dstep   = MV_W'(1) <<< (step - 3'd1);
    ddiag  = (int'(step) > DIAMOND_FROM) ? (dstep >>> 1) : dstep;
    case (pt_dir)
      3'd0: begin ux =  1; uy =  0; end
      3'd1: begin ux =  1; uy = -1; end
      3'd2: begin ux =  0; uy = -1; end
      3'd3: begin ux = -1; uy = -1; end
      3'd4: begin ux = -1; uy =  0; end
      3'd5: begin ux = -1; uy =  1; end
      3'd6: begin ux =  0; uy =  1; end
      default: begin ux = 1; uy = 1; end
    endcase
    if (pt_dir[0]) begin
      pt_mv.x = center.x + MV_W'(ux) * ddiag;
      pt_mv.y = center.y + MV_W'(uy) * ddiag;
    end else begin
      pt_mv.x = center.x + MV_W'(ux) * dstep;
      pt_mv.y = center.y + MV_W'(uy) * dstep;
    end
  end
endmodule
