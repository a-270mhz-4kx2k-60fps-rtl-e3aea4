// pepzs_decision: comparison unit and SAD result register of the PEPZS module.
//
// Keeps the best motion vector and SAD of the PU being searched and decides the search flow:
//   init_i     : load the first AMVP candidate (mv_i, sad_i) as best.
//   cand_i     : compare a further AMVP candidate; the lower SAD wins, ties keep the earlier one.
//                The winning candidate's SAD is kept as the centre result of the first PEPZS step.
//   point_i    : compare one search point (mv_i, sad_i, dir_i) against the best and against the
//                other points of the current step.
//   step_end_i : close a step. The direction of the lowest-SAD point of the step becomes the
//                predicted direction for the next step. A step whose points did not beat the
//                best counts as a step without improvement; early_term is raised after
//                ET_STEPS such steps in a row (the document: early termination when the SAD
//                result stays the same for 3 steps in a row).
// Everything updates on the rising clock edge; outputs are registers.
module pepzs_decision
  import ime_pkg::*;
#(
  parameter int ET_STEPS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init_i,
  input  logic       cand_i,
  input  logic       point_i,
  input  logic       step_end_i,
  input  mv_t        mv_i,
  input  sad_t       sad_i,
  input  logic [2:0] dir_i,
  output mv_t        best_mv,
  output sad_t       best_sad,
  output logic [2:0] pred_dir,
  output logic       early_term
);
  sad_t       step_min;
  logic [2:0] step_dir;
  logic       improved;
  logic [2:0] nimp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mv  <= '0;
      best_sad <= '1;
      step_min <= '1;
      step_dir <= '0;
      pred_dir <= '0;
      improved <= 1'b0;
      nimp     <= '0;
    end else if (init_i) begin
      best_mv  <= mv_i;
      best_sad <= sad_i;
      step_min <= '1;
      step_dir <= '0;
      pred_dir <= '0;
      improved <= 1'b0;
      nimp     <= '0;
    end else if (cand_i) begin
      if (sad_i < best_sad) begin
        best_mv  <= mv_i;
        best_sad <= sad_i;
      end
    end else if (point_i) begin
      if (sad_i < best_sad) begin
        best_mv  <= mv_i;
        best_sad <= sad_i;
        improved <= 1'b1;
      end
      if (sad_i < step_min) begin
        step_min <= sad_i;
        step_dir <= dir_i;
      end
    end else if (step_end_i) begin
      pred_dir <= step_dir;
      nimp     <= improved ? 3'd0 : nimp + 3'd1;
      improved <= 1'b0;
      step_min <= '1;
    end
  end

  assign early_term = (int'(nimp) >= ET_STEPS);

  // Only one operation per cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({init_i, cand_i, point_i, step_end_i}));
endmodule
