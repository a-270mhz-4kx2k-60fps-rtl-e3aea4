// tb_pepzs_decision: random AMVP and PEPZS sequences against a reference model kept in the
// testbench: best vector/SAD, predicted direction (lowest point of the last step) and early
// termination after 3 steps without improvement.
module tb_pepzs_decision;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init_i = 0, cand_i = 0, point_i = 0, step_end_i = 0;
  mv_t mv_i;
  sad_t sad_i;
  logic [2:0] dir_i;
  mv_t best_mv;
  sad_t best_sad;
  logic [2:0] pred_dir;
  logic early_term;
  int checks = 0, failures = 0;
  int n_et = 0, n_cand_win = 0;

  always #5 clk = !clk;

  pepzs_decision dut (.*);

  int m_sad, m_mvx, m_mvy, m_dir, m_nimp, m_stepmin, m_stepdir, m_impr;

  task automatic op(input int kind, input int sad, input int x, input int y, input int d);
    @(negedge clk);
    init_i = (kind == 0); cand_i = (kind == 1); point_i = (kind == 2); step_end_i = (kind == 3);
    sad_i = sad_t'(sad); mv_i.x = 9'(x); mv_i.y = 9'(y); dir_i = 3'(d);
    @(posedge clk);
    #1;
    init_i = 0; cand_i = 0; point_i = 0; step_end_i = 0;
  endtask

  task automatic check();
    checks++;
    if (int'(best_sad) != m_sad || int'(best_mv.x) != m_mvx || int'(best_mv.y) != m_mvy ||
        int'(pred_dir) != m_dir || early_term != (m_nimp >= 3)) begin
      failures++;
      $display("mismatch: sad %0d/%0d mv %0d,%0d/%0d,%0d dir %0d/%0d et %0d/%0d", best_sad, m_sad,
               best_mv.x, best_mv.y, m_mvx, m_mvy, pred_dir, m_dir, early_term, m_nimp >= 3);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pu = 0; pu < 200; pu++) begin
      int s, x, y;
      // AMVP: two candidates
      s = $urandom_range(100, 5000); x = $urandom_range(0, 40) - 20; y = $urandom_range(0, 40) - 20;
      op(0, s, x, y, 0);
      m_sad = s; m_mvx = x; m_mvy = y; m_dir = 0; m_nimp = 0; m_stepmin = 1 << 20; m_impr = 0; m_stepdir = 0;
      check();
      s = $urandom_range(100, 5000); x = $urandom_range(0, 40) - 20; y = $urandom_range(0, 40) - 20;
      op(1, s, x, y, 0);
      if (s < m_sad) begin m_sad = s; m_mvx = x; m_mvy = y; n_cand_win++; end
      check();
      for (int st = 1; st <= 5 && m_nimp < 3; st++) begin
        for (int p = 0; p < ((st == 1) ? 8 : 3); p++) begin
          int d;
          d = $urandom_range(0, 7);
          s = $urandom_range(50, 5000) + ((pu % 3 == 0) ? 3000 : 0);
          x = $urandom_range(0, 60) - 30; y = $urandom_range(0, 60) - 30;
          op(2, s, x, y, d);
          if (s < m_sad) begin m_sad = s; m_mvx = x; m_mvy = y; m_impr = 1; end
          if (s < m_stepmin) begin m_stepmin = s; m_stepdir = d; end
          check();
        end
        op(3, 0, 0, 0, 0);
        m_dir = m_stepdir; m_nimp = m_impr ? 0 : m_nimp + 1; m_impr = 0; m_stepmin = 1 << 20;
        check();
        if (m_nimp >= 3) n_et++;
      end
    end
    checks++;
    if (n_et == 0 || n_cand_win == 0) begin
      failures++;
      $display("coverage: early terminations %0d, second candidate wins %0d", n_et, n_cand_win);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
