// tb_pepzs_pattern: checks the search points of steps 1..5 for every predicted direction and
// several centres against offsets tabulated here: axis points at 2^(s-1), diagonal points at
// 2^(s-1) up to step 4 and at half that from step 5 (diamond variant).
module tb_pepzs_pattern;
  import ime_pkg::*;
  mv_t        center, pt_mv;
  logic [2:0] step, pred_dir, pt, pt_dir;
  int checks = 0, failures = 0;

  pepzs_pattern dut (.center, .step, .pred_dir, .pt, .pt_mv, .pt_dir);

  // unit vectors for directions 0..7 (E, NE, N, NW, W, SW, S, SE; y down)
  int ux [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
  int uy [8] = '{0, -1, -1, -1, 0, 1, 1, 1};

  initial begin
    for (int c = 0; c < 6; c++) begin
      center.x = 9'(c * 17 - 40);
      center.y = 9'(25 - c * 11);
      for (int s = 1; s <= 5; s++) begin
        for (int pd = 0; pd < 8; pd++) begin
          for (int p = 0; p < ((s == 1) ? 8 : 3); p++) begin
            int d, dd, ed, ex, ey;
            step = 3'(s); pred_dir = 3'(pd); pt = 3'(p);
            #1;
            ed = (s == 1) ? p : ((pd + p - 1) & 7);
            d  = 1 << (s - 1);
            dd = ((ed % 2) == 1 && s == 5) ? d / 2 : d;
            ex = int'(center.x) + ux[ed] * dd;
            ey = int'(center.y) + uy[ed] * dd;
            checks++;
            if (int'(pt_dir) != ed || int'(pt_mv.x) != ex || int'(pt_mv.y) != ey) begin
              failures++;
              $display("step %0d pd %0d pt %0d: got dir %0d (%0d,%0d) exp dir %0d (%0d,%0d)",
                       s, pd, p, pt_dir, pt_mv.x, pt_mv.y, ed, ex, ey);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
