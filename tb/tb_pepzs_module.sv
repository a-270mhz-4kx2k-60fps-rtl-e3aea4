// tb_pepzs_module: random SAD jobs of every PU shape on a CU16 of the current picture. The
// reference read port is answered by the testbench from the reference picture with random
// stalls. Each result is compared with a SAD computed here over the PU's rectangle; without
// stalls a job of h rows must deliver its result h/4 + 1 cycles after acceptance.
module tb_pepzs_module;
  import ime_pkg::*;
  import tb_img_pkg::*;
  localparam int WX0 = 2000 - 128, WY0 = 1000 - 128;   // window origin of a CU64 at (2000,1000)
  localparam int CX = 16, CY = 32;                      // CU16 offset inside the CU64
  logic clk = 0, rst_n = 0;
  logic cur_we = 0;
  logic [3:0] cur_row;
  pix_t cur_data [16];
  logic [8:0] cu_rx, cu_ry;
  logic job_valid = 0, job_ready;
  sad_job_t job;
  logic rd_valid, rd_sel, rd_ready;
  logic [8:0] rd_x, rd_y;
  pix_t rd_data [64];
  logic res_valid;
  sad_t res_sad;
  mv_t res_mv;
  logic [2:0] res_tag;
  int checks = 0, failures = 0;
  bit stall_en = 1;

  always #5 clk = !clk;

  pepzs_module dut (.*);

  assign cu_rx = 9'(128 + CX);
  assign cu_ry = 9'(128 + CY);

  // Reference pixels for the address on the read port; the address only changes at rising
  // edges, so it is sampled half a cycle later.
  always @(negedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 16; c++)
        rd_data[r*16+c] = pix_t'(ref_pix(WX0 + int'(rd_x) + c, WY0 + int'(rd_y) + r));
  end
  always_ff @(posedge clk) rd_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  function automatic int golden(int s, int sb, int pt, int mx, int my);
    int x0, y0, w, h, e;
    x0 = 0; y0 = 0; w = 16; h = 16;
    case (s)
      1: begin y0 = pt * 8; h = 8; end
      2: begin x0 = pt * 8; w = 8; end
      3: begin x0 = (sb % 2) * 8; y0 = (sb / 2) * 8; w = 8; h = 8; end
      4: begin x0 = (sb % 2) * 8; y0 = (sb / 2) * 8 + pt * 4; w = 8; h = 4; end
      5: begin x0 = (sb % 2) * 8 + pt * 4; y0 = (sb / 2) * 8; w = 4; h = 8; end
      default: ;
    endcase
    e = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) begin
        int d;
        d = cur_pix(2000 + CX + x, 1000 + CY + y) - ref_pix(2000 + CX + x + mx, 1000 + CY + y + my);
        e += (d < 0) ? -d : d;
      end
    return e;
  endfunction

  int exp_q [$];
  int tag_q [$];
  int mvx_q [$];
  int mvy_q [$];

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected result at %0t tag %0d", $time, res_tag);
      end else begin
        int e, t, mx, my;
        e = exp_q.pop_front(); t = tag_q.pop_front(); mx = mvx_q.pop_front(); my = mvy_q.pop_front();
        if (int'(res_sad) != e || int'(res_tag) != t || int'(res_mv.x) != mx || int'(res_mv.y) != my) begin
          failures++;
          $display("result tag %0d sad %0d exp tag %0d sad %0d", res_tag, res_sad, t, e);
        end
      end
    end
  end

  initial begin
    job = '0;
    cur_row = '0;
    for (int c = 0; c < 16; c++) cur_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      cur_we = 1; cur_row = 4'(r);
      for (int c = 0; c < 16; c++) cur_data[c] = pix_t'(cur_pix(2000 + CX + c, 1000 + CY + r));
    end
    @(negedge clk); cur_we = 0;
    for (int it = 0; it < 300; it++) begin
      int s, sb, pt, mx, my;
      s  = $urandom_range(0, 5);
      sb = $urandom_range(0, 3);
      pt = $urandom_range(0, 1);
      mx = (it % 4 == 0) ? MOT_X : $urandom_range(0, 40) - 20;
      my = (it % 4 == 0) ? MOT_Y : $urandom_range(0, 40) - 20;
      if (it == 200) begin
        stall_en = 0;
        while (exp_q.size() != 0) @(posedge clk);
        @(posedge clk); #1;
      end
      @(negedge clk);
      job_valid = 1;
      job.mv.x = 9'(mx); job.mv.y = 9'(my);
      job.shape = pu_shape_e'(s); job.sub8 = 2'(sb); job.part = 1'(pt);
      job.buf_sel = 1'($urandom); job.tag = 3'(it);
      #1;
      while (!job_ready) begin @(negedge clk); #1; end
      exp_q.push_back(golden(s, sb, pt, mx, my)); tag_q.push_back(it % 8);
      mvx_q.push_back(mx); mvy_q.push_back(my);
      @(posedge clk); #1;
      job_valid = 0;
      if (it >= 200) begin
        // latency check without stalls
        int h, n;
        h = (s == 0 || s == 2) ? 16 : (s == 4) ? 4 : 8;
        n = 0;
        while (!res_valid) begin @(posedge clk); #1; n++; end
        checks++;
        if (n != h / 4 + 1) begin failures++; $display("latency %0d cycles after accept, exp %0d", n, h / 4 + 1); end
        @(posedge clk); #1;
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
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
