// tb_search_buffer: the search buffer with the off-chip memory model. Random 4-row reads in
// a small area are compared pixel by pixel with the reference picture; repeated reads must
// hit without new off-chip loads; a read of a filled area must complete in the cycle it is
// presented; flush must force reloading.
module tb_search_buffer;
  import ime_pkg::*;
  import tb_img_pkg::*;
  localparam int WX0 = 1000, WY0 = 520;
  logic clk = 0, rst_n = 0, flush_i = 0;
  logic rd_valid = 0;
  logic [8:0] rd_x, rd_y;
  logic rd_ready;
  pix_t rd_data [64];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic signed [FRM_W-1:0] mem_req_x, mem_req_y;
  word_t mem_rsp_data;
  logic [31:0] stat_reads, stat_fills;
  int n_req;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  search_buffer dut (
    .clk, .rst_n, .flush_i, .win_x0(FRM_W'(WX0)), .win_y0(FRM_W'(WY0)),
    .rd_valid, .rd_x, .rd_y, .rd_ready, .rd_data,
    .mem_req_valid, .mem_req_ready, .mem_req_x, .mem_req_y, .mem_rsp_valid, .mem_rsp_data,
    .stat_reads, .stat_fills
  );

  ext_mem_model #(.LATENCY(3)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_x(mem_req_x),
    .req_y(mem_req_y), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data), .n_req(n_req)
  );

  task automatic do_read(int x, int y, output int cycles);
    cycles = 0;
    @(negedge clk);
    rd_x = 9'(x); rd_y = 9'(y); rd_valid = 1;
    #1;
    while (!rd_ready) begin
      @(negedge clk); #1;
      cycles++;
    end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (int'(rd_data[r*16+c]) != ref_pix(WX0 + x + c, WY0 + y + r)) begin
          failures++;
          if (failures < 10) $display("read (%0d,%0d) r%0d c%0d got %0d exp %0d", x, y, r, c,
                                      rd_data[r*16+c], ref_pix(WX0 + x + c, WY0 + y + r));
        end
      end
    @(posedge clk); #1;
    rd_valid = 0;
  endtask

  initial begin
    int cyc, n0;
    rd_x = '0; rd_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      do_read($urandom_range(120, 170), $urandom_range(120, 150), cyc);
    end
    // same read twice: the second must hit at once and load nothing
    do_read(133, 141, cyc);
    n0 = n_req;
    do_read(133, 141, cyc);
    checks++;
    if (cyc != 0 || n_req != n0) begin failures++; $display("repeat read not a hit: %0d cycles, %0d loads", cyc, n_req - n0); end
    // aligned read needs only two words per row
    n0 = n_req;
    do_read(400, 400, cyc);
    checks++;
    if (n_req - n0 != 8) begin failures++; $display("aligned read loaded %0d words, exp 8", n_req - n0); end
    n0 = n_req;
    do_read(401, 300, cyc);
    checks++;
    if (n_req - n0 != 12) begin failures++; $display("unaligned read loaded %0d words, exp 12", n_req - n0); end
    checks++;
    if (int'(stat_fills) != n_req) begin failures++; $display("fill counter %0d vs %0d", stat_fills, n_req); end
    // flush
    @(negedge clk); flush_i = 1; @(posedge clk); #1; flush_i = 0;
    n0 = n_req;
    do_read(133, 141, cyc);
    checks++;
    if (n_req - n0 != 12) begin failures++; $display("after flush loaded %0d words, exp 12", n_req - n0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
