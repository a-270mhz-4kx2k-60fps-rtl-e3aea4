// tb_addr_ctrl: fills, hits and misses of the tag store against a model of the 64 sets x 8
// ways with first-invalid / round-robin allocation; also checks that words differing only in
// their tag bits do not alias and that flush empties the store.
module tb_addr_ctrl;
  import ime_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0, flush_i = 0, fill_i = 0;
  logic [5:0] lk_wx [NP];
  logic [8:0] lk_y  [NP];
  logic       lk_hit [NP];
  logic [2:0] lk_way [NP];
  logic [5:0] fill_wx;
  logic [8:0] fill_y;
  logic [2:0] fill_way;
  int checks = 0, failures = 0, n_evict = 0;

  always #5 clk = !clk;

  addr_ctrl #(.NPORT(NP)) dut (.*);

  // model
  int  m_tag [64][8];
  bit  m_val [64][8];
  int  m_rr  [64];

  function automatic int mway(int wx, int y);
    for (int w = 0; w < 8; w++) if (m_val[y % 64][w] && m_tag[y % 64][w] == ((y / 64) * 64 + wx)) return w;
    return -1;
  endfunction

  task automatic do_fill(int wx, int y);
    int s, w;
    s = y % 64;
    w = -1;
    for (int i = 0; i < 8; i++) if (w < 0 && !m_val[s][i]) w = i;
    if (w < 0) begin w = m_rr[s]; m_rr[s] = (m_rr[s] + 1) % 8; n_evict++; end
    @(negedge clk);
    fill_wx = 6'(wx); fill_y = 9'(y); fill_i = 1;
    #1;
    checks++;
    if (int'(fill_way) != w) begin failures++; $display("fill way got %0d exp %0d", fill_way, w); end
    @(posedge clk); #1;
    fill_i = 0;
    m_val[s][w] = 1; m_tag[s][w] = (y / 64) * 64 + wx;
  endtask

  task automatic lookups();
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      // half of the lookups target a recently used neighbourhood
      lk_wx[p] = 6'($urandom_range(0, 7));
      lk_y[p]  = 9'($urandom_range(0, 3) * 64 + $urandom_range(0, 5));
    end
    #1;
    for (int p = 0; p < NP; p++) begin
      int w;
      w = mway(int'(lk_wx[p]), int'(lk_y[p]));
      checks++;
      if (lk_hit[p] != (w >= 0) || (w >= 0 && int'(lk_way[p]) != w)) begin
        failures++;
        $display("lookup (%0d,%0d) hit %0d way %0d, model way %0d", lk_wx[p], lk_y[p], lk_hit[p], lk_way[p], w);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin m_rr[s] = 0; for (int w = 0; w < 8; w++) begin m_val[s][w] = 0; m_tag[s][w] = 0; end end
    for (int p = 0; p < NP; p++) begin lk_wx[p] = '0; lk_y[p] = '0; end
    fill_wx = '0; fill_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      lookups();
      if (it % 2 == 0) begin
        int wx, y;
        wx = $urandom_range(0, 7);
        y  = $urandom_range(0, 3) * 64 + $urandom_range(0, 5);
        if (mway(wx, y) < 0) do_fill(wx, y);
      end
      if (it == 300) begin
        @(negedge clk); flush_i = 1; @(posedge clk); #1; flush_i = 0;
        for (int s = 0; s < 64; s++) begin m_rr[s] = 0; for (int w = 0; w < 8; w++) m_val[s][w] = 0; end
      end
    end
    checks++;
    if (n_evict == 0) begin failures++; $display("no eviction exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
