// tb_cache_data: random writes into the 8-way data array, read back through all ports and
// compared with a model array.
module tb_cache_data;
  import ime_pkg::*;
  localparam int NP = 3;
  logic clk = 0, we = 0;
  logic [5:0] w_idx;
  logic [2:0] w_way;
  word_t w_data;
  logic [5:0] r_idx [NP];
  logic [2:0] r_way [NP];
  word_t r_data [NP];
  word_t model [8][64];
  bit    written [8][64];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  cache_data #(.NPORT(NP)) dut (.*);

  initial begin
    for (int w = 0; w < 8; w++) for (int s = 0; s < 64; s++) written[w][s] = 0;
    w_idx = '0; w_way = '0; w_data = '0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      we     = ($urandom_range(0, 1) == 1);
      w_idx  = 6'($urandom);
      w_way  = 3'($urandom);
      w_data = {$urandom, $urandom};
      for (int p = 0; p < NP; p++) begin r_idx[p] = 6'($urandom); r_way[p] = 3'($urandom); end
      #1;
      for (int p = 0; p < NP; p++) begin
        if (written[r_way[p]][r_idx[p]]) begin
          checks++;
          if (r_data[p] != model[r_way[p]][r_idx[p]]) begin
            failures++;
            $display("read way %0d idx %0d got %h exp %h", r_way[p], r_idx[p], r_data[p], model[r_way[p]][r_idx[p]]);
          end
        end
      end
      @(posedge clk);
      if (we) begin model[w_way][w_idx] = w_data; written[w_way][w_idx] = 1; end
    end
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
