// tb_partition_decision: feeds random per-PU SADs for all 405 PUs of a CU64, biased per trial
// towards large or small partitions, and compares the chosen partition and cost with a
// decision computed here.
module tb_partition_decision;
  import ime_pkg::*;
  localparam int PC = 16;
  logic clk = 0, rst_n = 0, clear_i = 0, res_valid = 0, decide_i = 0;
  pu_id_t res_pu;
  sad_t res_sad;
  logic dec_valid, cu64_split;
  logic [3:0] cu32_split;
  logic [1:0] cu16_mode [16];
  logic [1:0] cu8_mode [64];
  logic [27:0] best_cost;
  int checks = 0, failures = 0;
  int n_split64 = 0, n_nosplit64 = 0;

  always #5 clk = !clk;

  partition_decision #(.PU_COST(PC)) dut (.*);

  int s64, s32 [4], s16 [16][5], s8 [64][5];

  task automatic send(pu_shape_e sh, int blk, int part, int sad);
    @(negedge clk);
    res_valid = 1; res_pu.shape = sh; res_pu.blk = 6'(blk); res_pu.part = 1'(part); res_sad = sad_t'(sad);
    @(posedge clk); #1;
    res_valid = 0;
  endtask

  initial begin
    res_pu = '0; res_sad = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int bias, c8 [64], m8 [64], c16 [16], m16 [16], c32 [4], sp32 [4], c64, sp64;
      bias = t % 3;
      @(negedge clk); clear_i = 1; @(posedge clk); #1; clear_i = 0;
      s64 = $urandom_range(20000, 60000) + ((bias == 0) ? -18000 : 0);
      for (int i = 0; i < 4; i++) s32[i] = $urandom_range(5000, 15000) - ((bias == 1) ? 4000 : 0);
      for (int i = 0; i < 16; i++) for (int j = 0; j < 5; j++) s16[i][j] = (j == 0) ? $urandom_range(1000, 4000) : $urandom_range(400, 2100);
      for (int i = 0; i < 64; i++) for (int j = 0; j < 5; j++) s8[i][j] = (j == 0) ? $urandom_range(200, 1100) : $urandom_range(80, 560);
      send(PU_64X64, 0, 0, s64);
      for (int i = 0; i < 4; i++) send(PU_32X32, i, 0, s32[i]);
      for (int i = 0; i < 16; i++) begin
        send(PU_16X16, i, 0, s16[i][0]);
        send(PU_16X8, i, 0, s16[i][1]); send(PU_16X8, i, 1, s16[i][2]);
        send(PU_8X16, i, 0, s16[i][3]); send(PU_8X16, i, 1, s16[i][4]);
      end
      for (int i = 0; i < 64; i++) begin
        send(PU_8X8, i, 0, s8[i][0]);
        send(PU_8X4, i, 0, s8[i][1]); send(PU_8X4, i, 1, s8[i][2]);
        send(PU_4X8, i, 0, s8[i][3]); send(PU_4X8, i, 1, s8[i][4]);
      end
      // reference decision
      for (int i = 0; i < 64; i++) begin
        int a, b, c;
        a = s8[i][0] + PC; b = s8[i][1] + s8[i][2] + 2 * PC; c = s8[i][3] + s8[i][4] + 2 * PC;
        c8[i] = a; m8[i] = 0;
        if (b < c8[i]) begin c8[i] = b; m8[i] = 1; end
        if (c < c8[i]) begin c8[i] = c; m8[i] = 2; end
      end
      for (int i = 0; i < 16; i++) begin
        int a, b, c, d;
        a = s16[i][0] + PC; b = s16[i][1] + s16[i][2] + 2 * PC; c = s16[i][3] + s16[i][4] + 2 * PC;
        d = c8[4*i] + c8[4*i+1] + c8[4*i+2] + c8[4*i+3];
        c16[i] = a; m16[i] = 0;
        if (b < c16[i]) begin c16[i] = b; m16[i] = 1; end
        if (c < c16[i]) begin c16[i] = c; m16[i] = 2; end
        if (d < c16[i]) begin c16[i] = d; m16[i] = 3; end
      end
      for (int i = 0; i < 4; i++) begin
        int d;
        d = c16[4*i] + c16[4*i+1] + c16[4*i+2] + c16[4*i+3];
        sp32[i] = (d < s32[i] + PC); c32[i] = sp32[i] ? d : s32[i] + PC;
      end
      sp64 = (c32[0] + c32[1] + c32[2] + c32[3] < s64 + PC);
      c64 = sp64 ? c32[0] + c32[1] + c32[2] + c32[3] : s64 + PC;
      if (sp64) n_split64++; else n_nosplit64++;
      @(negedge clk); decide_i = 1; @(posedge clk); #1; decide_i = 0;
      checks++;
      if (!dec_valid) begin failures++; $display("dec_valid missing"); end
      checks++;
      if (int'(cu64_split) != sp64 || int'(best_cost) != c64) begin
        failures++; $display("cu64 split %0d/%0d cost %0d/%0d", cu64_split, sp64, best_cost, c64);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(cu32_split[i]) != sp32[i]) begin failures++; $display("cu32 %0d", i); end
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(cu16_mode[i]) != m16[i]) begin failures++; $display("cu16 %0d mode %0d exp %0d", i, cu16_mode[i], m16[i]); end
      end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (int'(cu8_mode[i]) != m8[i]) begin failures++; $display("cu8 %0d mode %0d exp %0d", i, cu8_mode[i], m8[i]); end
      end
    end
    checks++;
    if (n_split64 == 0 || n_nosplit64 == 0) begin
      failures++; $display("coverage: split %0d, not split %0d", n_split64, n_nosplit64);
    end
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
