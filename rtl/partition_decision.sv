// partition_decision: chooses the partition of the CU64 from the kept PU search results.
//
// The document keeps the SAD result of every PU so that "the best partition size" of the
// CU64 can be decided; it does not give the cost used. This block watches the result stream of
// the search (res_valid/res_pu/res_sad), stores every PU's best SAD, and on decide_i compares,
// bottom-up, cost = sum of SAD + PU_COST per PU:
//   CU8  : 8x8, two 8x4 or two 4x8
//   CU16 : 16x16, two 16x8, two 8x16, or split into four CU8
//   CU32 : 32x32 or split into four CU16
//   CU64 : 64x64 or split into four CU32
// Ties keep the larger partition. The result registers update one cycle after decide_i, when
// dec_valid pulses. clear_i forgets the stored SADs (start of a CU64).
// Mode encodings: cu16_mode 0 16x16, 1 16x8, 2 8x16, 3 split; cu8_mode 0 8x8, 1 8x4, 2 4x8.
module partition_decision
  import ime_pkg::*;
#(
  parameter int PU_COST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        res_valid,
  input  pu_id_t      res_pu,
  input  sad_t        res_sad,
  input  logic        decide_i,
  output logic        dec_valid,
  output logic        cu64_split,
  output logic [3:0]  cu32_split,
  output logic [1:0]  cu16_mode [16],
  output logic [1:0]  cu8_mode  [64],
  output logic [27:0] best_cost
);
  typedef logic [27:0] cost_t;
  localparam cost_t P = cost_t'(PU_COST);

  sad_t s64_q;
  sad_t s32_q [4];
  sad_t s16_q [16][5];  // 16x16, 16x8 top, 16x8 bottom, 8x16 left, 8x16 right
  sad_t s8_q  [64][5];  // 8x8, 8x4 top, 8x4 bottom, 4x8 left, 4x8 right

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s64_q <= '1;
      for (int i = 0; i < 4; i++)  s32_q[i] <= '1;
      for (int i = 0; i < 16; i++) for (int j = 0; j < 5; j++) s16_q[i][j] <= '1;
      for (int i = 0; i < 64; i++) for (int j = 0; j < 5; j++) s8_q[i][j] <= '1;
    end else if (clear_i) begin
      s64_q <= '1;
      for (int i = 0; i < 4; i++)  s32_q[i] <= '1;
      for (int i = 0; i < 16; i++) for (int j = 0; j < 5; j++) s16_q[i][j] <= '1;
      for (int i = 0; i < 64; i++) for (int j = 0; j < 5; j++) s8_q[i][j] <= '1;
    end else if (res_valid) begin
      // one compare per destination entry (constant indices) keeps the write decoders small
      if (res_pu.shape == PU_64X64) s64_q <= res_sad;
      for (int i = 0; i < 4; i++)
        if (res_pu.shape == PU_32X32 && res_pu.blk[1:0] == 2'(i)) s32_q[i] <= res_sad;
      for (int i = 0; i < 16; i++) begin
        if (res_pu.blk[3:0] == 4'(i)) begin
          if (res_pu.shape == PU_16X16)                s16_q[i][0] <= res_sad;
          if (res_pu.shape == PU_16X8 && !res_pu.part) s16_q[i][1] <= res_sad;
          if (res_pu.shape == PU_16X8 &&  res_pu.part) s16_q[i][2] <= res_sad;
          if (res_pu.shape == PU_8X16 && !res_pu.part) s16_q[i][3] <= res_sad;
          if (res_pu.shape == PU_8X16 &&  res_pu.part) s16_q[i][4] <= res_sad;
        end
      end
      for (int i = 0; i < 64; i++) begin
        if (res_pu.blk == 6'(i)) begin
          if (res_pu.shape == PU_8X8)                 s8_q[i][0] <= res_sad;
          if (res_pu.shape == PU_8X4 && !res_pu.part) s8_q[i][1] <= res_sad;
          if (res_pu.shape == PU_8X4 &&  res_pu.part) s8_q[i][2] <= res_sad;
          if (res_pu.shape == PU_4X8 && !res_pu.part) s8_q[i][3] <= res_sad;
          if (res_pu.shape == PU_4X8 &&  res_pu.part) s8_q[i][4] <= res_sad;
        end
      end
    end
  end

  cost_t      c8  [64];
  logic [1:0] m8  [64];
  cost_t      c16 [16];
  logic [1:0] m16 [16];
  cost_t      c32 [4];
  logic       sp32 [4];
  cost_t      c64;
  logic       sp64;

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      cost_t a, b, c;
      a = cost_t'(s8_q[i][0]) + P;
      b = cost_t'(s8_q[i][1]) + cost_t'(s8_q[i][2]) + 2 * P;
      c = cost_t'(s8_q[i][3]) + cost_t'(s8_q[i][4]) + 2 * P;
      c8[i] = a; m8[i] = 2'd0;
      if (b < c8[i]) begin c8[i] = b; m8[i] = 2'd1; end
      if (c < c8[i]) begin c8[i] = c; m8[i] = 2'd2; end
    end
    for (int i = 0; i < 16; i++) begin
      cost_t a, b, c, d;
      a = cost_t'(s16_q[i][0]) + P;
      b = cost_t'(s16_q[i][1]) + cost_t'(s16_q[i][2]) + 2 * P;
      c = cost_t'(s16_q[i][3]) + cost_t'(s16_q[i][4]) + 2 * P;
      d = c8[4*i] + c8[4*i+1] + c8[4*i+2] + c8[4*i+3];
      c16[i] = a; m16[i] = 2'd0;
      if (b < c16[i]) begin c16[i] = b; m16[i] = 2'd1; end
      if (c < c16[i]) begin c16[i] = c; m16[i] = 2'd2; end
      if (d < c16[i]) begin c16[i] = d; m16[i] = 2'd3; end
    end
    for (int i = 0; i < 4; i++) begin
      cost_t a, d;
      a = cost_t'(s32_q[i]) + P;
      d = c16[4*i] + c16[4*i+1] + c16[4*i+2] + c16[4*i+3];
      c32[i]  = (d < a) ? d : a;
      sp32[i] = (d < a);
    end
    begin
      cost_t a, d;
      a = cost_t'(s64_q) + P;
      d = c32[0] + c32[1] + c32[2] + c32[3];
      c64  = (d < a) ? d : a;
      sp64 = (d < a);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid  <= 1'b0;
      cu64_split <= 1'b0;
      cu32_split <= '0;
      best_cost  <= '0;
      for (int i = 0; i < 16; i++) cu16_mode[i] <= '0;
      for (int i = 0; i < 64; i++) cu8_mode[i]  <= '0;
    end else begin
      dec_valid <= decide_i;
      if (decide_i) begin
        cu64_split <= sp64;
        for (int i = 0; i < 4; i++)  cu32_split[i] <= sp32[i];
        for (int i = 0; i < 16; i++) cu16_mode[i] <= m16[i];
        for (int i = 0; i < 64; i++) cu8_mode[i]  <= m8[i];
        best_cost <= c64;
      end
    end
  end
endmodule
