// addr_ctrl: address controller (tag store) of one 8-way set-associative search buffer.
//
// A reference pixel at buffer coordinates (x, y) (9 bits each) lives in the 8-pixel word
// x[8:3] of row y. Following the document, the set index is y mod 64 (6 bits), the offset is
// x[2:0], and the tag is formed from the remaining x bits (x[8:3]) and y bits (y[8:6]) with a
// valid bit. Tags and valid bits are registers here; the data words are in cache_data.
//
// NPORT lookups run in parallel every cycle (combinational): for each, hit says whether the
// word is present and way where. A fill (fill_i with fill_wx, fill_y) writes the tag into the
// way given by fill_way: the first invalid way of the set, otherwise a per-set round-robin
// pointer (the document does not state the replacement rule for the N-way buffer; its fully
// associative variant replaces the least recently used entry). flush_i invalidates everything,
// which the engine does at the start of every CU64.
module addr_ctrl
  import ime_pkg::*;
#(
  parameter int WAYS  = 8,
  parameter int SETS  = 64,
  parameter int NPORT = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush_i,
  input  logic [5:0]              lk_wx   [NPORT],  // word x = x[8:3]
  input  logic [REL_W-1:0]        lk_y    [NPORT],
  output logic                    lk_hit  [NPORT],
  output logic [$clog2(WAYS)-1:0] lk_way  [NPORT],
  input  logic                    fill_i,
  input  logic [5:0]              fill_wx,
  input  logic [REL_W-1:0]        fill_y,
  output logic [$clog2(WAYS)-1:0] fill_way
);
  localparam int IW = $clog2(SETS);
  localparam int WW = $clog2(WAYS);
  localparam int TW = 6 + REL_W - IW;

  logic [TW-1:0] tag_q   [SETS][WAYS];
  logic          valid_q [SETS][WAYS];
  logic [WW-1:0] rr_q    [SETS];

  function automatic logic [TW-1:0] tag_of(logic [5:0] wx, logic [REL_W-1:0] y);
    return {y[REL_W-1:IW], wx};
  endfunction

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      lk_hit[p] = 1'b0;
      lk_way[p] = '0;
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (valid_q[lk_y[p][IW-1:0]][w] && tag_q[lk_y[p][IW-1:0]][w] == tag_of(lk_wx[p], lk_y[p])) begin
          lk_hit[p] = 1'b1;
          lk_way[p] = WW'(w);
        end
      end
    end
  end

  logic [IW-1:0] fidx;
  logic          found_inv;
  always_comb begin
    fidx      = fill_y[IW-1:0];
    fill_way  = rr_q[fidx];
    found_inv = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found_inv && !valid_q[fidx][w]) begin
        fill_way  = WW'(w);
        found_inv = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
        end
      end
    end else if (flush_i) begin
      for (int s = 0; s < SETS; s++) begin
        rr_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid_q[s][w] <= 1'b0;
      end
    end else if (fill_i) begin
      valid_q[fidx][fill_way] <= 1'b1;
      tag_q[fidx][fill_way]   <= tag_of(fill_wx, fill_y);
      if (!found_inv) rr_q[fidx] <= rr_q[fidx] + WW'(1);
    end
  end
endmodule
