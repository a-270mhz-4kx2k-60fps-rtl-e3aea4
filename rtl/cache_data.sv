// cache_data: data array of one search buffer.
//
// WAYS register files (the document: eight 8x64-byte register files) of SETS words of 64 bits,
// i.e. 8 pixels per word and 4 KB in all at the defaults. One write port (a fill from off-chip
// memory) and NPORT combinational read ports addressed by set index and way, as chosen by
// addr_ctrl. Writes take effect at the rising clock edge. The array has no reset: a word is
// only read after addr_ctrl has marked it valid, which happens with its fill.
module cache_data
  import ime_pkg::*;
#(
  parameter int WAYS  = 8,
  parameter int SETS  = 64,
  parameter int NPORT = 12
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(SETS)-1:0] w_idx,
  input  logic [$clog2(WAYS)-1:0] w_way,
  input  word_t                   w_data,
  input  logic [$clog2(SETS)-1:0] r_idx  [NPORT],
  input  logic [$clog2(WAYS)-1:0] r_way  [NPORT],
  output word_t                   r_data [NPORT]
);
  word_t mem [WAYS][SETS];

  always_ff @(posedge clk) begin
    if (we) mem[w_way][w_idx] <= w_data;
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) r_data[p] = mem[r_way[p]][r_idx[p]];
  end
endmodule
