// search_buffer: cache based search buffer (8-way set associative) for reference pixels.
//
// Built from addr_ctrl (tags) and cache_data (words). A read asks for ROWS consecutive rows of
// 16 reference pixels starting at buffer coordinates (rd_x, rd_y); with ROWS = 4 that is the
// document's 64 pixels per cycle. A 16-pixel row segment touches three 8-pixel words (two when
// rd_x is a multiple of 8); all ROWS*3 words are looked up in parallel. When every needed word
// hits, rd_ready is high in the same cycle and rd_data holds the pixels (row r, column c at
// index r*16+c). Otherwise the buffer fetches the first missing word from off-chip memory
// (mem_req_* valid/ready request with frame coordinates, the word returned later on
// mem_rsp_valid/mem_rsp_data, one request outstanding) and writes it into the way addr_ctrl
// picks; the read is retried until all words hit. The requester must hold rd_valid and the
// address until rd_ready. Window origin win_x0/win_y0 maps buffer coordinates to the frame.
// flush_i empties the buffer (start of a CU64). stat_reads/stat_fills count accepted reads and
// words loaded from off-chip memory.
module search_buffer
  import ime_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int WAYS = 8,
  parameter int SETS = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush_i,
  input  logic signed [FRM_W-1:0] win_x0,
  input  logic signed [FRM_W-1:0] win_y0,
  input  logic                   rd_valid,
  input  logic [REL_W-1:0]       rd_x,
  input  logic [REL_W-1:0]       rd_y,
  output logic                   rd_ready,
  output pix_t                   rd_data [ROWS*16],
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic signed [FRM_W-1:0] mem_req_x,
  output logic signed [FRM_W-1:0] mem_req_y,
  input  logic                   mem_rsp_valid,
  input  word_t                  mem_rsp_data,
  output logic [31:0]            stat_reads,
  output logic [31:0]            stat_fills
);
  localparam int NPORT = ROWS * 3;
  localparam int WW    = $clog2(WAYS);
  localparam int IW    = $clog2(SETS);

  logic [5:0]       lk_wx  [NPORT];
  logic [REL_W-1:0] lk_y   [NPORT];
  logic             lk_hit [NPORT];
  logic [WW-1:0]    lk_way [NPORT];
  logic [IW-1:0]    r_idx  [NPORT];
  word_t            r_data [NPORT];
  logic             needed [NPORT];
  logic             all_hit;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} st_e;
  st_e st_q;
  logic [5:0]       miss_wx_q;
  logic [REL_W-1:0] miss_y_q;
  logic [5:0]       miss_wx_d;
  logic [REL_W-1:0] miss_y_d;
  logic             fill;
  logic [WW-1:0]    fill_way;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      lk_wx[p]  = rd_x[REL_W-1:3] + 6'(p % 3);
      lk_y[p]   = rd_y + REL_W'(p / 3);
      r_idx[p]  = lk_y[p][IW-1:0];
      needed[p] = (p % 3 != 2) || (rd_x[2:0] != 3'd0);
    end
  end

  always_comb begin
    all_hit   = 1'b1;
    miss_wx_d = '0;
    miss_y_d  = '0;
    for (int p = NPORT - 1; p >= 0; p--) begin
      if (needed[p] && !lk_hit[p]) begin
        all_hit   = 1'b0;
        miss_wx_d = lk_wx[p];
        miss_y_d  = lk_y[p];
      end
    end
  end

  addr_ctrl #(.WAYS(WAYS), .SETS(SETS), .NPORT(NPORT)) u_tags (
    .clk, .rst_n, .flush_i,
    .lk_wx, .lk_y, .lk_hit, .lk_way,
    .fill_i(fill), .fill_wx(miss_wx_q), .fill_y(miss_y_q), .fill_way
  );

  cache_data #(.WAYS(WAYS), .SETS(SETS), .NPORT(NPORT)) u_data (
    .clk, .we(fill), .w_idx(miss_y_q[IW-1:0]), .w_way(fill_way), .w_data(mem_rsp_data),
    .r_idx, .r_way(lk_way), .r_data
  );

  // Assemble each row from its three words and shift by the pixel offset.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic [191:0] row24;
      row24 = {r_data[r*3+2], r_data[r*3+1], r_data[r*3]};
      for (int c = 0; c < 16; c++) begin
        rd_data[r*16+c] = row24[(int'(rd_x[2:0]) + c) * 8 +: 8];
      end
    end
  end

  assign rd_ready      = (st_q == S_IDLE) && rd_valid && all_hit && !flush_i;
  assign fill          = (st_q == S_WAIT) && mem_rsp_valid;
  assign mem_req_valid = (st_q == S_REQ);
  assign mem_req_x     = win_x0 + FRM_W'({miss_wx_q, 3'b000});
  assign mem_req_y     = win_y0 + FRM_W'(miss_y_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      miss_wx_q  <= '0;
      miss_y_q   <= '0;
      stat_reads <= '0;
      stat_fills <= '0;
    end else begin
      if (flush_i) begin
        stat_reads <= '0;
        stat_fills <= '0;
      end else begin
        if (rd_ready) stat_reads <= stat_reads + 32'd1;
        if (fill)     stat_fills <= stat_fills + 32'd1;
      end
      case (st_q)
        S_IDLE: if (rd_valid && !all_hit && !flush_i) begin
          miss_wx_q <= miss_wx_d;
          miss_y_q  <= miss_y_d;
          st_q      <= S_REQ;
        end
        S_REQ:  if (mem_req_ready) st_q <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A stalled read keeps its address.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_valid && !rd_ready && !flush_i |=> rd_valid && $stable(rd_x) && $stable(rd_y));
endmodule
