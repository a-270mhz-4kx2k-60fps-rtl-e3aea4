// ext_mem_model: behavioural model of the off-chip reference frame memory (not synthesizable
// intent, testbench use only). Accepts one request for an 8-pixel word at frame position
// (req_x, req_y) when idle and returns it LATENCY cycles later as a one-cycle rsp_valid pulse,
// pixel i (at x + i) in bits [8i+7:8i]. Pixel values come from tb_img_pkg::ref_pix.
module ext_mem_model
  import ime_pkg::*;
#(
  parameter int LATENCY = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic signed [FRM_W-1:0] req_x,
  input  logic signed [FRM_W-1:0] req_y,
  output logic                    rsp_valid,
  output word_t                   rsp_data,
  output int                      n_req
);
  int cnt;
  int lx, ly;
  logic pending;

  assign req_ready = !pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      n_req     <= 0;
      lx        <= 0;
      ly        <= 0;
    end else begin
      rsp_valid <= 1'b0;
      if (!pending && req_valid) begin
        pending <= 1'b1;
        cnt     <= LATENCY;
        lx      <= int'(req_x);
        ly      <= int'(req_y);
        n_req   <= n_req + 1;
      end else if (pending) begin
        if (cnt <= 1) begin
          pending   <= 1'b0;
          rsp_valid <= 1'b1;
          for (int i = 0; i < 8; i++) rsp_data[i*8 +: 8] <= 8'(tb_img_pkg::ref_pix(lx + i, ly));
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
