// pepzs_module: SAD datapath of the engine: current and reference registers, two PE_16x16.
//
// Holds the 16x16 current block (CU16) being searched, loaded one row per cycle through cur_*.
// A SAD job names a PU inside that CU16 and a motion vector. The module reads the PU's rows of
// the reference block from a search buffer, ROWS rows of 16 pixels per accepted read, into one
// of two reference registers, then lets the PE_16x16 attached to that register compute the 16
// 4x4 SADs and sad_merge add the ones the PU covers. The two register/PE pairs alternate
// between jobs, so the next job's reference rows are fetched while the previous job's SAD is
// computed, as the document separates data loading and SAD calculation into different cycles.
//
// Timing: job_ready is high when no fetch is in progress. A 16-row PU needs 16/ROWS accepted
// reads, an 8-row PU 8/ROWS (a 4-row PU one). One cycle after the last read res_valid pulses for
// one cycle with res_sad, res_mv and res_tag of the job. cu_rx/cu_ry give the CU16's position in
// buffer coordinates and must stay stable while a job runs.
module pepzs_module
  import ime_pkg::*;
#(
  parameter int ROWS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cur_we,
  input  logic [3:0]       cur_row,
  input  pix_t             cur_data [16],
  input  logic [REL_W-1:0] cu_rx,
  input  logic [REL_W-1:0] cu_ry,
  input  logic             job_valid,
  input  sad_job_t         job,
  output logic             job_ready,
  output logic             rd_valid,
  output logic             rd_sel,
  output logic [REL_W-1:0] rd_x,
  output logic [REL_W-1:0] rd_y,
  input  logic             rd_ready,
  input  pix_t             rd_data [ROWS*16],
  output logic             res_valid,
  output sad_t             res_sad,
  output mv_t              res_mv,
  output logic [2:0]       res_tag
);
  pix_t     cur_q  [256];
  pix_t     ref0_q [256];
  pix_t     ref1_q [256];
  sad4_t    sad4_0 [16];
  sad4_t    sad4_1 [16];
  sad4_t    sad4_m [16];
  sad_t     merged;

  logic     busy_q;
  sad_job_t job_q;
  logic [4:0] row_q;
  logic     sel_q;
  logic     calc_q;
  logic     calc_sel_q;
  sad_job_t calc_job_q;

  logic [19:0] g;
  logic [4:0]  py, h;
  always_comb begin
    g  = pu_geom(job_q.shape, job_q.sub8, job_q.part);
    py = g[14:10];
    h  = g[4:0];
  end

  assign job_ready = !busy_q;
  assign rd_valid  = busy_q;
  assign rd_sel    = job_q.buf_sel;
  assign rd_x      = cu_rx + REL_W'(job_q.mv.x);
  assign rd_y      = cu_ry + REL_W'(py) + REL_W'(row_q) + REL_W'(job_q.mv.y);

  // Row writes are written as one compare per destination row (constant indices), which keeps
  // the row decoders small.
  logic [4:0] wr_base;
  assign wr_base = py + row_q;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 16; i++) begin
      if (cur_we && cur_row == 4'(i)) begin
        for (int c = 0; c < 16; c++) cur_q[i * 16 + c] <= cur_data[c];
      end
      for (int r = 0; r < ROWS; r++) begin
        if (busy_q && rd_ready && 32'(wr_base) + 32'(r) == 32'(i)) begin
          for (int c = 0; c < 16; c++) begin
            if (sel_q) ref1_q[i * 16 + c] <= rd_data[r * 16 + c];
            else       ref0_q[i * 16 + c] <= rd_data[r * 16 + c];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      job_q      <= '0;
      row_q      <= '0;
      sel_q      <= 1'b0;
      calc_q     <= 1'b0;
      calc_sel_q <= 1'b0;
      calc_job_q <= '0;
      res_valid  <= 1'b0;
      res_sad    <= '0;
      res_mv     <= '0;
      res_tag    <= '0;
    end else begin
      calc_q    <= 1'b0;
      res_valid <= calc_q;
      if (calc_q) begin
        res_sad <= merged;
        res_mv  <= calc_job_q.mv;
        res_tag <= calc_job_q.tag;
      end
      if (!busy_q) begin
        if (job_valid) begin
          busy_q <= 1'b1;
          job_q  <= job;
          row_q  <= '0;
        end
      end else if (rd_ready) begin
        if (int'(row_q) + ROWS >= int'(h)) begin
          busy_q     <= 1'b0;
          calc_q     <= 1'b1;
          calc_sel_q <= sel_q;
          calc_job_q <= job_q;
          sel_q      <= !sel_q;
        end else begin
          row_q <= row_q + 5'(ROWS);
        end
      end
    end
  end

  pe16x16 u_pe0 (.cur(cur_q), .ref_px(ref0_q), .sad4(sad4_0));
  pe16x16 u_pe1 (.cur(cur_q), .ref_px(ref1_q), .sad4(sad4_1));

  always_comb begin
    for (int b = 0; b < 16; b++) sad4_m[b] = calc_sel_q ? sad4_1[b] : sad4_0[b];
  end

  sad_merge u_merge (
    .sad4(sad4_m), .shape(calc_job_q.shape), .sub8(calc_job_q.sub8), .part(calc_job_q.part),
    .sad(merged)
  );
endmodule
