// ime_top: integer-pel motion estimation engine for one 64x64 coding unit (CU64), with its
// IME controller.
//
// The search follows the fast HEVC IME flow: AMVP picks, per PU, the better of two motion
// vector predictor candidates by SAD, and a predictive diamond EPZS (PEPZS) refines around it.
// The CU64 is walked CU16 by CU16 in Z order:
//   process 1, per CU16: AMVP + 5-step PEPZS (+/-16) for the 16x16 PU, both 16x8 PUs and both
//     8x16 PUs; then the CU16's share of the AMVP SADs of the 64x64 PU and of its 32x32 PU
//     (the larger AMVP SADs are built from 16x16 partial SADs);
//   process 2, per CU8 of that CU16: AMVP + PEPZS for 8x8 (STEPS_8 steps, +/-8), AMVP + the
//     first PEPZS step for both 8x4 and both 4x8 PUs;
//   process 3, after all CU16s: AMVP for 64x64 and the four 32x32 PUs from the accumulated
//     partial SADs, and their first PEPZS step (8 points), again summed over CU16s.
// PEPZS stops early after ET_STEPS steps without improvement. Non-square PUs above 16x16 are
// not searched. The PU results feed partition_decision, which picks the CU64 partition.
//
// The jobs run one after another through pepzs_module (two PE_16x16 alternating) and read
// reference pixels from two 8-way search buffers: the AMVP buffer serves AMVP and PEPZS steps
// 1..3, the PEPZS buffer the later steps. Both are emptied at the start of each CU64. The
// schedule here is sequential; the document's interlaced schedule, which overlaps the PU
// shapes to reach 2056 cycles per CU64, is not reproduced, so a CU64 takes several times longer.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   start/cu_x/cu_y : begin a CU64 at frame position (cu_x, cu_y); busy until done pulses.
//   cur_rd_*        : combinational read of current pixels: row (0..63) and 16-pixel column
//                     (0..3) of the CU64 in, 16 pixels back in the same cycle.
//   amvp_req_pu/amvp_cand : combinational lookup of the two AMVP candidates of a PU.
//   mem_*           : off-chip reference memory, one 8-pixel word per request (frame coords,
//                     x a multiple of 8), valid/ready request, response pulse, in order.
//   res_*           : one pulse per PU with its best motion vector and SAD.
//   part_*          : partition decision, valid one cycle before done.
//   stat_*          : counters for the current CU64.
module ime_top
  import ime_pkg::*;
#(
  parameter int ROWS         = 4,
  parameter int WAYS         = 8,
  parameter int SETS         = 64,
  parameter int STEPS_16     = 5,
  parameter int STEPS_8      = 4,
  parameter int ET_STEPS     = 3,
  parameter int DIAMOND_FROM = 4,
  parameter int PEPZS_BUF_FROM = 4,
  parameter int PU_COST      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [12:0]             cu_x,
  input  logic [12:0]             cu_y,
  output logic                    busy,
  output logic                    done,
  output logic [5:0]              cur_rd_row,
  output logic [1:0]              cur_rd_col,
  input  pix_t                    cur_rd_data [16],
  output pu_id_t                  amvp_req_pu,
  input  mv_t                     amvp_cand [2],
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output logic signed [FRM_W-1:0] mem_req_x,
  output logic signed [FRM_W-1:0] mem_req_y,
  input  logic                    mem_rsp_valid,
  input  word_t                   mem_rsp_data,
  output logic                    res_valid,
  output pu_id_t                  res_pu,
  output mv_t                     res_mv,
  output sad_t                    res_sad,
  output logic                    part_valid,
  output logic                    part_cu64_split,
  output logic [3:0]              part_cu32_split,
  output logic [1:0]              part_cu16_mode [16],
  output logic [1:0]              part_cu8_mode  [64],
  output logic [27:0]             part_cost,
  output logic [31:0]             stat_cycles,
  output logic [31:0]             stat_jobs,
  output logic [31:0]             stat_early_term,
  output logic [31:0]             stat_reads_amvp,
  output logic [31:0]             stat_reads_pepzs,
  output logic [31:0]             stat_fills_amvp,
  output logic [31:0]             stat_fills_pepzs
);
  typedef enum logic [4:0] {
    S_IDLE, S_FLUSH, S_LOAD, S_PU_START, S_EVAL, S_AMVP_DONE, S_GEN, S_STEP_END, S_STEP_CHK,
    S_NEXT_PU, S_PART_A, S_PART_B, S_P2_BEGIN, S_P3_START, S_P3_AMVP0, S_P3_AMVP1,
    S_P3_CENTER, S_P3_GEN, S_P3_EVAL, S_P3_NEXTC, S_P3_FEED, S_P3_STEP_END, S_P3_OUT,
    S_SETTLE, S_DECIDE, S_DONE
  } state_e;

  typedef enum logic [1:0] {PH_AMVP, PH_STEP, PH_PART, PH_P3} phase_e;

  state_e     st_q, load_ret_q;
  phase_e     phase_q;
  logic [1:0] proc_q;          // 1: process 1, 2: process 2, 3: process 3
  logic [3:0] cu16_q;          // CU16 being processed in processes 1 and 2
  logic [1:0] sub8_q;          // CU8 inside it (process 2)
  logic [2:0] puk_q;           // PU number within the process (0..4)
  logic [2:0] p3pu_q;          // process 3: 0 = 64x64, 1..4 = 32x32 number + 1
  logic [3:0] p3c_q;           // process 3: CU16 counter inside the PU
  logic [3:0] load_cu_q;       // CU16 being loaded into / held in the current register
  logic [4:0] load_cnt_q;
  logic [2:0] step_q;
  mv_t        center_q;
  mv_t        pts_mv_q  [8];
  logic [2:0] pts_dir_q [8];
  logic [3:0] npts_q, iss_q, rcv_q, feed_q;
  sad_t       acc64_q [2];
  sad_t       acc32_q [4][2];
  sad_t       accpt_q [8];
  mv_t        p3cand_q [2];
  logic signed [FRM_W-1:0] win_x0_q, win_y0_q;

  // ---------------------------------------------------------------- current PU
  pu_shape_e  cur_shape;
  logic       cur_part;
  pu_id_t     cur_pu;
  int         max_steps;
  always_comb begin
    cur_shape = PU_16X16;
    cur_part  = 1'b0;
    case (puk_q)
      3'd0: begin cur_shape = (proc_q == 2'd1) ? PU_16X16 : PU_8X8; cur_part = 1'b0; end
      3'd1: begin cur_shape = (proc_q == 2'd1) ? PU_16X8  : PU_8X4; cur_part = 1'b0; end
      3'd2: begin cur_shape = (proc_q == 2'd1) ? PU_16X8  : PU_8X4; cur_part = 1'b1; end
      3'd3: begin cur_shape = (proc_q == 2'd1) ? PU_8X16  : PU_4X8; cur_part = 1'b0; end
      default: begin cur_shape = (proc_q == 2'd1) ? PU_8X16 : PU_4X8; cur_part = 1'b1; end
    endcase
    if (proc_q == 2'd3) begin
      cur_pu.shape = (p3pu_q == 3'd0) ? PU_64X64 : PU_32X32;
      cur_pu.blk   = (p3pu_q == 3'd0) ? 6'd0 : 6'(p3pu_q - 3'd1);
      cur_pu.part  = 1'b0;
    end else begin
      cur_pu.shape = cur_shape;
      cur_pu.blk   = (proc_q == 2'd1) ? {2'b00, cu16_q} : {cu16_q, sub8_q};
      cur_pu.part  = cur_part;
    end
    if (proc_q == 2'd1)            max_steps = STEPS_16;
    else if (proc_q == 2'd2 && cur_shape == PU_8X8) max_steps = STEPS_8;
    else                           max_steps = 1;
  end

  // ---------------------------------------------------------------- datapath instances
  logic             job_valid, job_ready;
  sad_job_t         job;
  logic             pm_rd_valid, pm_rd_sel, pm_rd_ready;
  logic [REL_W-1:0] pm_rd_x, pm_rd_y;
  pix_t             pm_rd_data [ROWS*16];
  pix_t             a_rd_data  [ROWS*16];
  pix_t             b_rd_data  [ROWS*16];
  logic             a_rd_ready, b_rd_ready;
  logic             pm_res_valid;
  sad_t             pm_res_sad;
  mv_t              pm_res_mv;
  logic [2:0]       pm_res_tag;
  logic             cur_we;
  logic [REL_W-1:0] cu_rx, cu_ry;
  logic             flush;
  logic             a_req_valid, b_req_valid;
  logic signed [FRM_W-1:0] a_req_x, a_req_y, b_req_x, b_req_y;

  assign cu_rx = REL_W'(REL_OFS) + REL_W'({load_cu_q[2], load_cu_q[0], 4'b0000});
  assign cu_ry = REL_W'(REL_OFS) + REL_W'({load_cu_q[3], load_cu_q[1], 4'b0000});

  pepzs_module #(.ROWS(ROWS)) u_pepzs (
    .clk, .rst_n,
    .cur_we, .cur_row(load_cnt_q[3:0]), .cur_data(cur_rd_data),
    .cu_rx, .cu_ry,
    .job_valid, .job, .job_ready,
    .rd_valid(pm_rd_valid), .rd_sel(pm_rd_sel), .rd_x(pm_rd_x), .rd_y(pm_rd_y),
    .rd_ready(pm_rd_ready), .rd_data(pm_rd_data),
    .res_valid(pm_res_valid), .res_sad(pm_res_sad), .res_mv(pm_res_mv), .res_tag(pm_res_tag)
  );

  search_buffer #(.ROWS(ROWS), .WAYS(WAYS), .SETS(SETS)) u_buf_amvp (
    .clk, .rst_n, .flush_i(flush), .win_x0(win_x0_q), .win_y0(win_y0_q),
    .rd_valid(pm_rd_valid && !pm_rd_sel), .rd_x(pm_rd_x), .rd_y(pm_rd_y),
    .rd_ready(a_rd_ready), .rd_data(a_rd_data),
    .mem_req_valid(a_req_valid), .mem_req_ready(mem_req_ready && a_req_valid),
    .mem_req_x(a_req_x), .mem_req_y(a_req_y),
    .mem_rsp_valid, .mem_rsp_data,
    .stat_reads(stat_reads_amvp), .stat_fills(stat_fills_amvp)
  );

  search_buffer #(.ROWS(ROWS), .WAYS(WAYS), .SETS(SETS)) u_buf_pepzs (
    .clk, .rst_n, .flush_i(flush), .win_x0(win_x0_q), .win_y0(win_y0_q),
    .rd_valid(pm_rd_valid && pm_rd_sel), .rd_x(pm_rd_x), .rd_y(pm_rd_y),
    .rd_ready(b_rd_ready), .rd_data(b_rd_data),
    .mem_req_valid(b_req_valid), .mem_req_ready(mem_req_ready && !a_req_valid),
    .mem_req_x(b_req_x), .mem_req_y(b_req_y),
    .mem_rsp_valid, .mem_rsp_data,
    .stat_reads(stat_reads_pepzs), .stat_fills(stat_fills_pepzs)
  );

  // Only one read is in flight, so at most one buffer waits for off-chip memory at a time;
  // both see the response but only the waiting one takes it.
  assign mem_req_valid = a_req_valid || b_req_valid;
  assign mem_req_x     = a_req_valid ? a_req_x : b_req_x;
  assign mem_req_y     = a_req_valid ? a_req_y : b_req_y;
  assign pm_rd_ready   = pm_rd_sel ? b_rd_ready : a_rd_ready;
  always_comb begin
    for (int i = 0; i < ROWS * 16; i++) pm_rd_data[i] = pm_rd_sel ? b_rd_data[i] : a_rd_data[i];
  end

  // Search point generators for the up to 8 points of a step.
  mv_t        gen_mv  [8];
  logic [2:0] gen_dir [8];
  logic [2:0] dec_pred_dir;
  for (genvar k = 0; k < 8; k++) begin : g_pat
    pepzs_pattern #(.DIAMOND_FROM(DIAMOND_FROM)) u_pat (
      .center(center_q), .step(step_q), .pred_dir(dec_pred_dir), .pt(3'(k)),
      .pt_mv(gen_mv[k]), .pt_dir(gen_dir[k])
    );
  end

  // Comparison / SAD result register.
  logic       dec_init, dec_cand, dec_point, dec_step_end, dec_et;
  mv_t        dec_mv, dec_best_mv;
  sad_t       dec_sad, dec_best_sad;
  logic [2:0] dec_dir;

  pepzs_decision #(.ET_STEPS(ET_STEPS)) u_dec (
    .clk, .rst_n,
    .init_i(dec_init), .cand_i(dec_cand), .point_i(dec_point), .step_end_i(dec_step_end),
    .mv_i(dec_mv), .sad_i(dec_sad), .dir_i(dec_dir),
    .best_mv(dec_best_mv), .best_sad(dec_best_sad), .pred_dir(dec_pred_dir), .early_term(dec_et)
  );

  logic in_eval, res_amvp, res_step;
  assign in_eval  = (st_q == S_EVAL) || (st_q == S_P3_EVAL);
  assign res_amvp = in_eval && pm_res_valid && phase_q == PH_AMVP;
  assign res_step = in_eval && pm_res_valid && phase_q == PH_STEP;

  always_comb begin
    dec_init     = (res_amvp && pm_res_tag == 3'd0) || (st_q == S_P3_AMVP0);
    dec_cand     = (res_amvp && pm_res_tag == 3'd1) || (st_q == S_P3_AMVP1);
    dec_point    = res_step || (st_q == S_P3_FEED);
    dec_step_end = (st_q == S_STEP_END) || (st_q == S_P3_STEP_END);
    dec_mv       = pm_res_mv;
    dec_sad      = pm_res_sad;
    dec_dir      = pts_dir_q[pm_res_tag];
    case (st_q)
      S_P3_AMVP0: begin dec_mv = p3cand_q[0]; dec_sad = (p3pu_q == 3'd0) ? acc64_q[0] : acc32_q[p3pu_q[1:0] - 2'd1][0]; end
      S_P3_AMVP1: begin dec_mv = p3cand_q[1]; dec_sad = (p3pu_q == 3'd0) ? acc64_q[1] : acc32_q[p3pu_q[1:0] - 2'd1][1]; end
      S_P3_FEED:  begin dec_mv = pts_mv_q[feed_q[2:0]]; dec_sad = accpt_q[feed_q[2:0]]; dec_dir = pts_dir_q[feed_q[2:0]]; end
      default: ;
    endcase
  end

  // Job issue.
  always_comb begin
    job_valid   = in_eval && (iss_q < npts_q);
    job.mv      = pts_mv_q[iss_q[2:0]];
    job.shape   = (phase_q == PH_AMVP || phase_q == PH_STEP) ? cur_shape : PU_16X16;
    job.sub8    = sub8_q;
    job.part    = (phase_q == PH_AMVP || phase_q == PH_STEP) ? cur_part : 1'b0;
    job.buf_sel = (phase_q == PH_STEP) && (int'(step_q) >= PEPZS_BUF_FROM);
    job.tag     = iss_q[2:0];
  end

  // Current pixel loading.
  assign cur_we     = (st_q == S_LOAD);
  assign cur_rd_row = {load_cu_q[3], load_cu_q[1], load_cnt_q[3:0]};
  assign cur_rd_col = {load_cu_q[2], load_cu_q[0]};
  assign flush      = (st_q == S_FLUSH);

  // AMVP candidate lookup.
  always_comb begin
    amvp_req_pu = cur_pu;
    if (st_q == S_PART_A) begin
      amvp_req_pu.shape = PU_64X64; amvp_req_pu.blk = '0; amvp_req_pu.part = 1'b0;
    end else if (st_q == S_PART_B) begin
      amvp_req_pu.shape = PU_32X32; amvp_req_pu.blk = {4'b0000, cu16_q[3:2]}; amvp_req_pu.part = 1'b0;
    end
  end

  function automatic logic [3:0] p3_cu16(logic [2:0] pu, logic [3:0] c);
    return (pu == 3'd0) ? c : {2'(pu - 3'd1), c[1:0]};
  endfunction

  // ---------------------------------------------------------------- controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      load_ret_q  <= S_IDLE;
      phase_q     <= PH_AMVP;
      proc_q      <= 2'd1;
      cu16_q      <= '0;
      sub8_q      <= '0;
      puk_q       <= '0;
      p3pu_q      <= '0;
      p3c_q       <= '0;
      load_cu_q   <= '0;
      load_cnt_q  <= '0;
      step_q      <= 3'd1;
      center_q    <= '0;
      npts_q      <= '0;
      iss_q       <= '0;
      rcv_q       <= '0;
      feed_q      <= '0;
      win_x0_q    <= '0;
      win_y0_q    <= '0;
      for (int k = 0; k < 8; k++) begin
        pts_mv_q[k]  <= '0;
        pts_dir_q[k] <= '0;
        accpt_q[k]   <= '0;
      end
      for (int k = 0; k < 2; k++) begin
        acc64_q[k]  <= '0;
        p3cand_q[k] <= '0;
        for (int j = 0; j < 4; j++) acc32_q[j][k] <= '0;
      end
      res_valid       <= 1'b0;
      res_pu          <= '0;
      res_mv          <= '0;
      res_sad         <= '0;
      done            <= 1'b0;
      stat_cycles     <= '0;
      stat_jobs       <= '0;
      stat_early_term <= '0;
    end else begin
      res_valid <= 1'b0;
      done      <= 1'b0;
      if (st_q != S_IDLE) stat_cycles <= stat_cycles + 32'd1;
      if (job_valid && job_ready) stat_jobs <= stat_jobs + 32'd1;

      // Job issue and result collection.
      if (in_eval) begin
        if (job_valid && job_ready) iss_q <= iss_q + 4'd1;
        if (pm_res_valid) begin
          rcv_q <= rcv_q + 4'd1;
          case (phase_q)
            PH_PART: begin
              if (pm_res_tag[1] == 1'b0)
                acc64_q[pm_res_tag[0]] <= (cu16_q == 4'd0) ? pm_res_sad : acc64_q[pm_res_tag[0]] + pm_res_sad;
              else
                acc32_q[cu16_q[3:2]][pm_res_tag[0]] <= (cu16_q[1:0] == 2'd0) ? pm_res_sad
                                                     : acc32_q[cu16_q[3:2]][pm_res_tag[0]] + pm_res_sad;
            end
            PH_P3: accpt_q[pm_res_tag] <= (p3c_q == 4'd0) ? pm_res_sad : accpt_q[pm_res_tag] + pm_res_sad;
            default: ;
          endcase
        end
      end

      case (st_q)
        S_IDLE: if (start) begin
          win_x0_q        <= FRM_W'(cu_x) - FRM_W'(REL_OFS);
          win_y0_q        <= FRM_W'(cu_y) - FRM_W'(REL_OFS);
          stat_cycles     <= 32'd1;
          stat_jobs       <= '0;
          stat_early_term <= '0;
          st_q            <= S_FLUSH;
        end
        S_FLUSH: begin
          proc_q     <= 2'd1;
          cu16_q     <= '0;
          puk_q      <= '0;
          load_cu_q  <= '0;
          load_cnt_q <= '0;
          load_ret_q <= S_PU_START;
          st_q       <= S_LOAD;
        end
        S_LOAD: begin
          load_cnt_q <= load_cnt_q + 5'd1;
          if (load_cnt_q == 5'd15) begin
            load_cnt_q <= '0;
            st_q       <= load_ret_q;
          end
        end
        S_PU_START: begin
          pts_mv_q[0] <= clamp_mv(amvp_cand[0]);
          pts_mv_q[1] <= clamp_mv(amvp_cand[1]);
          npts_q      <= 4'd2;
          iss_q       <= '0;
          rcv_q       <= '0;
          phase_q     <= PH_AMVP;
          st_q        <= S_EVAL;
        end
        S_EVAL: if (rcv_q == npts_q) begin
          case (phase_q)
            PH_AMVP: st_q <= S_AMVP_DONE;
            PH_STEP: st_q <= S_STEP_END;
            default: st_q <= S_P2_BEGIN;   // PH_PART
          endcase
        end
        S_AMVP_DONE: begin
          center_q <= dec_best_mv;
          step_q   <= 3'd1;
          st_q     <= S_GEN;
        end
        S_GEN: begin
          for (int k = 0; k < 8; k++) begin
            pts_mv_q[k]  <= gen_mv[k];
            pts_dir_q[k] <= gen_dir[k];
          end
          npts_q  <= (step_q == 3'd1) ? 4'd8 : 4'd3;
          iss_q   <= '0;
          rcv_q   <= '0;
          phase_q <= PH_STEP;
          st_q    <= S_EVAL;
        end
        S_STEP_END: st_q <= S_STEP_CHK;
        S_STEP_CHK: begin
          if (dec_et || int'(step_q) >= max_steps) begin
            res_valid <= 1'b1;
            res_pu    <= cur_pu;
            res_mv    <= dec_best_mv;
            res_sad   <= dec_best_sad;
            if (dec_et && int'(step_q) < max_steps) stat_early_term <= stat_early_term + 32'd1;
            st_q      <= S_NEXT_PU;
          end else begin
            step_q <= step_q + 3'd1;
            st_q   <= S_GEN;
          end
        end
        S_NEXT_PU: begin
          if (puk_q != 3'd4) begin
            puk_q <= puk_q + 3'd1;
            st_q  <= S_PU_START;
          end else if (proc_q == 2'd1) begin
            st_q <= S_PART_A;
          end else if (sub8_q != 2'd3) begin
            sub8_q <= sub8_q + 2'd1;
            puk_q  <= '0;
            st_q   <= S_PU_START;
          end else if (cu16_q != 4'd15) begin
            cu16_q     <= cu16_q + 4'd1;
            load_cu_q  <= cu16_q + 4'd1;
            proc_q     <= 2'd1;
            puk_q      <= '0;
            load_ret_q <= S_PU_START;
            st_q       <= S_LOAD;
          end else begin
            proc_q <= 2'd3;
            p3pu_q <= '0;
            st_q   <= S_P3_START;
          end
        end
        S_PART_A: begin
          pts_mv_q[0] <= clamp_mv(amvp_cand[0]);
          pts_mv_q[1] <= clamp_mv(amvp_cand[1]);
          st_q        <= S_PART_B;
        end
        S_PART_B: begin
          pts_mv_q[2] <= clamp_mv(amvp_cand[0]);
          pts_mv_q[3] <= clamp_mv(amvp_cand[1]);
          npts_q      <= 4'd4;
          iss_q       <= '0;
          rcv_q       <= '0;
          phase_q     <= PH_PART;
          st_q        <= S_EVAL;
        end
        S_P2_BEGIN: begin
          proc_q <= 2'd2;
          sub8_q <= '0;
          puk_q  <= '0;
          st_q   <= S_PU_START;
        end
        S_P3_START: begin
          p3cand_q[0] <= clamp_mv(amvp_cand[0]);
          p3cand_q[1] <= clamp_mv(amvp_cand[1]);
          st_q        <= S_P3_AMVP0;
        end
        S_P3_AMVP0:  st_q <= S_P3_AMVP1;
        S_P3_AMVP1:  st_q <= S_P3_CENTER;
        S_P3_CENTER: begin
          center_q <= dec_best_mv;
          step_q   <= 3'd1;
          st_q     <= S_P3_GEN;
        end
        S_P3_GEN: begin
          for (int k = 0; k < 8; k++) begin
            pts_mv_q[k]  <= gen_mv[k];
            pts_dir_q[k] <= gen_dir[k];
          end
          npts_q     <= 4'd8;
          iss_q      <= '0;
          rcv_q      <= '0;
          phase_q    <= PH_P3;
          p3c_q      <= '0;
          load_cu_q  <= p3_cu16(p3pu_q, 4'd0);
          load_ret_q <= S_P3_EVAL;
          st_q       <= S_LOAD;
        end
        S_P3_EVAL: if (rcv_q == npts_q) st_q <= S_P3_NEXTC;
        S_P3_NEXTC: begin
          iss_q <= '0;
          rcv_q <= '0;
          if (p3c_q != ((p3pu_q == 3'd0) ? 4'd15 : 4'd3)) begin
            p3c_q      <= p3c_q + 4'd1;
            load_cu_q  <= p3_cu16(p3pu_q, p3c_q + 4'd1);
            load_ret_q <= S_P3_EVAL;
            st_q       <= S_LOAD;
          end else begin
            feed_q <= '0;
            st_q   <= S_P3_FEED;
          end
        end
        S_P3_FEED: begin
          feed_q <= feed_q + 4'd1;
          if (feed_q == 4'd7) st_q <= S_P3_STEP_END;
        end
        S_P3_STEP_END: st_q <= S_P3_OUT;
        S_P3_OUT: begin
          res_valid <= 1'b1;
          res_pu    <= cur_pu;
          res_mv    <= dec_best_mv;
          res_sad   <= dec_best_sad;
          if (p3pu_q == 3'd4) begin
            st_q <= S_SETTLE;   // let partition_decision store this last result first
          end else begin
            p3pu_q <= p3pu_q + 3'd1;
            st_q   <= S_P3_START;
          end
        end
        S_SETTLE: st_q <= S_DECIDE;
        S_DECIDE: st_q <= S_DONE;
        S_DONE: begin
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);

  partition_decision #(.PU_COST(PU_COST)) u_part (
    .clk, .rst_n, .clear_i(st_q == S_FLUSH),
    .res_valid, .res_pu, .res_sad,
    .decide_i(st_q == S_DECIDE),
    .dec_valid(part_valid), .cu64_split(part_cu64_split), .cu32_split(part_cu32_split),
    .cu16_mode(part_cu16_mode), .cu8_mode(part_cu8_mode), .best_cost(part_cost)
  );
endmodule
