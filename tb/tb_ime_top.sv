// tb_ime_top: end-to-end test of the motion estimation engine at its default parameters.
//
// Two CU64s of a synthetic picture pair (the current picture is the reference moved by a
// known motion, plus noise) are searched back to back. The reference frame comes from the
// off-chip memory model; current pixels and AMVP candidates are answered combinationally by
// the testbench. A reference model of the whole search flow, written here independently of the
// RTL (AMVP choice, PEPZS pattern, direction prediction, early termination, 32x32/64x64 from
// summed 16x16 SADs, partition cost), predicts every PU result in order, the number of SAD
// jobs, the number of early terminations and the partition cost. The test also requires that
// each mechanism occurs at least once: early termination, a search running all steps, the
// half-distance diagonal step, the second AMVP candidate winning, candidate clamping, hits and
// off-chip loads in both search buffers, and both a split and an unsplit CU16.
module tb_ime_top;
  import ime_pkg::*;
  import tb_img_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [12:0] cu_x, cu_y;
  logic busy, done;
  logic [5:0] cur_rd_row;
  logic [1:0] cur_rd_col;
  pix_t cur_rd_data [16];
  pu_id_t amvp_req_pu;
  mv_t amvp_cand [2];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic signed [FRM_W-1:0] mem_req_x, mem_req_y;
  word_t mem_rsp_data;
  logic res_valid;
  pu_id_t res_pu;
  mv_t res_mv;
  sad_t res_sad;
  logic part_valid, part_cu64_split;
  logic [3:0] part_cu32_split;
  logic [1:0] part_cu16_mode [16];
  logic [1:0] part_cu8_mode [64];
  logic [27:0] part_cost;
  logic [31:0] stat_cycles, stat_jobs, stat_early_term;
  logic [31:0] stat_reads_amvp, stat_reads_pepzs, stat_fills_amvp, stat_fills_pepzs;
  int n_req;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  ime_top dut (.*);

  ext_mem_model #(.LATENCY(4)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_x(mem_req_x),
    .req_y(mem_req_y), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data), .n_req(n_req)
  );

  // ------------------------------------------------------------ testbench-side sources
  int CUX, CUY;

  always_comb begin
    for (int c = 0; c < 16; c++)
      cur_rd_data[c] = pix_t'(cur_pix(CUX + int'(cur_rd_col) * 16 + c, CUY + int'(cur_rd_row)));
  end

  function automatic int pu_key(int shape, int blk, int part);
    return shape * 256 + blk * 2 + part;
  endfunction

  // AMVP candidates: the first near the true motion, the second elsewhere (sometimes out of
  // the clamp range).
  function automatic void cands(int key, output int x0, output int y0, output int x1, output int y1);
    int h;
    h  = hash2(key, CUX + CUY);
    x0 = MOT_X + (h % 7) - 3;
    y0 = MOT_Y + ((h / 8) % 7) - 3;
    if ((h / 64) % 4 == 0) begin
      x1 = MOT_X + ((h / 256) % 3) - 1;   // second candidate close to the true motion
      y1 = MOT_Y;
    end else if ((h / 64) % 16 == 1) begin
      x1 = 120; y1 = -110;                 // beyond the clamp range
    end else begin
      x1 = (h / 1024) % 41 - 20;
      y1 = (h / 65536) % 41 - 20;
    end
  endfunction

  always_comb begin
    int x0, y0, x1, y1;
    cands(pu_key(int'(amvp_req_pu.shape), int'(amvp_req_pu.blk), int'(amvp_req_pu.part)), x0, y0, x1, y1);
    amvp_cand[0].x = 9'(x0); amvp_cand[0].y = 9'(y0);
    amvp_cand[1].x = 9'(x1); amvp_cand[1].y = 9'(y1);
  end

  // ------------------------------------------------------------ reference model
  int g_mvx [$], g_mvy [$], g_sad [$], g_shape [$], g_blk [$], g_part [$];
  int g_jobs, g_et, g_full, g_diag, g_cand1, g_clamp;
  int ux [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
  int uy [8] = '{0, -1, -1, -1, 0, 1, 1, 1};

  function automatic int clampv(int v);
    if (v > MVP_CLAMP) begin g_clamp++; return MVP_CLAMP; end
    if (v < -MVP_CLAMP) begin g_clamp++; return -MVP_CLAMP; end
    return v;
  endfunction

  // SAD of the w x h block at (x0, y0) inside the CU64 at motion (mx, my).
  function automatic int sad_rect(int x0, int y0, int w, int h, int mx, int my);
    int e;
    e = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) begin
        int d;
        d = cur_pix(CUX + x, CUY + y) - ref_pix(CUX + x + mx, CUY + y + my);
        e += (d < 0) ? -d : d;
      end
    return e;
  endfunction

  // One PU: AMVP between two candidates, then up to max_steps PEPZS steps.
  // jobs_per_pt: SAD jobs per search point (number of CU16s for 32x32 / 64x64).
  function automatic void search_pu(int shape, int blk, int part, int x0, int y0, int w, int h,
                                    int max_steps, int jobs_per_pt, int ckey);
    int cx0, cy0, cx1, cy1, s0, s1, bx, by, bs, cxc, cyc, pred, nimp;
    cands(ckey, cx0, cy0, cx1, cy1);
    cx0 = clampv(cx0); cy0 = clampv(cy0); cx1 = clampv(cx1); cy1 = clampv(cy1);
    s0 = sad_rect(x0, y0, w, h, cx0, cy0);
    s1 = sad_rect(x0, y0, w, h, cx1, cy1);
    if (jobs_per_pt == 1) g_jobs += 2;
    bx = cx0; by = cy0; bs = s0;
    if (s1 < s0) begin bx = cx1; by = cy1; bs = s1; g_cand1++; end
    cxc = bx; cyc = by; pred = 0; nimp = 0;
    for (int st = 1; st <= max_steps; st++) begin
      int np, smin, sdir, impr;
      np = (st == 1) ? 8 : 3;
      smin = 1 << 30; sdir = 0; impr = 0;
      for (int p = 0; p < np; p++) begin
        int d, dd, dstp, px, py, s;
        d = (st == 1) ? p : ((pred + p - 1) & 7);
        dstp = 1 << (st - 1);
        dd = ((d % 2) == 1 && st > 4) ? dstp / 2 : dstp;
        if ((d % 2) == 1 && st > 4) g_diag++;
        px = cxc + ux[d] * dd; py = cyc + uy[d] * dd;
        s = sad_rect(x0, y0, w, h, px, py);
        g_jobs += jobs_per_pt;
        if (s < bs) begin bs = s; bx = px; by = py; impr = 1; end
        if (s < smin) begin smin = s; sdir = d; end
      end
      pred = sdir;
      nimp = impr ? 0 : nimp + 1;
      if (nimp >= 3 || st == max_steps) begin
        if (nimp >= 3 && st < max_steps) g_et++;
        if (st == max_steps && max_steps == 5) g_full++;
        break;
      end
    end
    g_mvx.push_back(bx); g_mvy.push_back(by); g_sad.push_back(bs);
    g_shape.push_back(shape); g_blk.push_back(blk); g_part.push_back(part);
  endfunction

  int r_sad16 [16][5], r_sad8 [64][5], r_sad32 [4], r_sad64;

  function automatic void model_cu64();
    g_mvx.delete(); g_mvy.delete(); g_sad.delete(); g_shape.delete(); g_blk.delete(); g_part.delete();
    g_jobs = 0; g_et = 0;
    for (int c = 0; c < 16; c++) begin
      int ox, oy;
      ox = ((c & 4) ? 32 : 0) + ((c & 1) ? 16 : 0);
      oy = ((c & 8) ? 32 : 0) + ((c & 2) ? 16 : 0);
      search_pu(0, c, 0, ox, oy, 16, 16, 5, 1, pu_key(0, c, 0));
      search_pu(1, c, 0, ox, oy, 16, 8, 5, 1, pu_key(1, c, 0));
      search_pu(1, c, 1, ox, oy + 8, 16, 8, 5, 1, pu_key(1, c, 1));
      search_pu(2, c, 0, ox, oy, 8, 16, 5, 1, pu_key(2, c, 0));
      search_pu(2, c, 1, ox + 8, oy, 8, 16, 5, 1, pu_key(2, c, 1));
      g_jobs += 4;   // partial AMVP SADs for 64x64 and 32x32
      for (int s8 = 0; s8 < 4; s8++) begin
        int qx, qy, b;
        qx = ox + (s8 % 2) * 8; qy = oy + (s8 / 2) * 8; b = c * 4 + s8;
        search_pu(3, b, 0, qx, qy, 8, 8, 4, 1, pu_key(3, b, 0));
        search_pu(4, b, 0, qx, qy, 8, 4, 1, 1, pu_key(4, b, 0));
        search_pu(4, b, 1, qx, qy + 4, 8, 4, 1, 1, pu_key(4, b, 1));
        search_pu(5, b, 0, qx, qy, 4, 8, 1, 1, pu_key(5, b, 0));
        search_pu(5, b, 1, qx + 4, qy, 4, 8, 1, 1, pu_key(5, b, 1));
      end
    end
    search_pu(7, 0, 0, 0, 0, 64, 64, 1, 16, pu_key(7, 0, 0));
    for (int q = 0; q < 4; q++) search_pu(6, q, 0, (q % 2) * 32, (q / 2) * 32, 32, 32, 1, 4, pu_key(6, q, 0));
  endfunction

  // Partition cost from the model's results (SAD + 16 per PU, bottom-up).
  function automatic int model_cost(output int n_split16, output int n_whole16);
    int c8 [64], c16 [16], c32 [4], tot;
    n_split16 = 0; n_whole16 = 0;
    for (int i = 0; i < g_sad.size(); i++) begin
      case (g_shape[i])
        0: r_sad16[g_blk[i]][0] = g_sad[i];
        1: r_sad16[g_blk[i]][1 + g_part[i]] = g_sad[i];
        2: r_sad16[g_blk[i]][3 + g_part[i]] = g_sad[i];
        3: r_sad8[g_blk[i]][0] = g_sad[i];
        4: r_sad8[g_blk[i]][1 + g_part[i]] = g_sad[i];
        5: r_sad8[g_blk[i]][3 + g_part[i]] = g_sad[i];
        6: r_sad32[g_blk[i]] = g_sad[i];
        default: r_sad64 = g_sad[i];
      endcase
    end
    for (int i = 0; i < 64; i++) begin
      c8[i] = r_sad8[i][0] + 16;
      if (r_sad8[i][1] + r_sad8[i][2] + 32 < c8[i]) c8[i] = r_sad8[i][1] + r_sad8[i][2] + 32;
      if (r_sad8[i][3] + r_sad8[i][4] + 32 < c8[i]) c8[i] = r_sad8[i][3] + r_sad8[i][4] + 32;
    end
    for (int i = 0; i < 16; i++) begin
      int d;
      c16[i] = r_sad16[i][0] + 16;
      if (r_sad16[i][1] + r_sad16[i][2] + 32 < c16[i]) c16[i] = r_sad16[i][1] + r_sad16[i][2] + 32;
      if (r_sad16[i][3] + r_sad16[i][4] + 32 < c16[i]) c16[i] = r_sad16[i][3] + r_sad16[i][4] + 32;
      d = c8[4*i] + c8[4*i+1] + c8[4*i+2] + c8[4*i+3];
      if (d < c16[i]) begin c16[i] = d; n_split16++; end else n_whole16++;
    end
    tot = 0;
    for (int i = 0; i < 4; i++) begin
      int d;
      d = c16[4*i] + c16[4*i+1] + c16[4*i+2] + c16[4*i+3];
      c32[i] = (d < r_sad32[i] + 16) ? d : r_sad32[i] + 16;
      tot += c32[i];
    end
    return (tot < r_sad64 + 16) ? tot : r_sad64 + 16;
  endfunction

  // ------------------------------------------------------------ result checking
  int n_res;
  bit saw_part;
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      checks++;
      if (n_res >= g_sad.size()) begin
        failures++; $display("extra result");
      end else if (int'(res_pu.shape) != g_shape[n_res] || int'(res_pu.blk) != g_blk[n_res] ||
                   int'(res_pu.part) != g_part[n_res] || int'(res_mv.x) != g_mvx[n_res] ||
                   int'(res_mv.y) != g_mvy[n_res] || int'(res_sad) != g_sad[n_res]) begin
        failures++;
        if (failures < 10)
          $display("result %0d: pu %0d/%0d/%0d mv (%0d,%0d) sad %0d; model pu %0d/%0d/%0d mv (%0d,%0d) sad %0d",
                   n_res, res_pu.shape, res_pu.blk, res_pu.part, res_mv.x, res_mv.y, res_sad,
                   g_shape[n_res], g_blk[n_res], g_part[n_res], g_mvx[n_res], g_mvy[n_res], g_sad[n_res]);
      end
      n_res++;
    end
    if (rst_n && part_valid) saw_part = 1;
  end

  int tot_et, tot_fill_a, tot_fill_b, tot_hit_a, tot_hit_b, tot_split16, tot_whole16;

  task automatic run_cu(int x, int y);
    int cost, ns, nw, ncyc;
    CUX = x; CUY = y;
    cu_x = 13'(x); cu_y = 13'(y);
    model_cu64();
    cost = model_cost(ns, nw);
    tot_split16 += ns; tot_whole16 += nw;
    n_res = 0; saw_part = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    ncyc = 0;
    while (!done) begin @(posedge clk); ncyc++; end
    #1;
    // the engine's own cycle counter must agree with the cycles seen here (start to done)
    checks++;
    if (int'(stat_cycles) < ncyc - 3 || int'(stat_cycles) > ncyc + 1) begin
      failures++; $display("cycle counter %0d, measured %0d", stat_cycles, ncyc);
    end
    checks++;
    if (n_res != g_sad.size()) begin failures++; $display("got %0d results, model %0d", n_res, g_sad.size()); end
    checks++;
    if (int'(stat_jobs) != g_jobs) begin failures++; $display("SAD jobs %0d, model %0d", stat_jobs, g_jobs); end
    checks++;
    if (int'(stat_early_term) != g_et) begin failures++; $display("early terminations %0d, model %0d", stat_early_term, g_et); end
    checks++;
    if (!saw_part || int'(part_cost) != cost) begin failures++; $display("partition cost %0d, model %0d", part_cost, cost); end
    tot_et += int'(stat_early_term);
    tot_fill_a += int'(stat_fills_amvp); tot_fill_b += int'(stat_fills_pepzs);
    tot_hit_a += int'(stat_reads_amvp); tot_hit_b += int'(stat_reads_pepzs);
    $display("CU64 (%0d,%0d): %0d cycles (interlaced target 2222), %0d SAD jobs, %0d early terminations, off-chip words %0d+%0d, reads %0d+%0d, cost %0d",
             x, y, stat_cycles, stat_jobs, stat_early_term, stat_fills_amvp, stat_fills_pepzs,
             stat_reads_amvp, stat_reads_pepzs, part_cost);
  endtask

  initial begin
    cu_x = '0; cu_y = '0; CUX = 0; CUY = 0;
    g_full = 0; g_diag = 0; g_cand1 = 0; g_clamp = 0;
    tot_et = 0; tot_fill_a = 0; tot_fill_b = 0; tot_hit_a = 0; tot_hit_b = 0; tot_split16 = 0; tot_whole16 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_cu(1920, 1024);
    run_cu(640, 384);
    // every mechanism must have occurred
    checks++; if (tot_et == 0)      begin failures++; $display("no early termination"); end
    checks++; if (g_full == 0)      begin failures++; $display("no search ran all 5 steps"); end
    checks++; if (g_diag == 0)      begin failures++; $display("no half-distance diagonal point"); end
    checks++; if (g_cand1 == 0)     begin failures++; $display("second AMVP candidate never won"); end
    checks++; if (g_clamp == 0)     begin failures++; $display("no candidate clamped"); end
    checks++; if (tot_fill_a == 0 || tot_fill_b == 0) begin failures++; $display("a search buffer never loaded"); end
    checks++; if (tot_hit_a <= tot_fill_a / 3 || tot_hit_b == 0) begin failures++; $display("search buffer reuse missing"); end
    checks++; if (tot_split16 == 0 || tot_whole16 == 0) begin failures++; $display("CU16 split %0d / whole %0d", tot_split16, tot_whole16); end
    $display("mechanisms: early terminations %0d, full 5-step searches %0d, half diagonals %0d, second candidate wins %0d, clamps %0d, CU16 split %0d whole %0d",
             tot_et, g_full, g_diag, g_cand1, g_clamp, tot_split16, tot_whole16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
