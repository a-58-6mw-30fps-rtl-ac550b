// Shared body of the dpm_top end-to-end testbenches.  The including module
// declares IW, IH, N_FRAMES and instantiates dpm_top as "dut" on the signals
// declared here before the include.
//
// Stimulus: random basis, centroids, root and part weights, a textured frame.
// Frame 0 runs with every window pruned and only collects the root-level
// features and the stored VQ indices, from which the testbench picks a pruning
// threshold (about 12% kept: the design targets at least 80% pruning) and detection thresholds (about half of the
// kept windows).  Frame 1 (same image) runs engine 0 with its parts and
// engine 1 on root scores alone; frame 2 (the same image again, so the
// thresholds stay inside the design's pruning range) runs engine 0 only,
// with engine 1's clock gated off.  In every frame the testbench observes the
// features leaving the pyramid and the VQ indices written to the feature
// storage and recomputes each engine's detections exactly: root score, the
// pruning decision, the coarse-to-fine search of each part over the
// de-quantised stored features and the final threshold.  Every mechanism is
// counted and must have happened at least once.

  localparam int RW_ = IW / 16 + 1, RH_ = IH / 16 + 1;   // root level grid bound
  localparam int QW_ = IW / 8 + 1,  QH_ = IH / 8 + 1;    // part level grid bound
  localparam int FH = 2, FW = 3, BIAS = 3;

  // loop bounds held in variables keep the reference loops from being unrolled
  int ND = DIM, NQ = N_PARTS, NM = N_MUL, N2 = 2, N9 = 9, N4 = 4, NFH = FH, NFW = FW;
  int C [N_CENT][DIM];
  wcell_t RWc [2][FH*FW];
  wcell_t PWc [N_PARTS][4];
  int AXo [N_PARTS], AYo [N_PARTS], A [N_PARTS][4];
  int P [N_LEV][RH_][RW_][DIM];
  int IDX [N_PART_LEV][QH_][QW_];
  int PRUNE, PRUNE1, DET0, DET1;
  int exp_det [2][string];
  int nexp [2], ndet [2];
  string seen [2][$];
  int frame = 0;
  // mechanism counters
  int m_vq_multi = 0, m_fifo_multi = 0, m_frame_done = 0, m_ce1_clk = 0, m_parts1_clk = 0;
  int m_root_feats = 0, m_vq_feats = 0, m_root_only = 0, m_dpm_det = 0;

  function automatic int sdot(int v [DIM], wcell_t c);
    int k, s;
    k = 0; s = 0;
    for (int d = 0; d < ND; d++) if (c.flag[d] && k < NM) begin s += v[d] * int'($signed(c.w[k])); k++; end
    return s;
  endfunction

  function automatic int root(int ce, int l, int wx, int wy);
    int s;
    s = BIAS;
    for (int i = 0; i < NFH; i++) for (int j = 0; j < NFW; j++) s += sdot(P[l][wy+i][wx+j], RWc[ce][i*FW+j]);
    return s;
  endfunction

  function automatic int pscore(int q, int pl, int px, int py);
    int s;
    s = 0;
    for (int i = 0; i < N2; i++) for (int j = 0; j < N2; j++) begin
      int x, y;
      x = px + j; y = py + i;
      if (x >= 0 && y >= 0 && x < feat_len(IW, pl) && y < feat_len(IH, pl))
        s += sdot(C[IDX[pl][y][x]], PWc[q][i*2+j]);
    end
    return s;
  endfunction

  function automatic int dval(int q, int pl, int bx, int by, int dx, int dy);
    return pscore(q, pl, bx + dx, by + dy) - (A[q][0]*dx*dx + A[q][1]*dx + A[q][2]*dy*dy + A[q][3]*dy);
  endfunction

  function automatic int dpm(int l, int wx, int wy);
    int t;
    t = root(0, l, wx, wy);
    for (int q = 0; q < NQ; q++) begin
      int bx, by, bv, cx, cy, v;
      bx = 2*wx + AXo[q]; by = 2*wy + AYo[q];
      bv = 0; cx = 0; cy = 0;
      for (int k = 0; k < N9; k++) begin
        int dx, dy;
        dx = (k % 3) * 2 - 2; dy = (k / 3) * 2 - 2;
        v = dval(q, l - ROOT_LEV0, bx, by, dx, dy);
        if (k == 0 || v > bv) begin bv = v; cx = dx; cy = dy; end
      end
      for (int k = 0; k < N4; k++) begin
        int dx, dy;
        dx = cx + ((k == 0) ? -1 : (k == 1) ? 1 : 0);
        dy = cy + ((k == 2) ? -1 : (k == 3) ? 1 : 0);
        if (dx >= -2 && dx <= 2 && dy >= -2 && dy <= 2) begin
          v = dval(q, l - ROOT_LEV0, bx, by, dx, dy);
          if (v > bv) bv = v;
        end
      end
      t += bv;
    end
    return t;
  endfunction

  // value v such that about frac_pct % of the list is greater than v
  function automatic int pick(int s [$], int frac_pct);
    longint lo, hi, mid;
    lo = -(1 << 26); hi = 1 << 26;
    while (hi - lo > 1) begin
      int n;
      mid = (lo + hi) / 2;
      n = 0;
      foreach (s[i]) if (s[i] > mid) n++;
      if (n * 100 > frac_pct * s.size()) lo = mid; else hi = mid;
    end
    return int'(hi);
  endfunction

  function automatic string key(int l, int x, int y, int s);
    return $sformatf("%0d_%0d_%0d_%0d", l, x, y, s);
  endfunction

  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic wcell(logic [3:0] region, int ce, int part, int idx, wcell_t c);
    logic [63:0] v;
    v = 64'(c);
    wr({region, 1'(ce), 7'd0, 3'(part), 1'b0, 8'(idx)}, v[31:0]);
    wr({region, 1'(ce), 7'd0, 3'(part), 1'b1, 8'(idx)}, v[63:32]);
  endtask
  task automatic set_thr(int ce, int pr, int dt);
    wr({CFG_CE_REG, 1'(ce), 11'd0, 8'd2}, 32'(pr));
    wr({CFG_CE_REG, 1'(ce), 11'd0, 8'd3}, 32'(dt));
  endtask

  function automatic logic [7:0] pixel(int x, int y);
    return 8'(((x / 11) % 2 == (y / 17) % 2) ? 50 + (x * y) % 37 : 170 + (x + 3 * y) % 23);
  endfunction

  task automatic send_frame();
    for (int c = 0; c < 2; c++) seen[c].delete();
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        @(negedge clk);
        pix_valid = 1; pix = pixel(x, y);
        @(posedge clk); #1;
        while (!pix_ready) begin @(posedge clk); #1; end
      end
    @(negedge clk); pix_valid = 0;
    while (!frame_done) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  // expected detections from the features observed during the last frame
  task automatic expect_frame(bit ce1_on);
    for (int c = 0; c < 2; c++) begin exp_det[c].delete(); nexp[c] = 0; ndet[c] = seen[c].size(); end
    for (int l = ROOT_LEV0; l < N_LEV; l++)
      for (int wy = 0; wy + FH <= feat_len(IH, l); wy++)
        for (int wx = 0; wx + FW <= feat_len(IW, l); wx++) begin
          int r0, r1, t;
          r0 = root(0, l, wx, wy);
          if (r0 > PRUNE) begin
            t = dpm(l, wx, wy);
            if (t > DET0) begin exp_det[0][key(l, wx, wy, t)] = 1; nexp[0]++; end
          end
          r1 = root(1, l, wx, wy);
          if (ce1_on && r1 > PRUNE1 && r1 > DET1) begin exp_det[1][key(l, wx, wy, r1)] = 1; nexp[1]++; end
        end
    for (int c = 0; c < 2; c++)
      foreach (seen[c][i]) begin
        `CHECK(exp_det[c].exists(seen[c][i]), $sformatf("engine %0d: unexpected detection %s", c, seen[c][i]))
        if (exp_det[c].exists(seen[c][i])) exp_det[c].delete(seen[c][i]);
      end
  endtask

  initial begin
    pix = 0; cfg_addr = 0; cfg_wdata = 0; det_en = 2'b11; parts_en = 2'b01;
    for (int l = 0; l < N_PART_LEV; l++) for (int y = 0; y < QH_; y++) for (int x = 0; x < QW_; x++) IDX[l][y][x] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // basis: small random projection
    for (int k = 0; k < DIM; k++) for (int d = 0; d < DIM; d++)
      wr({CFG_BASIS, 12'd0, 8'(k*DIM + d)}, 32'(int'($urandom % 81) - 40));
    for (int c = 0; c < N_CENT; c++) for (int d = 0; d < DIM; d++) begin
      C[c][d] = int'($urandom % 801) - 400;
      wr({CFG_CENT, 8'd0, 8'(c), 4'(d)}, 32'(C[c][d]));
    end
    for (int ce = 0; ce < 2; ce++) begin
      wr({CFG_CE_REG, 1'(ce), 11'd0, 8'd0}, 32'(FW << 5 | FH));
      wr({CFG_CE_REG, 1'(ce), 11'd0, 8'd1}, 32'(BIAS));
      set_thr(ce, (1 << 25) - 1, (1 << 25) - 1);
      for (int c = 0; c < FH*FW; c++) begin
        RWc[ce][c].flag = DIM'($urandom);
        for (int m = 0; m < N_MUL; m++) RWc[ce][c].w[m] = WT_W'($urandom);
        wcell(CFG_ROOT_W, ce, 0, c, RWc[ce][c]);
      end
    end
    for (int q = 0; q < N_PARTS; q++) begin
      AXo[q] = $urandom % 4; AYo[q] = $urandom % 3;
      for (int k = 0; k < 4; k++) A[q][k] = (k % 2 == 0) ? int'($urandom % 30) : int'($urandom % 31) - 15;
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q)}, 32'h22);
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 1)}, 32'(AXo[q]));
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 2)}, 32'(AYo[q]));
      for (int k = 0; k < 4; k++) wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 3 + k)}, 32'(A[q][k]));
      for (int c = 0; c < 4; c++) begin
        PWc[q][c].flag = DIM'($urandom);
        for (int m = 0; m < N_MUL; m++) PWc[q][c].w[m] = WT_W'($urandom);
        wcell(CFG_PART_W, 0, q, c, PWc[q][c]);
      end
    end

    // frame 0: calibration, everything pruned
    PRUNE = (1 << 25) - 1; DET0 = PRUNE; DET1 = PRUNE;
    send_frame();
    `CHECK(m_frame_done == 1, "frame 0 done")
    `CHECK(dut.n_kept[0] == 0 && dut.n_pruned[0] > 0, "frame 0 all pruned")
    begin
      int s [$], s1 [$], t [$], u [$];
      for (int l = ROOT_LEV0; l < N_LEV; l++)
        for (int wy = 0; wy + FH <= feat_len(IH, l); wy++)
          for (int wx = 0; wx + FW <= feat_len(IW, l); wx++) begin
            s.push_back(root(0, l, wx, wy));
            s1.push_back(root(1, l, wx, wy));
          end
      PRUNE = pick(s, 12);
      PRUNE1 = pick(s1, 12);
      for (int l = ROOT_LEV0; l < N_LEV; l++)
        for (int wy = 0; wy + FH <= feat_len(IH, l); wy++)
          for (int wx = 0; wx + FW <= feat_len(IW, l); wx++) begin
            if (root(0, l, wx, wy) > PRUNE) t.push_back(dpm(l, wx, wy));
            if (root(1, l, wx, wy) > PRUNE1) u.push_back(root(1, l, wx, wy));
          end
      DET0 = pick(t, 50);
      DET1 = pick(u, 50);
      $display("windows %0d prune %0d det0 %0d det1 %0d", s.size(), PRUNE, DET0, DET1);
    end
    set_thr(0, PRUNE, DET0);
    set_thr(1, PRUNE1, DET1);

    // frame 1: same image, engine 0 with parts, engine 1 root only
    frame = 1;
    send_frame();
    expect_frame(1);
    for (int c = 0; c < 2; c++) begin
      `CHECK(exp_det[c].num() == 0, $sformatf("frame 1 engine %0d: %0d detections missing", c, exp_det[c].num()))
      `CHECK(ndet[c] == nexp[c] && nexp[c] > 0, $sformatf("frame 1 engine %0d: %0d detections, want %0d", c, ndet[c], nexp[c]))
      `CHECK(dut.n_kept[c] > 0 && dut.n_pruned[c] > 0, $sformatf("engine %0d kept %0d pruned %0d", c, dut.n_kept[c], dut.n_pruned[c]))
    end
    `CHECK(dut.n_parts_done[0] == dut.n_kept[0], "engine 0 ran the parts of every candidate")
    `CHECK(dut.n_parts_done[1] == 0 && m_parts1_clk == 0, "engine 1 parts section gated")
    `CHECK(dut.n_late[0] == 0, "no candidate lost its part rows")
    $display("frame 1: kept %0d/%0d pruned %0d/%0d det %0d/%0d", dut.n_kept[0], dut.n_kept[1],
             dut.n_pruned[0], dut.n_pruned[1], ndet[0], ndet[1]);

    // frame 2: another image, engine 1 switched off
    if (N_FRAMES > 2) begin
      logic [31:0] k1, p1;
      k1 = dut.n_kept[1]; p1 = dut.n_pruned[1];
      frame = 2;
      @(negedge clk); det_en = 2'b01;
      @(posedge clk); #1; m_ce1_clk = 0;
      send_frame();
      expect_frame(0);
      `CHECK(exp_det[0].num() == 0 && ndet[0] == nexp[0], $sformatf("frame 2: %0d detections, want %0d", ndet[0], nexp[0]))
      `CHECK(ndet[1] == 0, "engine 1 silent")
      `CHECK(m_ce1_clk == 0, $sformatf("engine 1 clock stopped (%0d edges)", m_ce1_clk))
      `CHECK(dut.n_kept[1] == k1 && dut.n_pruned[1] == p1, "engine 1 counters frozen")
      `CHECK(dut.n_kept[0] > 0 && dut.n_pruned[0] > 0, "frame 2 kept and pruned")
      $display("frame 2: kept %0d pruned %0d det %0d", dut.n_kept[0], dut.n_pruned[0], ndet[0]);
    end
    `CHECK(!overflow, $sformatf("no overflow (fpg %0d engines %b)", dut.fpg_ovf, dut.ce_ovf))
    $display("late %0d", dut.n_late[0]);
    // mechanisms
    `CHECK(m_root_feats > 0, "root features delivered")
    `CHECK(m_vq_feats > 0, "features quantised")
    `CHECK(m_vq_multi > 0, "VQ batch with more than one feature")
    `CHECK(m_fifo_multi > 0, "FPG queue written by several levels in one cycle")
    `CHECK(m_frame_done == N_FRAMES, "frame_done per frame")
    `CHECK(m_dpm_det > 0, "DPM detections")
    `CHECK(m_root_only > 0, "root-only detections")
    $display("mechanisms: root feats %0d vq feats %0d vq multi %0d fifo multi %0d frames %0d dpm det %0d root-only det %0d",
             m_root_feats, m_vq_feats, m_vq_multi, m_fifo_multi, m_frame_done, m_dpm_det, m_root_only);
    `FINISH
  end

  // observers
  always @(posedge clk) if (rst_n) begin
    if (dut.root_fire) begin
      fpos_t fp;
      fp = dut.f_pos[dut.g];
      for (int d = 0; d < DIM; d++) P[fp.lev][fp.y][fp.x][d] = int'(dut.f[dut.g][d]);
      m_root_feats++;
    end
    if ($countones(dut.need_vq & dut.vq_ready) > 1) m_vq_multi++;
    for (int e = 0; e < 3; e++) if (dut.q_valid[e]) begin
      IDX[dut.q_pos[e].lev][dut.q_pos[e].y][dut.q_pos[e].x] = int'(dut.q[e]);
      m_vq_feats++;
    end
    if ($countones(dut.u_fpg.v0) > 1 || $countones(dut.u_fpg.v2) > 1) m_fifo_multi++;
    if (frame_done) m_frame_done++;
    for (int c = 0; c < 2; c++) if (det_valid[c]) begin
      string k;
      logic signed [SCORE_W-1:0] sc;
      sc = det[c].score;
      k = key(int'(det[c].lev), int'(det[c].x), int'(det[c].y), int'(sc));
      if (frame > 0) begin
        if (c == 0) m_dpm_det++; else m_root_only++;
      end
      seen[c].push_back(k);
    end
  end
  always @(posedge dut.g_ce[1].cclk) if (rst_n) m_ce1_clk++;
  always @(posedge dut.g_ce[1].u_ce.pclk) if (rst_n) m_parts1_clk++;
