// tb_class_engine: one classification engine on root level 3 of a 320x240
// frame (18x13 features), a 2x3 root filter and eight 2x2 parts on level 0.
// Feature storage and centroids are modelled by functions; rows_done grows
// with the root rows so candidates must wait for their part rows, and a
// monitor fails every part read of a row that is not yet complete.  Every
// detection is compared with a reference DPM score (root score + coarse-to-fine
// deformed part scores) and every expected detection must appear.  A second
// pass with parts off must report exactly the windows whose root score passes
// both thresholds.
`timescale 1ns/1ps
module tb_class_engine;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 320, IH = 240, FH = 2, FW = 3, RL = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  logic frame_start = 0, parts_on = 1, cfg_we = 0, f_valid = 0, f_ready, det_valid, cand_overflow, idle;
  logic [23:0] cfg_addr; logic [31:0] cfg_wdata;
  logic signed [P_W-1:0] f [DIM];
  fpos_t f_pos;
  logic [CX_W-1:0] rows_done [N_PART_LEV];
  fpos_t fs_pos [N_PARTS];
  logic [7:0] fs_idx [N_PARTS], dq_idx [N_PARTS];
  logic signed [P_W-1:0] dq_cent [N_PARTS][DIM];
  det_t det;
  logic [31:0] n_kept, n_pruned, n_parts_done, n_late;
  class_engine #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

  int C [N_CENT][DIM];
  wcell_t RW [FH*FW];
  wcell_t PWc [N_PARTS][4];
  int AXo [N_PARTS], AYo [N_PARTS], A [N_PARTS][4];
  int P [13][18][DIM];
  int PRUNE = 0, DET = 0, BIAS = 5, GAP = 50;
  int exp_det [string];
  int ndet = 0, nexp = 0;

  function automatic logic [7:0] idx_of(int x, int y);
    return 8'(x * 29 + y * 17 + 3);
  endfunction
  always_comb
    for (int q = 0; q < N_PARTS; q++) begin
      fs_idx[q] = idx_of(int'(fs_pos[q].x), int'(fs_pos[q].y));
      for (int d = 0; d < DIM; d++) dq_cent[q][d] = P_W'(C[dq_idx[q]][d]);
    end

  function automatic int sdot(int v [DIM], wcell_t c);
    int k, s;
    k = 0; s = 0;
    for (int d = 0; d < DIM; d++) if (c.flag[d] && k < N_MUL) begin s += v[d] * int'($signed(c.w[k])); k++; end
    return s;
  endfunction

  function automatic int root(int wx, int wy);
    int s;
    s = BIAS;
    for (int i = 0; i < FH; i++) for (int j = 0; j < FW; j++) s += sdot(P[wy+i][wx+j], RW[i*FW+j]);
    return s;
  endfunction

  function automatic int pscore(int q, int px, int py);
    int s;
    s = 0;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      int x, y;
      x = px + j; y = py + i;
      if (x >= 0 && y >= 0 && x < feat_len(IW, 0) && y < feat_len(IH, 0))
        s += sdot(C[idx_of(x, y)], PWc[q][i*2+j]);
    end
    return s;
  endfunction

  function automatic int dval(int q, int bx, int by, int dx, int dy);
    return pscore(q, bx + dx, by + dy) - (A[q][0]*dx*dx + A[q][1]*dx + A[q][2]*dy*dy + A[q][3]*dy);
  endfunction

  function automatic int part_best(int q, int wx, int wy);
    int bx, by, bv, cx, cy, kx, ky;
    bx = 2*wx + AXo[q]; by = 2*wy + AYo[q];
    bv = 0; kx = 0; ky = 0;
    for (int k = 0; k < 9; k++) begin
      int dx, dy;
      dx = (k % 3) * 2 - 2; dy = (k / 3) * 2 - 2;
      if (k == 0 || dval(q, bx, by, dx, dy) > bv) begin bv = dval(q, bx, by, dx, dy); kx = dx; ky = dy; end
    end
    cx = kx; cy = ky;
    for (int k = 0; k < 4; k++) begin
      int dx, dy;
      dx = cx + ((k == 0) ? -1 : (k == 1) ? 1 : 0);
      dy = cy + ((k == 2) ? -1 : (k == 3) ? 1 : 0);
      if (dx >= -2 && dx <= 2 && dy >= -2 && dy <= 2 && dval(q, bx, by, dx, dy) > bv) bv = dval(q, bx, by, dx, dy);
    end
    return bv;
  endfunction

  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic wcell(logic [3:0] region, int part, int idx, wcell_t c);
    logic [63:0] v;
    v = 64'(c);
    wr({region, 8'd0, 3'(part), 1'b0, 8'(idx)}, v[31:0]);
    wr({region, 8'd0, 3'(part), 1'b1, 8'(idx)}, v[63:32]);
  endtask

  task automatic run_pass(bit with_parts);
    parts_on = with_parts;
    for (int l = 0; l < N_PART_LEV; l++) rows_done[l] = '0;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int y = 0; y < 13; y++) begin
      for (int x = 0; x < 18; x++) begin
        @(negedge clk);
        f_valid = 1; f_pos = '{lev: LEV_W'(RL), x: CX_W'(x), y: CX_W'(y)};
        for (int d = 0; d < DIM; d++) f[d] = P_W'(P[y][x][d]);
        @(posedge clk); #1;
        while (!f_ready) begin @(posedge clk); #1; end
        f_valid = 0;
        repeat (GAP) @(negedge clk);
      end
      rows_done[0] = CX_W'((2*y + 4 > 28) ? 28 : 2*y + 4);
    end
    rows_done[0] = 28;
    repeat (20) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    cfg_addr = 0; cfg_wdata = 0; f_pos = '0;
    for (int d = 0; d < DIM; d++) f[d] = '0;
    for (int l = 0; l < N_PART_LEV; l++) rows_done[l] = '0;
    for (int c = 0; c < N_CENT; c++) for (int d = 0; d < DIM; d++) C[c][d] = int'($urandom % 512) - 256;
    for (int y = 0; y < 13; y++) for (int x = 0; x < 18; x++) for (int d = 0; d < DIM; d++)
      P[y][x][d] = int'($urandom % 512) - 256;
    repeat (3) @(posedge clk); rst_n = 1;
    wr({CFG_CE_REG, 12'd0, 8'd0}, 32'(FW << 5 | FH));
    wr({CFG_CE_REG, 12'd0, 8'd1}, 32'(BIAS));
    for (int c = 0; c < FH*FW; c++) begin
      RW[c].flag = DIM'($urandom); for (int m = 0; m < N_MUL; m++) RW[c].w[m] = WT_W'($urandom);
      wcell(CFG_ROOT_W, 0, c, RW[c]);
    end
    for (int q = 0; q < N_PARTS; q++) begin
      AXo[q] = $urandom % 4; AYo[q] = $urandom % 3;
      for (int k = 0; k < 4; k++) A[q][k] = (k % 2 == 0) ? int'($urandom % 40) : int'($urandom % 41) - 20;
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q)}, 32'h22);
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 1)}, 32'(AXo[q]));
      wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 2)}, 32'(AYo[q]));
      for (int k = 0; k < 4; k++) wr({CFG_CE_REG, 12'd0, 8'(16 + 8*q + 3 + k)}, 32'(A[q][k]));
      for (int c = 0; c < 4; c++) begin
        PWc[q][c].flag = DIM'($urandom); for (int m = 0; m < N_MUL; m++) PWc[q][c].w[m] = WT_W'($urandom);
        wcell(CFG_PART_W, q, c, PWc[q][c]);
      end
    end
    // thresholds: keep about 30% of the windows, detect about half of those
    begin
      int s [$], t [$], best;
      for (int wy = 0; wy + FH <= 13; wy++) for (int wx = 0; wx + FW <= 18; wx++) s.push_back(root(wx, wy));
      best = 1 << 30;
      foreach (s[i]) begin
        int n;
        n = 0;
        foreach (s[j]) if (s[j] > s[i]) n++;
        if (n >= s.size() * 3 / 10 && s[i] < best + 0 && n <= s.size() * 4 / 10) best = s[i];
      end
      PRUNE = best;
      for (int wy = 0; wy + FH <= 13; wy++) for (int wx = 0; wx + FW <= 18; wx++)
        if (root(wx, wy) > PRUNE) begin
          int v;
          v = root(wx, wy);
          for (int q = 0; q < N_PARTS; q++) v += part_best(q, wx, wy);
          t.push_back(v);
        end
      DET = t[0];
      foreach (t[i]) begin
        int n;
        n = 0;
        foreach (t[j]) if (t[j] > t[i]) n++;
        if (n == t.size() / 2) DET = t[i];
      end
    end
    wr({CFG_CE_REG, 12'd0, 8'd2}, 32'(PRUNE));
    wr({CFG_CE_REG, 12'd0, 8'd3}, 32'(DET));
    // expected detections with parts
    for (int wy = 0; wy + FH <= 13; wy++) for (int wx = 0; wx + FW <= 18; wx++) begin
      int r, t;
      r = root(wx, wy);
      if (r > PRUNE) begin
        t = r;
        for (int q = 0; q < N_PARTS; q++) t += part_best(q, wx, wy);
        if (t > DET) begin exp_det[$sformatf("%0d_%0d_%0d", wx, wy, t)] = 1; nexp++; end
      end
    end
    run_pass(1);
    `CHECK(exp_det.num() == 0, $sformatf("%0d expected detections missing", exp_det.num()))
    `CHECK(nexp > 0 && ndet == nexp, $sformatf("detections %0d expected %0d", ndet, nexp))
    `CHECK(n_parts_done == n_kept && n_kept > 0, "every candidate went through the parts")
    `CHECK(n_kept + n_pruned == 32'((13 - FH + 1) * (18 - FW + 1)), "all windows scored")
    `CHECK(!cand_overflow && n_late == 0, "no overflow, no late rows")
    `CHECK(n_reads > 0 && n_early == 0, $sformatf("%0d of %0d part reads before their row was stored", n_early, n_reads))
    $display("kept %0d pruned %0d parts %0d late %0d overflow %0d", n_kept, n_pruned, n_parts_done, n_late, cand_overflow);
    // root-only pass
    exp_det.delete();
    ndet = 0; nexp = 0;
    for (int wy = 0; wy + FH <= 13; wy++) for (int wx = 0; wx + FW <= 18; wx++) begin
      int r;
      r = root(wx, wy);
      if (r > PRUNE && r > DET) begin exp_det[$sformatf("%0d_%0d_%0d", wx, wy, r)] = 1; nexp++; end
    end
    begin
      logic [31:0] pd;
      pd = n_parts_done;
      run_pass(0);
      `CHECK(n_parts_done == 0, "parts idle when switched off")
    end
    `CHECK(exp_det.num() == 0 && ndet == nexp, $sformatf("root-only detections %0d expected %0d", ndet, nexp))
    `FINISH
  end

  // every stored row a part classifier reads must already be complete
  int n_reads = 0, n_early = 0;
  for (genvar q = 0; q < N_PARTS; q++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.g_part[q].u_part.busy && parts_on) begin
      n_reads++;
      if (int'(fs_pos[q].y) >= int'(rows_done[0])) begin
        n_early++;
        if (n_early <= 5) $display("part %0d read row %0d with %0d rows done", q, fs_pos[q].y, rows_done[0]);
      end
    end
  end

  always @(posedge clk) if (rst_n && det_valid) begin
    string k;
    logic signed [SCORE_W-1:0] sc;
    sc = det.score;
    k = $sformatf("%0d_%0d_%0d", det.x, det.y, int'(sc));
    ndet++;
    `CHECK(exp_det.exists(k), $sformatf("unexpected detection %s", k))
    if (exp_det.exists(k)) exp_det.delete(k);
  end
endmodule
