// tb_hist_norm_engine: an engine serving levels {0, 2} of a 64x56 frame gets
// random cell segments in pixel-row order; the expected 13-D features are
// computed from the summed cell histograms with the L1 block normalisation
// (reciprocal 2^37/N, product >> 25, clip 819, /4 and /8), and every feature of
// both levels must appear exactly once with the right value, under random
// back-pressure.
`timescale 1ns/1ps
module tb_hist_norm_engine;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 64, IH = 56;
  localparam int LV [2] = '{0, 2};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  logic in_valid = 0, in_ready, feat_valid, feat_ready = 0, busy, rq_overflow;
  ph_t in_ph;
  logic [HOG_W-1:0] feat [DIM];
  fpos_t feat_pos;
  hist_norm_engine #(.IMG_W(IW), .IMG_H(IH), .N_LV(2), .LEVS(LV)) dut (.*);

  longint H [2][8][8][N_BIN];
  int got [2][8][8];

  function automatic longint en(int li, int cy, int cx);
    longint s;
    s = 0;
    for (int b = 0; b < N_BIN; b++) s += H[li][cy][cx][b];
    return s;
  endfunction

  function automatic int expf(int li, int fx, int fy, int d);
    int cx, cy, n [N_BIN][4], s;
    cx = fx + 1; cy = fy + 1;
    for (int k = 0; k < 4; k++) begin
      int oy, ox;
      longint N, r;
      oy = cy - 1 + k / 2; ox = cx - 1 + k % 2;
      N = en(li, oy, ox) + en(li, oy, ox + 1) + en(li, oy + 1, ox) + en(li, oy + 1, ox + 1) + 1;
      r = (longint'(1) << 37) / N;
      for (int o = 0; o < N_BIN; o++) begin
        longint v;
        v = (H[li][cy][cx][o] * r) >> 25;
        n[o][k] = (v > 819) ? 819 : int'(v);
      end
    end
    s = 0;
    if (d < N_BIN) begin
      for (int k = 0; k < 4; k++) s += n[d][k];
      return s / 4;
    end
    for (int o = 0; o < N_BIN; o++) s += n[o][d - N_BIN];
    return s / 8;
  endfunction

  initial begin
    in_ph = '0;
    for (int li = 0; li < 2; li++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      got[li][y][x] = 0;
      for (int b = 0; b < N_BIN; b++) H[li][y][x][b] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int y = 0; y < IH; y++)
      for (int li = 0; li < 2; li++) begin
        int c;
        c = cell_size(LV[li]);
        if (y / c < IH / c)
          for (int cx = 0; cx < IW / c; cx++) begin
            @(negedge clk);
            in_valid = 1;
            in_ph.lev = LEV_W'(LV[li]); in_ph.cx = CX_W'(cx); in_ph.cy = CX_W'(y / c);
            in_ph.first_row = (y % c == 0); in_ph.last_row = (y % c == c - 1);
            for (int b = 0; b < N_BIN; b++) begin
              int v;
              v = (($urandom % 4) == 0) ? 0 : int'($urandom % 3000);
              in_ph.hbin[b] = 16'(v);
              H[li][y / c][cx][b] += v;
            end
            @(negedge clk); in_valid = 0;
            repeat ($urandom % 30) @(negedge clk);
          end
      end
    in_valid = 0;
    while (busy || feat_valid) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int li = 0; li < 2; li++) begin
      int c, miss;
      c = cell_size(LV[li]); miss = 0;
      for (int y = 0; y < IH / c - 2; y++) for (int x = 0; x < IW / c - 2; x++) if (got[li][y][x] != 1) miss++;
      `CHECK(miss == 0, $sformatf("level %0d: %0d features missing or repeated", LV[li], miss))
    end
    `CHECK(!rq_overflow, "no request overflow")
    `FINISH
  end

  always @(negedge clk) feat_ready <= ($urandom % 3) != 0;

  always @(posedge clk) if (rst_n && feat_valid && feat_ready) begin
    int li;
    bit ok;
    li = (int'(feat_pos.lev) == 0) ? 0 : 1;
    got[li][feat_pos.y][feat_pos.x]++;
    ok = 1;
    for (int d = 0; d < DIM; d++) if (int'(feat[d]) != expf(li, int'(feat_pos.x), int'(feat_pos.y), d)) ok = 0;
    `CHECK(ok, $sformatf("feature l%0d (%0d,%0d) value", feat_pos.lev, feat_pos.x, feat_pos.y))
  end
endmodule
