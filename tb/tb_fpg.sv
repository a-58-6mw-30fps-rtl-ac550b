// tb_fpg: a 320x240 textured frame through the whole feature pyramid
// generation with the basis set to 256*I (so P = H/2).  Each level with at least
// 3x3 cells must deliver exactly (W/c-2) x (H/c-2) features in raster order,
// every value must lie in the HOG range, the three outputs must be stalled at
// random, several outputs must be valid in the same cycle at least once, and
// frame_done must come after the last feature.
`timescale 1ns/1ps
module tb_fpg;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 320, IH = 240;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  logic pix_valid = 0, pix_busy, s_we = 0, frame_done, overflow;
  logic [7:0] pix, s_addr;
  logic signed [S_W-1:0] s_data;
  logic [2:0] f_valid, f_ready;
  logic signed [P_W-1:0] f [3][DIM];
  fpos_t f_pos [3];
  fpg #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

  int cnt [N_LEV], nx [N_LEV], ny [N_LEV];
  int multi = 0, done_seen = 0, after_done = 0;

  initial begin
    for (int l = 0; l < N_LEV; l++) begin cnt[l] = 0; nx[l] = 0; ny[l] = 0; end
    pix = 0; s_addr = 0; s_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < DIM; k++) for (int d = 0; d < DIM; d++) begin
      @(negedge clk); s_we = 1; s_addr = 8'(k*DIM + d); s_data = (k == d) ? 10'sd256 : '0;
    end
    @(negedge clk); s_we = 0;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        @(negedge clk);
        while (pix_busy) @(negedge clk);
        pix_valid = 1;
        pix = 8'(((x / 9) % 2 == (y / 13) % 2) ? 60 + (x * y) % 31 : 180 + (x + y) % 17);
      end
    @(negedge clk); pix_valid = 0;
    while (!done_seen) @(posedge clk);
    repeat (50) @(posedge clk);
    for (int l = 0; l < N_LEV; l++) begin
      int c, e;
      c = cell_size(l);
      e = (IW / c >= 3 && IH / c >= 3) ? (IW / c - 2) * (IH / c - 2) : 0;
      `CHECK(cnt[l] == e, $sformatf("level %0d: %0d features, want %0d", l, cnt[l], e))
    end
    `CHECK(multi > 0, "outputs valid together")
    `CHECK(after_done == 0, "nothing after frame_done")
    `CHECK(!overflow, "no overflow")
    `FINISH
  end

  always @(negedge clk) f_ready <= 3'($urandom);
  always @(posedge clk) if (rst_n) begin
    if (frame_done) done_seen = 1;
    if ($countones(f_valid) > 1) multi++;
    for (int e = 0; e < 3; e++) if (f_valid[e] && f_ready[e]) begin
      int l;
      bit inr;
      l = int'(f_pos[e].lev);
      if (done_seen) after_done++;
      cnt[l]++;
      `CHECK(int'(f_pos[e].x) == nx[l] && int'(f_pos[e].y) == ny[l],
             $sformatf("level %0d order: got (%0d,%0d) want (%0d,%0d)", l, f_pos[e].x, f_pos[e].y, nx[l], ny[l]))
      if (nx[l] == IW / cell_size(l) - 3) begin nx[l] = 0; ny[l]++; end else nx[l]++;
      inr = 1;
      for (int d = 0; d < DIM; d++) if (f[e][d] < 0 || f[e][d] > 511) inr = 0;
      `CHECK(inr, "value range")
    end
  end
endmodule
