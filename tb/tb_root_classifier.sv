// tb_root_classifier: streams random projected features of two root levels
// (rows of the two levels interleaved, each level in raster order) through a
// 3x5 root filter with random sparse weights; every emitted window score is
// compared with a direct dot-product reference, every valid window must be
// emitted exactly once, and a feature must take ceil(15/4) = 4 cycles.
`timescale 1ns/1ps
module tb_root_classifier;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 320, IH = 240;
  localparam int FH = 3, FW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic w_we = 0; logic [7:0] w_addr; wcell_t w_data;
  logic [4:0] fh, fw; logic signed [SCORE_W-1:0] bias;
  logic in_valid = 0, in_ready, rs_valid;
  logic signed [P_W-1:0] p [DIM];
  fpos_t pos, rs_pos;
  logic signed [SCORE_W-1:0] rs;
  root_classifier #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

  wcell_t W [FH*FW];
  int P [2][20][20][DIM];
  int seen [2][20][20];
  int nemit = 0;

  function automatic int dot(int l, int x, int y, wcell_t c);
    int k, s;
    k = 0; s = 0;
    for (int d = 0; d < DIM; d++)
      if (c.flag[d] && k < N_MUL) begin s += P[l][y][x][d] * int'($signed(c.w[k])); k++; end
    return s;
  endfunction

  function automatic int ref_score(int l, int wx, int wy);
    int s;
    s = int'(bias);
    for (int i = 0; i < FH; i++)
      for (int j = 0; j < FW; j++) s += dot(l, wx + j, wy + i, W[i*FW + j]);
    return s;
  endfunction

  int LV [2] = '{3, 5};

  initial begin
    fh = FH; fw = FW; bias = -17; w_addr = '0; w_data = '0; pos = '0;
    for (int d = 0; d < DIM; d++) p[d] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < FH*FW; c++) begin
      @(negedge clk);
      W[c].flag = DIM'($urandom);
      for (int m = 0; m < N_MUL; m++) W[c].w[m] = WT_W'($urandom);
      w_we = 1; w_addr = 8'(c); w_data = W[c];
    end
    @(negedge clk); w_we = 0;
    for (int l = 0; l < 2; l++)
      for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++) begin
        seen[l][y][x] = 0;
        for (int d = 0; d < DIM; d++) P[l][y][x][d] = int'($urandom % 2048) - 1024;
      end
    for (int y = 0; y < 20; y++)
      for (int l = 0; l < 2; l++) begin
        int Wl, Hl;
        Wl = feat_len(IW, LV[l]); Hl = feat_len(IH, LV[l]);
        if (y < Hl)
          for (int x = 0; x < Wl; x++) begin
            int t0;
            @(negedge clk);
            pos = '{lev: LEV_W'(LV[l]), x: CX_W'(x), y: CX_W'(y)};
            for (int d = 0; d < DIM; d++) p[d] = P_W'(P[l][y][x][d]);
            in_valid = 1;
            @(posedge clk); #1;
            in_valid = 0;
            t0 = 0;
            while (!in_ready) begin @(posedge clk); #1; t0++; end
            `CHECK(t0 == 4, $sformatf("cycles per feature %0d", t0))
          end
      end
    repeat (10) @(posedge clk);
    for (int l = 0; l < 2; l++) begin
      int Wl, Hl, missing;
      Wl = feat_len(IW, LV[l]); Hl = feat_len(IH, LV[l]);
      missing = 0;
      for (int y = 0; y + FH <= Hl; y++)
        for (int x = 0; x + FW <= Wl; x++) if (seen[l][y][x] != 1) missing++;
      `CHECK(missing == 0, $sformatf("level %0d: %0d windows not emitted once", LV[l], missing))
    end
    `CHECK(nemit > 0, "scores emitted")
    `FINISH
  end

  always @(posedge clk) if (rst_n && rs_valid) begin
    int l, r;
    l = (int'(rs_pos.lev) == 3) ? 0 : 1;
    r = ref_score(l, int'(rs_pos.x), int'(rs_pos.y));
    nemit++;
    seen[l][rs_pos.y][rs_pos.x]++;
    `CHECK(int'(rs) == r, $sformatf("window l%0d (%0d,%0d) score %0d ref %0d", rs_pos.lev, rs_pos.x, rs_pos.y, rs, r))
  end
endmodule
