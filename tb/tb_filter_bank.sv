// tb_filter_bank: a 120x80 textured frame is streamed with random pixel gaps;
// every partial histogram of every level is compared with a reference computed
// from the whole frame (same kernels and bin rule), the number of segments per
// level is checked, and frame_end must follow the flush of 2*W+2 cycles.
`timescale 1ns/1ps
module tb_filter_bank;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 120, IH = 80;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic pix_valid = 0, busy, frame_end;
  logic [7:0] pix;
  logic [N_LEV-1:0] ph_valid;
  ph_t ph [N_LEV];
  filter_bank #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

  int img [IH][IW];
  int LW [N_LEV] = '{0, 14, 14, 6, 6, 6, 2, 2, 2, 2, 2, 2};
  int COS [8] = '{241, 196, 128, 44, -44, -128, -196, -241};
  int SIN [8] = '{88, 165, 222, 252, 252, 222, 165, 88};
  int cnt [N_LEV];
  bit ended = 0;

  function automatic int sm(int l, int y, int x);
    int acc, w, sh;
    w = LW[l];
    if (w == 0) return img[y][x];
    acc = 0;
    for (int a = -1; a <= 1; a++) for (int b = -1; b <= 1; b++)
      acc += ((a == 0) ? w : 1) * ((b == 0) ? w : 1) * img[y+a][x+b];
    sh = (w == 14) ? 8 : (w == 6) ? 6 : 4;
    return acc >> sh;
  endfunction

  // bin and magnitude of pixel (x, y) at level l; magnitude 0 at the border
  function automatic void grad(int l, int x, int y, output int bin, output int mag);
    int gx, gy;
    bin = 0; mag = 0;
    if (x < 2 || y < 2 || x > IW - 3 || y > IH - 3) return;
    gx = sm(l, y, x + 1) - sm(l, y, x - 1);
    gy = sm(l, y + 1, x) - sm(l, y - 1, x);
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    if (gy < 0 || (gy == 0 && gx < 0)) begin gx = -gx; gy = -gy; end
    for (int k = 0; k < 8; k++) if (gy * COS[k] - gx * SIN[k] > 0) bin++;
  endfunction

  initial begin
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++)
      img[y][x] = (x * 7 + y * 3 + (x * y) % 23 + $urandom % 40) % 256;
    for (int l = 0; l < N_LEV; l++) cnt[l] = 0;
    pix = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        @(negedge clk);
        while (busy) @(negedge clk);
        if ($urandom % 5 == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix = 8'(img[y][x]);
      end
    @(negedge clk); pix_valid = 0;
    begin
      int n;
      n = 0;
      while (!frame_end) begin @(posedge clk); n++; end
      `CHECK(n >= 2*IW + 1 && n <= 2*IW + 4, $sformatf("flush took %0d cycles", n))
    end
    repeat (3) @(posedge clk);
    for (int l = 0; l < N_LEV; l++) begin
      int c;
      c = cell_size(l);
      `CHECK(cnt[l] == (IW / c) * (IH / c) * c, $sformatf("level %0d: %0d segments", l, cnt[l]))
    end
    `FINISH
  end

  int segn [N_LEV][16][16];
  initial for (int l = 0; l < N_LEV; l++) for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) segn[l][a][b] = 0;

  always @(posedge clk) if (rst_n)
    for (int l = 0; l < N_LEV; l++) if (ph_valid[l]) begin
      int c, my, r [N_BIN];
      bit same;
      c = cell_size(l);
      cnt[l]++;
      my = segn[l][ph[l].cy][ph[l].cx]++;      // pixel row inside the cell
      for (int b = 0; b < N_BIN; b++) r[b] = 0;
      for (int mx = 0; mx < c; mx++) begin
        int bn, mg;
        grad(l, int'(ph[l].cx) * c + mx, int'(ph[l].cy) * c + my, bn, mg);
        r[bn] += mg;
      end
      same = 1;
      for (int b = 0; b < N_BIN; b++) if (int'(ph[l].hbin[b]) != r[b]) same = 0;
      `CHECK(same, $sformatf("level %0d cell (%0d,%0d) row %0d bins", l, ph[l].cx, ph[l].cy, my))
      `CHECK(ph[l].first_row == (my == 0) && ph[l].last_row == (my == c - 1), "row flags")
    end
endmodule
