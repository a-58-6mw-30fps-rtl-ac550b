// tb_part_classifier: the feature storage and centroid memory are modelled by
// functions of the address; part scores at random positions (partly outside
// the level) are compared with a direct sum of sparse dot products, and a
// score must arrive PH*PW+1 cycles after the request.
`timescale 1ns/1ps
module tb_part_classifier;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 320, IH = 240;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic w_we = 0; logic [5:0] w_addr; wcell_t w_data;
  logic [3:0] ph, pw;
  logic req_valid = 0, req_ready, ps_valid;
  logic [LEV_W-1:0] req_lev;
  logic signed [CX_W+1:0] req_px, req_py;
  fpos_t fs_pos;
  logic [7:0] fs_idx, dq_idx;
  logic signed [P_W-1:0] dq_cent [DIM];
  logic signed [SCORE_W-1:0] ps;
  part_classifier #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

  int C [N_CENT][DIM];
  wcell_t W [64];

  function automatic logic [7:0] idx_of(int l, int x, int y);
    return 8'(x * 7 + y * 13 + l * 3);
  endfunction
  always_comb begin
    fs_idx = idx_of(int'(fs_pos.lev), int'(fs_pos.x), int'(fs_pos.y));
    for (int d = 0; d < DIM; d++) dq_cent[d] = P_W'(C[dq_idx][d]);
  end

  function automatic int ref_ps(int l, int px, int py, int h, int w);
    int s;
    s = 0;
    for (int i = 0; i < h; i++)
      for (int j = 0; j < w; j++) begin
        int x, y, k;
        x = px + j; y = py + i;
        if (x >= 0 && y >= 0 && x < feat_len(IW, l) && y < feat_len(IH, l)) begin
          k = 0;
          for (int d = 0; d < DIM; d++)
            if (W[i*w+j].flag[d] && k < N_MUL) begin
              s += C[idx_of(l, x, y)][d] * int'($signed(W[i*w+j].w[k])); k++;
            end
        end
      end
    return s;
  endfunction

  initial begin
    w_addr = '0; w_data = '0; ph = 6; pw = 6; req_lev = '0; req_px = '0; req_py = '0;
    for (int c = 0; c < N_CENT; c++) for (int d = 0; d < DIM; d++) C[c][d] = int'($urandom % 2048) - 1024;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      W[c].flag = DIM'($urandom);
      for (int m = 0; m < N_MUL; m++) W[c].w[m] = WT_W'($urandom);
      w_we = 1; w_addr = 6'(c); w_data = W[c];
    end
    @(negedge clk); w_we = 0;
    for (int t = 0; t < 100; t++) begin
      int l, px, py, h, w, lat, r;
      l = $urandom % 3;
      h = 1 + $urandom % 8; w = 1 + $urandom % 8;
      px = int'($urandom % (feat_len(IW, l) + 6)) - 3;
      py = int'($urandom % (feat_len(IH, l) + 6)) - 3;
      r = ref_ps(l, px, py, h, w);
      @(negedge clk);
      ph = 4'(h); pw = 4'(w);
      req_valid = 1; req_lev = LEV_W'(l); req_px = (CX_W+2)'(px); req_py = (CX_W+2)'(py);
      @(posedge clk); #1; req_valid = 0;
      lat = 0;
      while (!ps_valid) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == h*w, $sformatf("latency %0d for %0dx%0d", lat, h, w))
      `CHECK(int'(ps) == r, $sformatf("part score %0d ref %0d", ps, r))
    end
    `FINISH
  end
endmodule
