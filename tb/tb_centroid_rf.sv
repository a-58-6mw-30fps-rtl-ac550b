// tb_centroid_rf: writes all 256 centroids, then reads them back through the
// bank-row port (centroid bank*32+row) and the De-VQ ports.
`timescale 1ns/1ps
module tb_centroid_rf;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic we = 0; logic [7:0] waddr; logic [3:0] wdim; logic signed [P_W-1:0] wdata;
  logic [4:0] vq_row;
  logic signed [P_W-1:0] vq_cent [8][DIM];
  logic [7:0] dq_idx [4];
  logic signed [P_W-1:0] dq_cent [4][DIM];
  centroid_rf #(.N_RD(4)) dut (.*);
  int C [N_CENT][DIM];

  initial begin
    vq_row = '0;
    for (int r = 0; r < 4; r++) dq_idx[r] = '0;
    for (int c = 0; c < N_CENT; c++)
      for (int d = 0; d < DIM; d++) begin
        @(negedge clk);
        C[c][d] = int'($urandom % 2048) - 1024;
        we = 1; waddr = 8'(c); wdim = 4'(d); wdata = P_W'(C[c][d]);
      end
    @(negedge clk); we = 0;
    for (int r = 0; r < 32; r++) begin
      vq_row = 5'(r); #1;
      for (int b = 0; b < 8; b++)
        for (int d = 0; d < DIM; d++)
          `CHECK(int'(vq_cent[b][d]) == C[b*32+r][d], "bank read")
    end
    for (int t = 0; t < 100; t++) begin
      for (int r = 0; r < 4; r++) dq_idx[r] = 8'($urandom);
      #1;
      for (int r = 0; r < 4; r++)
        for (int d = 0; d < DIM; d++)
          `CHECK(int'(dq_cent[r][d]) == C[dq_idx[r]][d], "De-VQ read")
    end
    `FINISH
  end
endmodule
