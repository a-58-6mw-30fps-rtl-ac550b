// tb_selected_mac: random weight cells and projected features; the sparse
// dot product is compared with a dense reference built from the flag.
`timescale 1ns/1ps
module tb_selected_mac;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)

  logic signed [P_W-1:0] p [DIM];
  wcell_t wc;
  logic signed [P_W+WT_W+2:0] score;
  selected_mac dut (.p, .wc, .score);

  initial begin
    for (int t = 0; t < 500; t++) begin
      int k, ref_s;
      for (int d = 0; d < DIM; d++) p[d] = P_W'($urandom);
      wc.flag = DIM'($urandom);
      for (int m = 0; m < N_MUL; m++) wc.w[m] = WT_W'($urandom);
      if (t < 5) wc.flag = 13'h1fff;      // more than six set bits
      #1;
      k = 0; ref_s = 0;
      for (int d = 0; d < DIM; d++)
        if (wc.flag[d] && k < N_MUL) begin
          ref_s += int'(p[d]) * int'($signed(wc.w[k]));
          k++;
        end
      `CHECK(int'(score) == ref_s, $sformatf("score %0d ref %0d", score, ref_s))
      @(posedge clk);
    end
    `FINISH
  end
endmodule
