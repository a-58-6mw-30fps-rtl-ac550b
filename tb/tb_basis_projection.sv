// tb_basis_projection: loads random basis vectors, projects random features and
// compares with P_k = sat11((sum_d H_d * S_kd) >>> 9); also checks the 13-cycle
// latency from acceptance to out_valid and the tag passing.
`timescale 1ns/1ps
module tb_basis_projection;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic s_we = 0; logic [7:0] s_addr; logic signed [S_W-1:0] s_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [HOG_W-1:0] h [DIM];
  logic [19:0] in_tag, out_tag;
  logic signed [P_W-1:0] p [DIM];
  basis_projection dut (.*);

  int S [DIM][DIM];

  initial begin
    for (int d = 0; d < DIM; d++) h[d] = '0;
    in_tag = '0; s_addr = '0; s_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < DIM; k++)
      for (int d = 0; d < DIM; d++) begin
        @(negedge clk);
        S[k][d] = int'($urandom % 1024) - 512;
        s_we = 1; s_addr = 8'(k*DIM + d); s_data = S_W'(S[k][d]);
      end
    @(negedge clk); s_we = 0;
    for (int t = 0; t < 200; t++) begin
      int lat;
      @(negedge clk);
      for (int d = 0; d < DIM; d++) h[d] = (t < 3) ? 10'h3ff : HOG_W'($urandom);
      in_tag = 20'($urandom);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == DIM, $sformatf("latency %0d", lat))
      `CHECK(out_tag == in_tag, "tag")
      for (int k = 0; k < DIM; k++) begin
        int acc;
        acc = 0;
        for (int d = 0; d < DIM; d++) acc += int'(h[d]) * S[k][d];
        acc = acc >>> 9;
        if (acc > 1023) acc = 1023;
        if (acc < -1024) acc = -1024;
        `CHECK(int'(p[k]) == acc, $sformatf("P[%0d] %0d ref %0d", k, p[k], acc))
      end
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    `FINISH
  end
endmodule
