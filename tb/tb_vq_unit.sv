// tb_vq_unit: random centroids in a centroid_rf, batches of one to three random
// features (some equal to a centroid); each index must be the nearest centroid
// by squared distance (lowest index on ties) and a batch must take 34 cycles.
`timescale 1ns/1ps
module tb_vq_unit;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic we = 0; logic [7:0] waddr; logic [3:0] wdim; logic signed [P_W-1:0] wdata;
  logic [4:0] cent_row;
  logic signed [P_W-1:0] vq_cent [8][DIM];
  logic [7:0] dq_idx [1];
  logic signed [P_W-1:0] dq_cent [1][DIM];
  centroid_rf #(.N_RD(1)) u_rf (.clk, .we, .waddr, .wdim, .wdata, .vq_row(cent_row),
                                .vq_cent, .dq_idx, .dq_cent);

  logic [2:0] in_valid = 0, in_ready, q_valid;
  logic signed [P_W-1:0] f [3][DIM];
  logic [19:0] in_tag [3], q_tag [3];
  logic [7:0] q [3];
  vq_unit dut (.clk, .rst_n, .in_valid, .in_ready, .f, .in_tag, .cent_row, .cent(vq_cent),
               .q_valid, .q, .q_tag);

  int C [N_CENT][DIM];

  function automatic int nearest(int e);
    longint best, dd;
    int bi;
    best = -1; bi = 0;
    for (int c = 0; c < N_CENT; c++) begin
      dd = 0;
      for (int d = 0; d < DIM; d++) dd += longint'((int'(f[e][d]) - C[c][d]) * (int'(f[e][d]) - C[c][d]));
      if (best < 0 || dd < best) begin best = dd; bi = c; end
    end
    return bi;
  endfunction

  initial begin
    dq_idx[0] = '0;
    for (int e = 0; e < 3; e++) begin in_tag[e] = '0; for (int d = 0; d < DIM; d++) f[e][d] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < N_CENT; c++)
      for (int d = 0; d < DIM; d++) begin
        @(negedge clk);
        C[c][d] = int'($urandom % 2048) - 1024;
        we = 1; waddr = 8'(c); wdim = 4'(d); wdata = P_W'(C[c][d]);
      end
    @(negedge clk); we = 0;
    for (int t = 0; t < 60; t++) begin
      int exp_i [3];
      logic [2:0] m;
      int lat;
      m = 3'($urandom % 7 + 1);
      for (int e = 0; e < 3; e++) begin
        int pick;
        pick = $urandom % N_CENT;
        for (int d = 0; d < DIM; d++)
          f[e][d] = (t % 3 == 0) ? P_W'(C[pick][d] + int'($urandom % 5) - 2) : P_W'($urandom);
        in_tag[e] = 20'($urandom);
        exp_i[e] = nearest(e);
      end
      @(negedge clk);
      in_valid = m;
      @(posedge clk); #1;
      in_valid = 0;
      lat = 1;
      while (q_valid == 0) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 34, $sformatf("batch latency %0d", lat))
      `CHECK(q_valid == m, "valid mask")
      for (int e = 0; e < 3; e++) if (m[e]) begin
        `CHECK(int'(q[e]) == exp_i[e], $sformatf("engine %0d index %0d ref %0d", e, q[e], exp_i[e]))
        `CHECK(q_tag[e] == in_tag[e], "tag")
      end
    end
    `FINISH
  end
endmodule
