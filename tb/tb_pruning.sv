// tb_pruning: random root scores against a threshold; kept/pruned counts, the
// candidates' order and contents, and the strict '>' comparison are checked.
`timescale 1ns/1ps
module tb_pruning;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic frame_start = 0, rs_valid = 0, cand_valid, cand_ready = 0, overflow;
  logic signed [SCORE_W-1:0] thr, rs, cand_rs;
  fpos_t rs_pos, cand_pos;
  logic [31:0] n_kept, n_pruned;
  pruning dut (.*);

  logic signed [SCORE_W-1:0] exp_q [$];
  int kept = 0, pruned = 0;

  initial begin
    thr = 100; rs = 0; rs_pos = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      cand_ready = ($urandom % 2);
      rs_valid = ($urandom % 3) == 0 && exp_q.size() < 14;
      rs = SCORE_W'(int'($urandom % 400) - 200);
      if (t == 10) rs = 100;                 // equal to the threshold: pruned
      if (t == 10) rs_valid = 1;
      rs_pos = fpos_t'($urandom);
      if (rs_valid) begin
        if (rs > thr) begin kept++; exp_q.push_back(rs); end else pruned++;
      end
    end
    @(negedge clk); rs_valid = 0; cand_ready = 1;
    repeat (40) @(posedge clk);
    #1;
    `CHECK(n_kept == 32'(kept), $sformatf("kept %0d vs %0d", n_kept, kept))
    `CHECK(n_pruned == 32'(pruned), $sformatf("pruned %0d vs %0d", n_pruned, pruned))
    `CHECK(exp_q.size() == 0, "all candidates delivered")
    `CHECK(!overflow, "no overflow")
    `FINISH
  end

  always @(posedge clk) if (rst_n && cand_valid && cand_ready) begin
    `CHECK(exp_q.size() > 0 && cand_rs == exp_q[0], $sformatf("candidate score %0d", cand_rs))
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
endmodule
