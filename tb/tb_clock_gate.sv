// tb_clock_gate: the gated clock follows the clock only while the enable is
// high, and an enable change while the clock is high takes effect only at the
// next low phase (no glitch).
`timescale 1ns/1ps
module tb_clock_gate;
  `include "tb_common.svh"
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 1000)
  clock_gate dut (.clk, .en, .gclk);
  int edges = 0;
  always @(posedge gclk) edges++;
  initial begin
    repeat (3) @(negedge clk);
    `CHECK(edges == 0, "no edges while disabled")
    en = 1;
    repeat (10) @(negedge clk);
    `CHECK(edges == 10, $sformatf("10 edges while enabled, got %0d", edges))
    @(posedge clk); #1;
    en = 0;             // falls while clk is high
    #1 `CHECK(gclk == 1'b1, "no glitch when en falls during the high phase")
    @(negedge clk); #1 `CHECK(gclk == 1'b0, "gated low")
    edges = 0;
    repeat (5) @(negedge clk);
    `CHECK(edges == 0, "stopped")
    @(posedge clk); #1; en = 1;
    #1 `CHECK(gclk == 1'b0, "no glitch when en rises during the high phase")
    `FINISH
  end
endmodule
