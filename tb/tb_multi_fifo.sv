// tb_multi_fifo: random bursts of up to five writes per cycle with a randomly
// stalling reader; the output order is compared with a queue model and no
// overflow may occur while the writer respects the free space.
`timescale 1ns/1ps
module tb_multi_fifo;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic [4:0] in_valid;
  logic [15:0] in_data [5];
  logic out_valid, out_ready, overflow;
  logic [15:0] out_data;
  multi_fifo #(.T(logic [15:0]), .N_IN(5), .DEPTH(16)) dut (.*);

  logic [15:0] model [$];
  int seq = 0;

  initial begin
    in_valid = '0; out_ready = 0;
    for (int i = 0; i < 5; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = '0;
      out_ready = ($urandom % 3) != 0;
      if (($urandom % 4) == 0) begin
        int free;
        free = 16 - model.size() - 5;   // stay clear of overflow
        for (int i = 0; i < 5; i++)
          if (($urandom % 2) && free > 0) begin
            in_valid[i] = 1; in_data[i] = 16'(seq++); free--;
          end
      end
      @(posedge clk);
      #1;
    end
    `FINISH
  end

  // model: pops are checked at the clock edge, pushes appended in input order
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      `CHECK(model.size() > 0 && out_data == model[0], $sformatf("data %0d", out_data))
      if (model.size() > 0) void'(model.pop_front());
    end
    for (int i = 0; i < 5; i++) if (in_valid[i]) model.push_back(in_data[i]);
  end

  always @(posedge clk) if (rst_n && overflow) `CHECK(0, "unexpected overflow")
endmodule
