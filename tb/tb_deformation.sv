// tb_deformation: the part classifier is replaced by a table of part scores
// PS(x, y); for random tables and coefficients the result must equal the
// coarse-to-fine search evaluated in the testbench, never exceed the full 5x5
// maximum, equal it when the score surface has a single peak that is not
// diagonal to every coarse position, and score 11 to
// 13 positions.
`timescale 1ns/1ps
module tb_deformation;
  import dpm_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic start = 0, busy, req_valid, req_ready, ps_valid = 0, done;
  logic signed [CX_W+1:0] ax, ay, req_px, req_py;
  logic signed [11:0] a1, a2, a3, a4;
  logic signed [SCORE_W-1:0] ps, best;
  logic [4:0] n_eval;
  deformation dut (.*);

  int PS [5][5];
  int AX, AY;
  assign req_ready = 1'b1;

  // part-score responder, 3 cycles latency
  always @(posedge clk) begin
    ps_valid <= 1'b0;
    if (req_valid) begin
      int dx, dy;
      dx = int'(req_px) - AX; dy = int'(req_py) - AY;
      repeat (3) @(posedge clk);
      ps <= SCORE_W'(PS[dy+2][dx+2]);
      ps_valid <= 1'b1;
    end
  end

  function automatic int val(int dx, int dy);
    return PS[dy+2][dx+2] - (int'(a1)*dx*dx + int'(a2)*dx + int'(a3)*dy*dy + int'(a4)*dy);
  endfunction

  initial begin
    ax = 0; ay = 0; a1 = 0; a2 = 0; a3 = 0; a4 = 0; ps = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int bv, bx, by, cx, cy, n, full;
      bit peak;
      peak = (t % 2 == 0);
      AX = 10 + $urandom % 20; AY = 10 + $urandom % 20;
      a1 = 12'(int'($urandom % 9)); a2 = 12'(int'($urandom % 9) - 4);
      a3 = 12'(int'($urandom % 9)); a4 = 12'(int'($urandom % 9) - 4);
      begin
        int px, py;
        px = int'($urandom % 5) - 2; py = int'($urandom % 5) - 2;
        if (px % 2 != 0 && py % 2 != 0) px = 0;   // diagonal peaks are not reached
        for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++)
          PS[y][x] = int'($urandom % 2000) - 1000;
        if (peak) begin
          // make PS - DC a cone around (px, py)
          for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++)
            PS[y][x] = 1000 - 300 * ((x-2-px)*(x-2-px) + (y-2-py)*(y-2-py))
                       + (int'(a1)*(x-2)*(x-2) + int'(a2)*(x-2) + int'(a3)*(y-2)*(y-2) + int'(a4)*(y-2));
        end
      end
      // reference: coarse then fine
      bv = 0; bx = 0; by = 0; n = 0;
      for (int k = 0; k < 9; k++) begin
        int dx, dy;
        dx = (k % 3) * 2 - 2; dy = (k / 3) * 2 - 2;
        if (n == 0 || val(dx, dy) > bv) begin bv = val(dx, dy); bx = dx; by = dy; end
        n++;
      end
      cx = bx; cy = by;
      for (int k = 0; k < 4; k++) begin
        int dx, dy;
        dx = cx + ((k == 0) ? -1 : (k == 1) ? 1 : 0);
        dy = cy + ((k == 2) ? -1 : (k == 3) ? 1 : 0);
        if (dx >= -2 && dx <= 2 && dy >= -2 && dy <= 2) begin
          if (val(dx, dy) > bv) begin bv = val(dx, dy); bx = dx; by = dy; end
          n++;
        end
      end
      full = val(-2, -2);
      for (int y = -2; y <= 2; y++) for (int x = -2; x <= 2; x++) if (val(x, y) > full) full = val(x, y);
      @(negedge clk);
      ax = (CX_W+2)'(AX); ay = (CX_W+2)'(AY); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(posedge clk);
      #1;
      `CHECK(int'(best) == bv, $sformatf("best %0d ref %0d", best, bv))
      `CHECK(int'(n_eval) == n && n >= 11 && n <= 13, $sformatf("n_eval %0d ref %0d", n_eval, n))
      `CHECK(int'(best) <= full, "not above the full search")
      if (peak) `CHECK(int'(best) == full, "single peak found")
    end
    `FINISH
  end
endmodule
