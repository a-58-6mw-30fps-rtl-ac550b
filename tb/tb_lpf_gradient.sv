// tb_lpf_gradient: random 5x5 windows for three filter strengths; magnitude and
// orientation bin are compared with a reference using the real angle.
`timescale 1ns/1ps
module tb_lpf_gradient;
  `include "tb_common.svh"
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic [7:0] win [5][5];
  logic [3:0] bin0, bin2, bin6;
  logic [8:0] mag0, mag2, mag6;
  lpf_gradient #(.LPF_W(0)) d0 (.win, .bin(bin0), .mag(mag0));
  lpf_gradient #(.LPF_W(2)) d2 (.win, .bin(bin2), .mag(mag2));
  lpf_gradient #(.LPF_W(6)) d6 (.win, .bin(bin6), .mag(mag6));

  function automatic int sm(int w, int r, int c);
    int acc, sh;
    if (w == 0) return int'(win[r][c]);
    acc = 0;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        acc += ((a == 0) ? w : 1) * ((b == 0) ? w : 1) * int'(win[r+a][c+b]);
    sh = (w == 2) ? 4 : 6;
    return acc >> sh;
  endfunction

  task automatic check_one(int w, logic [3:0] bin, logic [8:0] mag);
    int gx, gy, rb;
    real ang;
    gx = sm(w, 2, 3) - sm(w, 2, 1);
    gy = sm(w, 3, 2) - sm(w, 1, 2);
    `CHECK(int'(mag) == (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy), "magnitude")
    if (gx != 0 || gy != 0) begin
      ang = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
      if (ang < 0) ang += 180.0;
      if (ang >= 180.0) ang -= 180.0;
      rb = int'($floor(ang / 20.0));
      // skip angles within 0.5 degree of a bin boundary (fixed-point constants)
      if (ang - 20.0 * rb > 0.5 && 20.0 * (rb + 1) - ang > 0.5)
        `CHECK(int'(bin) == rb, $sformatf("bin %0d ref %0d (gx %0d gy %0d)", bin, rb, gx, gy))
    end
  endtask

  initial begin
    for (int t = 0; t < 600; t++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) win[r][c] = 8'($urandom);
      if (t < 50) // smooth ramps give clean orientations
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++) win[r][c] = 8'(100 + (t % 7 - 3) * c * 5 + (t % 5 - 2) * r * 7);
      #1;
      check_one(0, bin0, mag0);
      check_one(2, bin2, mag2);
      check_one(6, bin6, mag6);
      @(posedge clk);
    end
    `FINISH
  end
endmodule
