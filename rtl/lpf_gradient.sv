// lpf_gradient: the low-pass filter and gradient of one pyramid level.
//
// From a 5x5 pixel window (win[row][col], centre win[2][2]) it forms the
// low-pass filtered values at the four neighbours of the centre with the
// separable kernel [1 W 1] x [1 W 1] / (W+2)^2 (LPF_W = 0: no filtering), takes
// central differences gx (right - left) and gy (down - up), and returns the
// magnitude |gx| + |gy| and one of 9 unsigned orientation bins of 20 degrees
// (0..180).  The bin is the number of bin boundaries k*20 deg (k = 1..8) the
// folded gradient lies beyond, tested with the sign of gy*cos - gx*sin using
// 8-bit fixed-point constants.  Combinational.  That each level has its own
// low-pass filter whose cut-off falls with the level's scale follows the
// design; the kernel, magnitude and binning are this design's choices.
module lpf_gradient #(
  parameter int LPF_W = 2    // centre weight, W+2 must be a power of two (or 0)
) (
  input  logic [7:0] win [5][5],
  output logic [3:0] bin,
  output logic [8:0] mag
);
  localparam int SH = (LPF_W == 0) ? 0 : 2 * $clog2(LPF_W + 2);

  function automatic logic [7:0] smooth(input logic [7:0] w [5][5], input int r, input int c);
    int acc;
    if (LPF_W == 0) return w[r][c];
    acc = 0;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        acc += ((a == 0) ? LPF_W : 1) * ((b == 0) ? LPF_W : 1) * int'(w[r+a][c+b]);
    return 8'(acc >> SH);
  endfunction

  // cos / sin of k*20 degrees, k = 1..8, times 256
  localparam int COS [8] = '{241, 196, 128, 44, -44, -128, -196, -241};
  localparam int SIN [8] = '{88, 165, 222, 252, 252, 222, 165, 88};

  always_comb begin
    int gx, gy, n;
    gx = int'(smooth(win, 2, 3)) - int'(smooth(win, 2, 1));
    gy = int'(smooth(win, 3, 2)) - int'(smooth(win, 1, 2));
    mag = 9'((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy));
    // fold into [0, 180) degrees
    if (gy < 0 || (gy == 0 && gx < 0)) begin gx = -gx; gy = -gy; end
    n = 0;
    for (int k = 0; k < 8; k++)
      if (gy * COS[k] - gx * SIN[k] > 0) n++;
    bin = 4'(n);
  end
endmodule
