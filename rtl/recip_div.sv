// recip_div: sequential reciprocal, q = floor(2^RB / d), by restoring long
// division one quotient bit per cycle.  start loads d (d must be non-zero);
// done pulses RB+1 cycles later with q valid and held until the next start.
module recip_div #(
  parameter int DW = 25,
  parameter int RB = 37
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] d,
  output logic          done,
  output logic [RB:0]   q
);
  logic [DW:0]           rem;
  logic [DW-1:0]         d_q;
  logic [$clog2(RB+2):0] n;
  logic                  busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; d_q <= '0; n <= '0; busy <= 1'b0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d_q <= d; busy <= 1'b1; n <= '0; q <= '0; rem <= '0;
      end else if (busy) begin
        logic [DW+1:0] r2;
        // dividend bit: 1 only for the first (most significant) step
        r2 = {rem, (n == 0) ? 1'b1 : 1'b0};
        if (r2 >= (DW+2)'(d_q)) begin
          rem <= (DW+1)'(r2 - (DW+2)'(d_q));
          q   <= {q[RB-1:0], 1'b1};
        end else begin
          rem <= (DW+1)'(r2);
          q   <= {q[RB-1:0], 1'b0};
        end
        n <= n + 1'b1;
        if (int'(n) == RB) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
