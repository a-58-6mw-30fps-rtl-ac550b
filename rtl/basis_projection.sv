// basis_projection: projects a 13-D HOG feature H into the sparse space of the
// SVM weights, P_k = <H, S_k> for the 13 basis vectors S_0..S_12.
//
// The basis vectors sit in a 13x13 register file of signed 10-bit elements,
// written at start-up.  A feature is captured when in_valid && in_ready; then
// one output dimension is produced per cycle with 13 multipliers (13 cycles per
// feature), the sum is shifted right by PSHIFT and saturated to signed 11 bits.
// out_valid holds the projected feature until out_ready.  The widths (10-bit H
// and S, 11-bit P) follow the design; the scaling shift and the 13-cycle
// schedule are this design's choices.  Tag bits travel with the feature.
module basis_projection
  import dpm_pkg::*;
#(
  parameter int TAG_W  = 20,
  parameter int PSHIFT = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_we,
  input  logic [7:0]           s_addr,   // k*13 + d
  input  logic signed [S_W-1:0] s_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [HOG_W-1:0]     h [DIM],
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [P_W-1:0] p [DIM],
  output logic [TAG_W-1:0]     out_tag
);
  logic signed [S_W-1:0] s_rf [DIM*DIM];
  logic [HOG_W-1:0]      h_q [DIM];
  logic [3:0]            k_q;
  logic                  busy;

  always_ff @(posedge clk)
    if (s_we && s_addr < 8'(DIM*DIM)) s_rf[s_addr] <= s_data;

  // dot product of the held feature with basis vector k_q
  logic signed [HOG_W+S_W+4:0] dot;
  logic signed [P_W-1:0]       dot_sat;
  always_comb begin
    logic signed [HOG_W+S_W+4:0] shifted;
    dot = '0;
    for (int d = 0; d < DIM; d++)
      dot += $signed({1'b0, h_q[d]}) * s_rf[int'(k_q)*DIM + d];
    shifted = dot >>> PSHIFT;
    if (shifted > (2**(P_W-1))-1)       dot_sat = P_W'((2**(P_W-1))-1);
    else if (shifted < -(2**(P_W-1)))   dot_sat = P_W'(-(2**(P_W-1)));
    else                                dot_sat = P_W'(shifted);
  end

  assign in_ready = !busy && !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; out_valid <= 1'b0; k_q <= '0; out_tag <= '0;
      for (int d = 0; d < DIM; d++) begin h_q[d] <= '0; p[d] <= '0; end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        h_q <= h; out_tag <= in_tag; busy <= 1'b1; k_q <= '0;
      end else if (busy) begin
        p[k_q] <= dot_sat;
        if (k_q == 4'(DIM-1)) begin busy <= 1'b0; out_valid <= 1'b1; end
        k_q <= k_q + 1'b1;
      end
    end
  end
endmodule
