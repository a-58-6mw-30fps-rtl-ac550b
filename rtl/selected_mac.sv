// selected_mac: sparse dot product of one SVM weight cell with one projected
// feature.
//
// A weight cell stores a 13-bit flag that marks the non-zero projected weights
// and at most six 5-bit signed weights.  A 13x6 crossbar routes the projected
// feature dimensions whose flag bit is set to six multipliers, so the zero
// weights cost neither storage nor multiplications; the six products are summed.
// Weight k belongs to the k-th set flag bit counted from bit 0 (this packing
// order is this design's own); flag bits beyond the sixth are ignored.
// Purely combinational: score = sum over selected d of p[d] * w[k(d)].
module selected_mac
  import dpm_pkg::*;
#(
  parameter int NM = N_MUL
) (
  input  logic signed [P_W-1:0]  p [DIM],
  input  wcell_t                 wc,
  output logic signed [P_W+WT_W+2:0] score
);
  logic signed [P_W-1:0] sel [NM];
  logic        [NM-1:0]  used;

  // crossbar: k-th set bit of the flag -> multiplier k
  always_comb begin
    int k;
    k = 0;
    used = '0;
    for (int m = 0; m < NM; m++) sel[m] = '0;
    for (int d = 0; d < DIM; d++) begin
      if (wc.flag[d] && k < NM) begin
        sel[k]  = p[d];
        used[k] = 1'b1;
        k++;
      end
    end
  end

  always_comb begin
    logic signed [P_W+WT_W+2:0] acc;
    acc = '0;
    for (int m = 0; m < NM; m++)
      if (used[m]) acc += sel[m] * $signed(wc.w[m]);
    score = acc;
  end
endmodule
