// centroid_rf: the VQ centroids memory, a register file of 256 centroids of
// 13 signed 11-bit dimensions organised as 8 banks of 32.
//
// It is written once at start-up (one dimension per write) and afterwards only
// read.  The VQ engines read the same row of all eight banks in one cycle
// (vq_row -> vq_cent[bank], centroid index bank*32+row); the De-VQ ports turn
// stored 8-bit indices back into projected features (dq_idx -> dq_cent).
// Reads are combinational.  The number of De-VQ ports is this design's choice.
module centroid_rf
  import dpm_pkg::*;
#(
  parameter int N_RD   = 16,
  parameter int N_BANK = 8,
  parameter int BANK_D = 32
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [7:0]            waddr,
  input  logic [3:0]            wdim,
  input  logic signed [P_W-1:0] wdata,
  input  logic [4:0]            vq_row,
  output logic signed [P_W-1:0] vq_cent [N_BANK][DIM],
  input  logic [7:0]            dq_idx  [N_RD],
  output logic signed [P_W-1:0] dq_cent [N_RD][DIM]
);
  logic signed [P_W-1:0] mem [N_BANK*BANK_D][DIM];

  always_ff @(posedge clk)
    if (we && wdim < 4'(DIM)) mem[waddr][wdim] <= wdata;

  always_comb begin
    for (int b = 0; b < N_BANK; b++)
      vq_cent[b] = mem[b*BANK_D + int'(vq_row)];
    for (int r = 0; r < N_RD; r++)
      dq_cent[r] = mem[dq_idx[r]];
  end
endmodule
