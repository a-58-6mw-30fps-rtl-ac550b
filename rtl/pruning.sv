// pruning: classification pruning between the root and the parts classifiers.
//
// Each root score (rs_valid for one cycle) is compared with the programmable
// pruning threshold: a window whose root score is greater than the threshold
// becomes a candidate and is put in a small queue for parts classification;
// all others are discarded.  n_kept and n_pruned count both outcomes since the
// last frame_start.  A candidate arriving at a full queue is lost and sets the
// sticky overflow flag.  The strict A > B comparison follows the design; the
// queue depth is this design's choice.
module pruning
  import dpm_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frame_start,
  input  logic signed [SCORE_W-1:0] thr,
  input  logic                      rs_valid,
  input  fpos_t                     rs_pos,
  input  logic signed [SCORE_W-1:0] rs,
  output logic                      cand_valid,
  input  logic                      cand_ready,
  output fpos_t                     cand_pos,
  output logic signed [SCORE_W-1:0] cand_rs,
  output logic [31:0]               n_kept,
  output logic [31:0]               n_pruned,
  output logic                      overflow
);
  localparam int AW = $clog2(DEPTH);
  typedef struct packed { fpos_t pos; logic signed [SCORE_W-1:0] rs; } ent_t;

  ent_t          q [DEPTH];
  logic [AW:0]   wp, rp;
  logic          keep, full, pop;

  assign keep       = rs_valid && (rs > thr);
  assign full       = (wp - rp) == (AW+1)'(DEPTH);
  assign cand_valid = (wp != rp);
  assign pop        = cand_valid && cand_ready;
  assign cand_pos   = q[rp[AW-1:0]].pos;
  assign cand_rs    = q[rp[AW-1:0]].rs;

  always_ff @(posedge clk)
    if (keep && !full) q[wp[AW-1:0]] <= '{pos: rs_pos, rs: rs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; n_kept <= '0; n_pruned <= '0; overflow <= 1'b0;
    end else begin
      if (keep && !full) wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
      if (keep && full) overflow <= 1'b1;
      if (frame_start) begin
        n_kept <= '0; n_pruned <= '0;
      end else if (rs_valid) begin
        if (keep) n_kept   <= n_kept + 1'b1;
        else      n_pruned <= n_pruned + 1'b1;
      end
    end
  end
endmodule
