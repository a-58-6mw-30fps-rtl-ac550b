// part_classifier: computes one part filter score at a requested position of a
// part level (0..8) from the vector-quantised feature storage.
//
// On a request (req_valid && req_ready) the unit walks the PH x PW part filter
// cells, one per cycle: it reads the stored 8-bit centroid index of feature
// (px+j, py+i) from the feature memory (fs_pos -> fs_idx), de-quantises it
// through the centroid register file (dq_idx -> dq_cent) and adds the
// selected-MAC product with weight cell i*PW+j.  Cells outside the level
// contribute nothing.  After PH*PW cycles the score is given with ps_valid for
// one cycle.  The weight memory holds up to 64 cells (8x8); the part filter
// size limit and the one-cell-per-cycle schedule are this design's choices.
module part_classifier
  import dpm_pkg::*;
#(
  parameter int IMG_W      = 1920,
  parameter int IMG_H      = 1080,
  parameter int MAX_PCELLS = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  w_we,
  input  logic [5:0]            w_addr,
  input  wcell_t                w_data,
  input  logic [3:0]            ph,
  input  logic [3:0]            pw,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [LEV_W-1:0]      req_lev,
  input  logic signed [CX_W+1:0] req_px,
  input  logic signed [CX_W+1:0] req_py,
  output fpos_t                 fs_pos,
  input  logic [7:0]            fs_idx,
  output logic [7:0]            dq_idx,
  input  logic signed [P_W-1:0] dq_cent [DIM],
  output logic                  ps_valid,
  output logic signed [SCORE_W-1:0] ps
);
  wcell_t wmem [MAX_PCELLS];
  always_ff @(posedge clk)
    if (w_we && int'(w_addr) < MAX_PCELLS) wmem[w_addr] <= w_data;

  logic                   busy;
  logic [LEV_W-1:0]       lev_q;
  logic signed [CX_W+1:0] px_q, py_q;
  logic [3:0]             i_q, j_q;
  logic [5:0]             c_q;
  logic signed [SCORE_W-1:0] acc;

  logic signed [CX_W+2:0] fx, fy;
  logic                   in_lvl;
  always_comb begin
    fx = (CX_W+3)'(px_q) + (CX_W+3)'(j_q);
    fy = (CX_W+3)'(py_q) + (CX_W+3)'(i_q);
    in_lvl = fx >= 0 && fy >= 0 &&
             int'(fx) < feat_len(IMG_W, int'(lev_q)) && int'(fy) < feat_len(IMG_H, int'(lev_q));
    fs_pos.lev = lev_q;
    fs_pos.x   = in_lvl ? CX_W'(fx) : '0;
    fs_pos.y   = in_lvl ? CX_W'(fy) : '0;
  end
  assign dq_idx = fs_idx;

  logic signed [P_W+WT_W+2:0] prod;
  selected_mac u_mac (.p(dq_cent), .wc(wmem[c_q]), .score(prod));

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; lev_q <= '0; px_q <= '0; py_q <= '0; i_q <= '0; j_q <= '0; c_q <= '0;
      acc <= '0; ps_valid <= 1'b0; ps <= '0;
    end else begin
      ps_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy <= 1'b1; lev_q <= req_lev; px_q <= req_px; py_q <= req_py;
          i_q <= '0; j_q <= '0; c_q <= '0; acc <= '0;
        end
      end else begin
        logic signed [SCORE_W-1:0] nxt;
        nxt = acc + (in_lvl ? SCORE_W'(prod) : '0);
        acc <= nxt;
        c_q <= c_q + 1'b1;
        if (j_q + 1'b1 == pw) begin
          j_q <= '0;
          i_q <= i_q + 1'b1;
          if (i_q + 1'b1 == ph) begin busy <= 1'b0; ps_valid <= 1'b1; ps <= nxt; end
        end else j_q <= j_q + 1'b1;
      end
    end
  end
endmodule
