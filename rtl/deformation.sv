// deformation: finds the best deformed score of one part for one candidate
// window, max over (dx, dy) in a 5x5 window of PS(anchor+d) - DC(d), with
// DC(dx, dy) = a1*dx^2 + a2*dx + a3*dy^2 + a4*dy.
//
// The search is coarse-to-fine: first the nine positions with dx, dy in
// {-2, 0, 2}, then the in-range 4-neighbours (dx+-1 or dy+-1) of the best coarse
// position, i.e. 11 to 13 part scores instead of 25.  Each position is asked
// of the part classifier with a req/ready handshake and its score returns on
// ps_valid.  On start the anchor and coefficients are captured; done pulses
// with best (and n_eval, the number of positions scored).  The cost form
// follows the design; the exact coarse-to-fine pattern and tie rule (first
// maximum wins) are this design's choices.
module deformation
  import dpm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  input  logic signed [CX_W+1:0]    ax,
  input  logic signed [CX_W+1:0]    ay,
  input  logic signed [11:0]        a1, a2, a3, a4,
  output logic                      req_valid,
  input  logic                      req_ready,
  output logic signed [CX_W+1:0]    req_px,
  output logic signed [CX_W+1:0]    req_py,
  input  logic                      ps_valid,
  input  logic signed [SCORE_W-1:0] ps,
  output logic                      done,
  output logic signed [SCORE_W-1:0] best,
  output logic [4:0]                n_eval
);
  typedef enum logic [1:0] {IDLE, REQ, WAIT} st_t;
  st_t st;

  logic signed [CX_W+1:0] ax_q, ay_q;
  logic signed [11:0]     c1, c2, c3, c4;
  logic                   fine;        // 0: coarse phase, 1: fine phase
  logic [3:0]             k;           // position index within the phase
  logic signed [2:0]      bdx, bdy;    // best displacement so far
  logic signed [2:0]      cdx, cdy;    // centre of the fine phase
  logic                   have;        // best is valid

  // displacement of position k of the current phase
  logic signed [2:0] dx, dy;
  logic              in_range;
  always_comb begin
    if (!fine) begin
      dx = 3'((int'(k) % 3) * 2 - 2);
      dy = 3'((int'(k) / 3) * 2 - 2);
    end else begin
      dx = cdx; dy = cdy;
      case (k[1:0])
        2'd0: dx = cdx - 3'sd1;
        2'd1: dx = cdx + 3'sd1;
        2'd2: dy = cdy - 3'sd1;
        default: dy = cdy + 3'sd1;
      endcase
    end
    in_range = dx >= -3'sd2 && dx <= 3'sd2 && dy >= -3'sd2 && dy <= 3'sd2;
  end

  logic signed [SCORE_W-1:0] dc, val;
  always_comb begin
    dc  = SCORE_W'(c1 * dx * dx) + SCORE_W'(c2 * dx) + SCORE_W'(c3 * dy * dy) + SCORE_W'(c4 * dy);
    val = ps - dc;
  end

  logic last;
  assign last      = fine ? (k == 4'd3) : 1'b0;
  assign req_valid = (st == REQ) && in_range;
  assign req_px    = ax_q + (CX_W+2)'(dx);
  assign req_py    = ay_q + (CX_W+2)'(dy);
  assign busy      = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ax_q <= '0; ay_q <= '0; c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0;
      fine <= 1'b0; k <= '0; bdx <= '0; bdy <= '0; cdx <= '0; cdy <= '0; have <= 1'b0;
      done <= 1'b0; best <= '0; n_eval <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) begin
          ax_q <= ax; ay_q <= ay; c1 <= a1; c2 <= a2; c3 <= a3; c4 <= a4;
          fine <= 1'b0; k <= '0; have <= 1'b0; n_eval <= '0;
          st <= REQ;
        end
        REQ: begin
          if (!in_range) begin
            // skip a fine position outside the 5x5 window
            if (last) begin done <= 1'b1; st <= IDLE; end
            else k <= k + 1'b1;
          end else if (req_ready) st <= WAIT;
        end
        default: if (ps_valid) begin
          n_eval <= n_eval + 1'b1;
          if (!have || val > best) begin
            best <= val; bdx <= dx; bdy <= dy; have <= 1'b1;
          end
          if (!fine && k == 4'd8) begin
            fine <= 1'b1; k <= '0; st <= REQ;
            if (!have || val > best) begin cdx <= dx; cdy <= dy; end
            else begin cdx <= bdx; cdy <= bdy; end
          end
          else if (last) begin done <= 1'b1; st <= IDLE; end
          else begin k <= k + 1'b1; st <= REQ; end
        end
      endcase
    end
  end
endmodule
