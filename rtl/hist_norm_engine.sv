// hist_norm_engine: one of the three time-shared histogram and normalisation
// engines of feature pyramid generation, serving the N_LV levels in LEVS.
//
// Histogram stage: one partial histogram (a cell segment) is taken from the
// FIFO per cycle and added into the cell buffer of its level, which keeps four
// cell rows (slot = cell row mod 4) of 9 hbin each; the first segment of a cell
// overwrites.  When the last segment of the last cell of cell row cy arrives,
// cell row cy-1 has all its neighbours and a normalisation request is queued.
// Normalise stage: for each cell cx = 1..Wc-2 of the requested row it reads the
// 3x3 cells around it, forms the L1 energy N_k of the four 2x2 blocks that hold
// the cell, computes 2^37/N_k with four dividers in parallel (38 cycles), then
// n_ok = min(h_o * 2^12 / N_k, 819) for the 9 hbin o, and emits the 13-D
// feature: 9 orientation values sum_k n_ok / 4 and 4 texture values
// sum_o n_ok / 8 (10 bits each), at feature position (cx-1, cy-2) of the level.
// feat_valid is held until feat_ready.  About 41 cycles per feature.
// The split into FIFO, histogram and normalisation with three engines follows
// the design; the 13-D layout (as in the usual DPM HOG features), L1
// normalisation with clipping and the four-row buffer are this design's.
module hist_norm_engine
  import dpm_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080,
  parameter int N_LV  = 5,
  parameter int LEVS [N_LV] = '{1, 3, 5, 7, 9},
  parameter int RQ_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  ph_t               in_ph,
  output logic              feat_valid,
  input  logic              feat_ready,
  output logic [HOG_W-1:0]  feat [DIM],
  output fpos_t             feat_pos,
  output logic              busy,
  output logic              rq_overflow
);
  localparam int RB   = 37;
  localparam int NB   = 12;
  localparam int CLIP = 819;
  localparam int HB   = 24;      // bits of a cell bin
  localparam int NW   = HB + 2;  // bits of a block energy

  function automatic int max_wc();
    int m;
    m = 1;
    for (int i = 0; i < N_LV; i++) if (IMG_W / cell_size(LEVS[i]) > m) m = IMG_W / cell_size(LEVS[i]);
    return m;
  endfunction
  localparam int MWC = max_wc();

  logic [HB-1:0] hbuf [N_LV][4][MWC][N_BIN];

  function automatic int local_idx(input logic [LEV_W-1:0] lev);
    for (int i = 0; i < N_LV; i++) if (LEVS[i] == int'(lev)) return i;
    return 0;
  endfunction
  function automatic int wc_of(input int li);
    return IMG_W / cell_size(LEVS[li]);
  endfunction

  // ---------------- request queue ----------------
  localparam int QW = $clog2(RQ_DEPTH);
  typedef struct packed { logic [3:0] li; logic [CX_W-1:0] row; } req_t;
  req_t        rq [RQ_DEPTH];
  logic [QW:0] rq_wp, rq_rp;
  logic        rq_push, rq_pop;
  req_t        rq_in;

  // ---------------- histogram stage ----------------
  assign in_ready = 1'b1;
  int hli;
  assign hli = local_idx(in_ph.lev);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int b = 0; b < N_BIN; b++) begin
        if (in_ph.first_row)
          hbuf[hli][in_ph.cy[1:0]][in_ph.cx][b] <= HB'(in_ph.hbin[b]);
        else
          hbuf[hli][in_ph.cy[1:0]][in_ph.cx][b] <=
            hbuf[hli][in_ph.cy[1:0]][in_ph.cx][b] + HB'(in_ph.hbin[b]);
      end
    end
  end

  assign rq_push = in_valid && in_ph.last_row && wc_of(hli) >= 3 && int'(in_ph.cx) == wc_of(hli) - 1 && in_ph.cy >= 2;
  assign rq_in   = '{li: 4'(hli), row: in_ph.cy - 1'b1};

  // ---------------- normalise stage ----------------
  typedef enum logic [1:0] {N_IDLE, N_LOAD, N_DIV, N_OUT} nst_t;
  nst_t                 nst;
  logic [3:0]           n_li;
  logic [CX_W-1:0]      n_row, n_cx;
  logic [HB-1:0]        hc [N_BIN];
  logic [NW-1:0]        nk [4];
  logic                 dstart;
  logic [3:0]           ddone;
  logic [RB:0]          rk [4];
  logic [3:0]           got;

  assign rq_pop = (nst == N_IDLE) && (rq_wp != rq_rp);
  assign busy   = (nst != N_IDLE) || (rq_wp != rq_rp);

  always_ff @(posedge clk) if (rq_push) rq[rq_wp[QW-1:0]] <= rq_in;

  // energies of the 3x3 cells around (n_cx, n_row)
  logic [NW-1:0] blk [4];
  logic [HB-1:0] ctr [N_BIN];
  always_comb begin
    logic [NW-1:0] e [3][3];
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++) begin
        logic [1:0] slot;
        int         col;
        slot = 2'(int'(n_row) + dy - 1);
        col  = int'(n_cx) + dx - 1;
        if (col < 0) col = 0;
        if (col > MWC - 1) col = MWC - 1;
        e[dy][dx] = '0;
        for (int b = 0; b < N_BIN; b++) e[dy][dx] += NW'(hbuf[int'(n_li)][slot][col][b]);
      end
    for (int k = 0; k < 4; k++) begin
      int oy, ox;
      oy = k / 2; ox = k % 2;
      blk[k] = e[oy][ox] + e[oy][ox+1] + e[oy+1][ox] + e[oy+1][ox+1] + 1'b1;
    end
    for (int b = 0; b < N_BIN; b++) ctr[b] = hbuf[int'(n_li)][n_row[1:0]][n_cx][b];
  end

  for (genvar k = 0; k < 4; k++) begin : g_div
    recip_div #(.DW(NW), .RB(RB)) u_div (
      .clk, .rst_n, .start(dstart), .d(nk[k]), .done(ddone[k]), .q(rk[k])
    );
  end

  // normalised values and the 13-D feature
  logic [HOG_W-1:0] fval [DIM];
  always_comb begin
    int n [N_BIN][4];
    for (int o = 0; o < N_BIN; o++)
      for (int k = 0; k < 4; k++) begin
        logic [HB+RB:0] prod;
        prod = (HB+RB+1)'(hc[o]) * (HB+RB+1)'(rk[k]);
        prod = prod >> (RB - NB);
        n[o][k] = (prod > (HB+RB+1)'(CLIP)) ? CLIP : int'(prod);
      end
    for (int o = 0; o < N_BIN; o++)
      fval[o] = HOG_W'((n[o][0] + n[o][1] + n[o][2] + n[o][3]) / 4);
    for (int k = 0; k < 4; k++) begin
      int s;
      s = 0;
      for (int o = 0; o < N_BIN; o++) s += n[o][k];
      fval[N_BIN + k] = HOG_W'(s / 8);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nst <= N_IDLE; n_li <= '0; n_row <= '0; n_cx <= '0; dstart <= 1'b0; got <= '0;
      rq_wp <= '0; rq_rp <= '0; rq_overflow <= 1'b0;
      feat_valid <= 1'b0; feat_pos <= '0;
      for (int d = 0; d < DIM; d++) feat[d] <= '0;
      for (int b = 0; b < N_BIN; b++) hc[b] <= '0;
      for (int k = 0; k < 4; k++) nk[k] <= 1;
    end else begin
      dstart <= 1'b0;
      if (rq_push) begin
        if ((rq_wp - rq_rp) == (QW+1)'(RQ_DEPTH)) rq_overflow <= 1'b1;
        else rq_wp <= rq_wp + 1'b1;
      end
      if (feat_valid && feat_ready) feat_valid <= 1'b0;
      case (nst)
        N_IDLE: if (rq_pop) begin
          n_li  <= rq[rq_rp[QW-1:0]].li;
          n_row <= rq[rq_rp[QW-1:0]].row;
          n_cx  <= 8'd1;
          rq_rp <= rq_rp + 1'b1;
          nst   <= N_LOAD;
        end
        N_LOAD: begin
          hc <= ctr; nk <= blk; dstart <= 1'b1; got <= '0; nst <= N_DIV;
        end
        N_DIV: begin
          got <= got | ddone;
          if (&(got | ddone)) nst <= N_OUT;
        end
        default: if (!feat_valid || feat_ready) begin
          feat_valid   <= 1'b1;
          feat         <= fval;
          feat_pos.lev <= LEV_W'(LEVS[n_li]);
          feat_pos.x   <= n_cx - 1'b1;
          feat_pos.y   <= n_row - 1'b1;
          if (int'(n_cx) == wc_of(int'(n_li)) - 2) nst <= N_IDLE;
          else begin n_cx <= n_cx + 1'b1; nst <= N_LOAD; end
        end
      endcase
    end
  end
endmodule
