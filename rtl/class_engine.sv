// class_engine: one programmable SVM classification engine (CE) of the DPM
// detector.
//
// Root classification runs on-the-fly on the projected features of the root
// levels (3..11).  Window root scores pass the pruning comparator; candidates
// (root score > pruning threshold) are taken one at a time by the parts
// section, which waits until the feature storage holds every part-level row
// the candidate needs, then starts eight deformation units, each driving its
// own part classifier through the coarse-to-fine 5x5 search.  The DPM score is
// root score + sum of the eight best deformed part scores; windows whose score
// is greater than the detection threshold are reported on det_valid/det (level,
// window origin in cells, score).  With parts_on low the parts section's clock
// is gated off and candidates are judged on the root score alone.
//
// Configuration (cfg_we with cfg_addr/cfg_wdata, already decoded for this CE):
//   CFG_CE_REG  reg 0: fh[4:0], fw[9:5]; 1: root bias; 2: pruning threshold;
//               3: detection threshold; 16+8p+0: ph[3:0], pw[7:4];
//               +1/+2: anchor ax/ay (part-level cells from twice the window
//               origin); +3..+6: a1..a4 of the deformation cost.
//   CFG_ROOT_W / CFG_PART_W  weight cells, written as a low word (addr[8]=0,
//               bits 31:0) then a high word (addr[8]=1, bits 42:32) which commits.
// The root/part split, the deformation cost and the thresholds follow the
// design; the register map, anchor convention and the wait-for-rows rule are
// this design's.
module class_engine
  import dpm_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_start,
  input  logic                  parts_on,
  input  logic                  cfg_we,
  input  logic [23:0]           cfg_addr,
  input  logic [31:0]           cfg_wdata,
  // projected root-level features
  input  logic                  f_valid,
  output logic                  f_ready,
  input  logic signed [P_W-1:0] f [DIM],
  input  fpos_t                 f_pos,
  // feature storage and De-VQ
  input  logic [CX_W-1:0]       rows_done [N_PART_LEV],
  output fpos_t                 fs_pos  [N_PARTS],
  input  logic [7:0]            fs_idx  [N_PARTS],
  output logic [7:0]            dq_idx  [N_PARTS],
  input  logic signed [P_W-1:0] dq_cent [N_PARTS][DIM],
  // detections
  output logic                  det_valid,
  output det_t                  det,
  // activity counters (since frame_start)
  output logic [31:0]           n_kept,
  output logic [31:0]           n_pruned,
  output logic [31:0]           n_parts_done,
  output logic [31:0]           n_late,
  output logic                  cand_overflow,
  output logic                  idle
);
  // ---------------- configuration ----------------
  logic [4:0]                fh, fw;
  logic signed [SCORE_W-1:0] root_bias, prune_thr, det_thr;
  logic [3:0]                ph [N_PARTS], pw [N_PARTS];
  logic signed [CX_W+1:0]    pax [N_PARTS], pay [N_PARTS];
  logic signed [11:0]        pa1 [N_PARTS], pa2 [N_PARTS], pa3 [N_PARTS], pa4 [N_PARTS];
  logic [31:0]               wlow;

  logic [3:0] region;
  assign region = cfg_addr[23:20];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fh <= 5'd1; fw <= 5'd1; root_bias <= '0; prune_thr <= '0; det_thr <= '0; wlow <= '0;
      for (int q = 0; q < N_PARTS; q++) begin
        ph[q] <= 4'd1; pw[q] <= 4'd1; pax[q] <= '0; pay[q] <= '0;
        pa1[q] <= '0; pa2[q] <= '0; pa3[q] <= '0; pa4[q] <= '0;
      end
    end else if (cfg_we) begin
      if ((region == CFG_ROOT_W || region == CFG_PART_W) && !cfg_addr[8]) wlow <= cfg_wdata;
      if (region == CFG_CE_REG) begin
        case (cfg_addr[7:0])
          8'd0: begin fh <= cfg_wdata[4:0]; fw <= cfg_wdata[9:5]; end
          8'd1: root_bias <= SCORE_W'(signed'(cfg_wdata));
          8'd2: prune_thr <= SCORE_W'(signed'(cfg_wdata));
          8'd3: det_thr   <= SCORE_W'(signed'(cfg_wdata));
          default: if (cfg_addr[7:0] >= 8'd16 && cfg_addr[7:0] < 8'd16 + 8'(8*N_PARTS)) begin
            automatic int q = int'(cfg_addr[7:3]) - 2;
            case (cfg_addr[2:0])
              3'd0: begin ph[q] <= cfg_wdata[3:0]; pw[q] <= cfg_wdata[7:4]; end
              3'd1: pax[q] <= (CX_W+2)'(signed'(cfg_wdata));
              3'd2: pay[q] <= (CX_W+2)'(signed'(cfg_wdata));
              3'd3: pa1[q] <= cfg_wdata[11:0];
              3'd4: pa2[q] <= cfg_wdata[11:0];
              3'd5: pa3[q] <= cfg_wdata[11:0];
              3'd6: pa4[q] <= cfg_wdata[11:0];
              default: ;
            endcase
          end
        endcase
      end
    end
  end

  wcell_t wcell;
  assign wcell = wcell_t'({cfg_wdata[CELL_W-33:0], wlow});
  logic root_w_we;
  assign root_w_we = cfg_we && region == CFG_ROOT_W && cfg_addr[8];

  // ---------------- root classification and pruning ----------------
  logic                      rs_valid;
  fpos_t                     rs_pos;
  logic signed [SCORE_W-1:0] rs;

  root_classifier #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_root (
    .clk, .rst_n,
    .w_we(root_w_we), .w_addr(cfg_addr[7:0]), .w_data(wcell),
    .fh, .fw, .bias(root_bias),
    .in_valid(f_valid), .in_ready(f_ready), .p(f), .pos(f_pos),
    .rs_valid, .rs_pos, .rs
  );

  logic                      cand_valid, cand_ready;
  fpos_t                     cand_pos;
  logic signed [SCORE_W-1:0] cand_rs;

  pruning u_prune (
    .clk, .rst_n, .frame_start, .thr(prune_thr),
    .rs_valid, .rs_pos, .rs,
    .cand_valid, .cand_ready, .cand_pos, .cand_rs,
    .n_kept, .n_pruned, .overflow(cand_overflow)
  );

  // ---------------- parts section (own gated clock) ----------------
  logic pclk;
  clock_gate u_cg (.clk, .en(parts_on), .gclk(pclk));

  typedef enum logic [1:0] {C_IDLE, C_WAIT_ROWS, C_PARTS, C_SUM} cst_t;
  cst_t cst;
  fpos_t                     c_pos;
  logic signed [SCORE_W-1:0] c_rs;
  logic [N_PARTS-1:0]        pdone;
  logic signed [SCORE_W-1:0] pbest [N_PARTS];
  logic                      dstart;
  logic [N_PARTS-1:0]        d_done;

  // rows of the part level the candidate needs: up to 2*wy + max(ay+ph) + 2
  logic [LEV_W-1:0] plev;
  int               need, lo_row, lh_p;
  always_comb begin
    int mx, mn;
    mx = 0; mn = 0;
    for (int q = 0; q < N_PARTS; q++) begin
      if (int'(pay[q]) + int'(ph[q]) > mx) mx = int'(pay[q]) + int'(ph[q]);
      if (int'(pay[q]) < mn) mn = int'(pay[q]);
    end
    plev   = c_pos.lev - LEV_W'(ROOT_LEV0);
    lh_p   = feat_len(IMG_H, int'(plev));
    need   = 2 * int'(c_pos.y) + mx + 2;
    if (need > lh_p) need = lh_p;
    lo_row = 2 * int'(c_pos.y) + mn - 2;
  end

  logic rows_ok;
  assign rows_ok    = int'(rows_done[plev]) >= need;
  assign cand_ready = (cst == C_IDLE);
  assign idle       = (cst == C_IDLE) && !cand_valid && f_ready && !rs_valid;

  logic signed [SCORE_W-1:0] dpm;
  always_comb begin
    dpm = c_rs;
    for (int q = 0; q < N_PARTS; q++) dpm += pbest[q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; c_pos <= '0; c_rs <= '0; dstart <= 1'b0;
      det_valid <= 1'b0; det <= '0; n_parts_done <= '0; n_late <= '0;
      pdone <= '0;
    end else begin
      det_valid <= 1'b0;
      dstart    <= 1'b0;
      if (frame_start) begin n_parts_done <= '0; n_late <= '0; end
      case (cst)
        C_IDLE: if (cand_valid) begin
          if (!parts_on) begin
            // root-only detection
            if (cand_rs > det_thr) begin
              det_valid <= 1'b1;
              det <= '{lev: cand_pos.lev, x: cand_pos.x, y: cand_pos.y, score: cand_rs};
            end
          end else begin
            c_pos <= cand_pos; c_rs <= cand_rs; cst <= C_WAIT_ROWS;
          end
        end
        C_WAIT_ROWS: if (rows_ok) begin
          if (int'(rows_done[plev]) - 32 > lo_row) n_late <= n_late + 1'b1;
          dstart <= 1'b1; pdone <= '0; cst <= C_PARTS;
        end
        C_PARTS: begin
          for (int q = 0; q < N_PARTS; q++) if (d_done[q]) pdone[q] <= 1'b1;
          if (&(pdone | d_done)) cst <= C_SUM;
        end
        default: begin
          n_parts_done <= n_parts_done + 1'b1;
          if (dpm > det_thr) begin
            det_valid <= 1'b1;
            det <= '{lev: c_pos.lev, x: c_pos.x, y: c_pos.y, score: dpm};
          end
          cst <= C_IDLE;
        end
      endcase
    end
  end

  for (genvar q = 0; q < N_PARTS; q++) begin : g_part
    logic                   rq_valid, rq_ready, ps_valid, dbusy;
    logic signed [CX_W+1:0] rq_px, rq_py;
    logic signed [SCORE_W-1:0] ps;
    logic [4:0]             n_eval;
    logic                   pw_we;
    assign pw_we = cfg_we && region == CFG_PART_W && cfg_addr[8] && int'(cfg_addr[11:9]) == q;

    deformation u_def (
      .clk(pclk), .rst_n, .start(dstart), .busy(dbusy),
      .ax((CX_W+2)'(2 * int'(c_pos.x)) + pax[q]), .ay((CX_W+2)'(2 * int'(c_pos.y)) + pay[q]),
      .a1(pa1[q]), .a2(pa2[q]), .a3(pa3[q]), .a4(pa4[q]),
      .req_valid(rq_valid), .req_ready(rq_ready), .req_px(rq_px), .req_py(rq_py),
      .ps_valid, .ps, .done(d_done[q]), .best(pbest[q]), .n_eval
    );

    part_classifier #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_part (
      .clk(pclk), .rst_n,
      .w_we(pw_we), .w_addr(cfg_addr[5:0]), .w_data(wcell),
      .ph(ph[q]), .pw(pw[q]),
      .req_valid(rq_valid), .req_ready(rq_ready), .req_lev(plev),
      .req_px(rq_px), .req_py(rq_py),
      .fs_pos(fs_pos[q]), .fs_idx(fs_idx[q]), .dq_idx(dq_idx[q]), .dq_cent(dq_cent[q]),
      .ps_valid, .ps
    );
  end
endmodule
