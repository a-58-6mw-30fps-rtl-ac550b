// fpg: feature pyramid generation.  Produces the 12-level HOG feature pyramid
// directly from the pixel stream (no image pyramid), already projected onto the
// sparse basis, at up to three features per cycle.
//
// The filter bank computes per-level partial histograms; they are split over
// three time-shared histogram/normalisation engines, engine 0 serving levels
// {1,3,5,7,9}, engine 1 {0,11} and engine 2 {2,4,6,8,10} (5, 2 and 5 levels,
// which balances the number of cells per engine), each behind its own
// multi-input FIFO.  Each engine's 13-D features go through their own basis
// projection unit; outputs f_valid[e] / f[e] / f_pos[e] are held until
// f_ready[e].  The three basis projection units hold identical copies of the
// basis vectors, all written by s_we.  frame_done pulses once the filter bank
// has flushed and every engine and projection unit is idle.
module fpg
  import dpm_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pix_valid,
  input  logic [7:0]            pix,
  output logic                  pix_busy,
  input  logic                  s_we,
  input  logic [7:0]            s_addr,
  input  logic signed [S_W-1:0] s_data,
  output logic [2:0]            f_valid,
  input  logic [2:0]            f_ready,
  output logic signed [P_W-1:0] f     [3][DIM],
  output fpos_t                 f_pos [3],
  output logic                  frame_done,
  output logic                  overflow
);
  localparam int L0 [5] = '{1, 3, 5, 7, 9};
  localparam int L1 [2] = '{0, 11};
  localparam int L2 [5] = '{2, 4, 6, 8, 10};

  logic [N_LEV-1:0] ph_valid;
  ph_t              ph [N_LEV];
  logic             fb_end;

  filter_bank #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fb (
    .clk, .rst_n, .pix_valid, .pix, .busy(pix_busy), .ph_valid, .ph, .frame_end(fb_end)
  );

  logic [2:0]       q_valid, q_ready, e_busy, fifo_ovf, rq_ovf;
  ph_t              q_data [3];
  logic [2:0]       h_valid, h_ready;
  logic [HOG_W-1:0] h [3][DIM];
  fpos_t            h_pos [3];
  logic [2:0]       p_busy;

  // engine 0
  ph_t in0 [5];
  ph_t in1 [2];
  ph_t in2 [5];
  logic [4:0] v0, v2;
  logic [1:0] v1;
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      in0[i] = ph[L0[i]]; v0[i] = ph_valid[L0[i]];
      in2[i] = ph[L2[i]]; v2[i] = ph_valid[L2[i]];
    end
    for (int i = 0; i < 2; i++) begin in1[i] = ph[L1[i]]; v1[i] = ph_valid[L1[i]]; end
  end

  multi_fifo #(.T(ph_t), .N_IN(5)) u_q0 (.clk, .rst_n, .in_valid(v0), .in_data(in0),
    .out_valid(q_valid[0]), .out_ready(q_ready[0]), .out_data(q_data[0]), .overflow(fifo_ovf[0]));
  multi_fifo #(.T(ph_t), .N_IN(2)) u_q1 (.clk, .rst_n, .in_valid(v1), .in_data(in1),
    .out_valid(q_valid[1]), .out_ready(q_ready[1]), .out_data(q_data[1]), .overflow(fifo_ovf[1]));
  multi_fifo #(.T(ph_t), .N_IN(5)) u_q2 (.clk, .rst_n, .in_valid(v2), .in_data(in2),
    .out_valid(q_valid[2]), .out_ready(q_ready[2]), .out_data(q_data[2]), .overflow(fifo_ovf[2]));

  hist_norm_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_LV(5), .LEVS(L0)) u_e0 (
    .clk, .rst_n, .in_valid(q_valid[0]), .in_ready(q_ready[0]), .in_ph(q_data[0]),
    .feat_valid(h_valid[0]), .feat_ready(h_ready[0]), .feat(h[0]), .feat_pos(h_pos[0]),
    .busy(e_busy[0]), .rq_overflow(rq_ovf[0]));
  hist_norm_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_LV(2), .LEVS(L1)) u_e1 (
    .clk, .rst_n, .in_valid(q_valid[1]), .in_ready(q_ready[1]), .in_ph(q_data[1]),
    .feat_valid(h_valid[1]), .feat_ready(h_ready[1]), .feat(h[1]), .feat_pos(h_pos[1]),
    .busy(e_busy[1]), .rq_overflow(rq_ovf[1]));
  hist_norm_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_LV(5), .LEVS(L2)) u_e2 (
    .clk, .rst_n, .in_valid(q_valid[2]), .in_ready(q_ready[2]), .in_ph(q_data[2]),
    .feat_valid(h_valid[2]), .feat_ready(h_ready[2]), .feat(h[2]), .feat_pos(h_pos[2]),
    .busy(e_busy[2]), .rq_overflow(rq_ovf[2]));

  for (genvar e = 0; e < 3; e++) begin : g_proj
    basis_projection #(.TAG_W($bits(fpos_t))) u_bp (
      .clk, .rst_n, .s_we, .s_addr, .s_data,
      .in_valid(h_valid[e]), .in_ready(h_ready[e]), .h(h[e]), .in_tag(h_pos[e]),
      .out_valid(f_valid[e]), .out_ready(f_ready[e]), .p(f[e]), .out_tag(f_pos[e])
    );
    assign p_busy[e] = f_valid[e] || !h_ready[e];
  end

  assign overflow = |{fifo_ovf, rq_ovf};

  // frame completion: flush finished and the pipeline drained
  // (wait a few cycles after the flush so the last partial histograms are queued)
  logic [2:0] ended;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ended <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (fb_end) ended <= 3'd1;
      else if (ended != 0 && ended != 3'd4) ended <= ended + 1'b1;
      else if (ended == 3'd4 && !(|q_valid) && !(|e_busy) && !(|h_valid) && !(|p_busy)) begin
        ended <= '0; frame_done <= 1'b1;
      end
    end
  end
endmodule
