// dpm_top: deformable-parts-model object detection accelerator for a
// IMG_W x IMG_H pixel stream with two programmable classification engines.
//
// Data flow: pixels (1 per cycle, raster order) -> feature pyramid generation
// (12 levels, projected 13-D features, up to 3 per cycle) -> for root levels
// (3..11) both classification engines' root classifiers, and for part levels
// (0..8) the vector quantiser, whose 8-bit indices fill the feature storage
// line buffers.  Each engine prunes windows on their root score and runs its
// eight part classifiers on the stored features (de-quantised through the
// shared centroid register file) for the remaining candidates.
//
// A feature leaves the FPG once every consumer it needs has taken it; root
// consumers are served one channel at a time (lowest channel first), the VQ
// takes all waiting channels as one batch.  det_en[c] gates the clock of engine
// c, parts_en[c] the clock of its parts section (the four unit-level clock
// enables).  A frame starts with the first pixel after reset or after
// frame_done; the host must wait for frame_done before sending the next frame.
// frame_done pulses when every feature of the frame has been produced and
// every enabled engine is idle.  Configuration uses the address map of dpm_pkg
// (cfg_addr[23:20] = region); weights of a disabled engine cannot be written.
module dpm_top
  import dpm_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [7:0]  pix,
  output logic        pix_ready,
  input  logic        cfg_we,
  input  logic [23:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic [1:0]  det_en,
  input  logic [1:0]  parts_en,
  output logic [1:0]  det_valid,
  output det_t        det [2],
  output logic        frame_done,
  output logic [31:0] n_kept [2],
  output logic [31:0] n_pruned [2],
  output logic [31:0] n_parts_done [2],
  output logic [31:0] n_late [2],
  output logic        overflow
);
  localparam int N_RD = 2 * N_PARTS;

  // ---------------- frame control ----------------
  logic in_frame, frame_start, fpg_busy, fpg_done, fpg_ovf, wait_ce;
  logic [1:0] ce_idle, ce_ovf;
  assign pix_ready   = !fpg_busy && !wait_ce;
  assign frame_start = pix_valid && pix_ready && !in_frame;

  // ---------------- configuration decode ----------------
  logic [3:0] region;
  assign region = cfg_addr[23:20];
  logic s_we, c_we;
  assign s_we = cfg_we && region == CFG_BASIS;
  assign c_we = cfg_we && region == CFG_CENT;
  logic [1:0] ce_we;
  assign ce_we[0] = cfg_we && (region == CFG_CE_REG || region == CFG_ROOT_W || region == CFG_PART_W) && !cfg_addr[19];
  assign ce_we[1] = cfg_we && (region == CFG_CE_REG || region == CFG_ROOT_W || region == CFG_PART_W) &&  cfg_addr[19];

  // ---------------- feature pyramid generation ----------------
  logic [2:0]            f_valid, f_ready;
  logic signed [P_W-1:0] f [3][DIM];
  fpos_t                 f_pos [3];

  fpg #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fpg (
    .clk, .rst_n, .pix_valid(pix_valid && pix_ready), .pix, .pix_busy(fpg_busy),
    .s_we, .s_addr(cfg_addr[7:0]), .s_data(cfg_wdata[S_W-1:0]),
    .f_valid, .f_ready, .f, .f_pos, .frame_done(fpg_done), .overflow(fpg_ovf)
  );

  // ---------------- distribution to root path and VQ ----------------
  logic [2:0] root_done, vq_done, need_root, need_vq, is_root, is_part;
  logic [1:0] g;                     // channel granted to the root path
  logic       root_any, root_ok, root_fire;
  logic [1:0] ce_ready;
  logic [2:0] vq_ready;

  always_comb begin
    for (int e = 0; e < 3; e++) begin
      is_root[e]   = int'(f_pos[e].lev) >= ROOT_LEV0;
      is_part[e]   = int'(f_pos[e].lev) < N_PART_LEV;
      need_root[e] = f_valid[e] && is_root[e] && !root_done[e];
      need_vq[e]   = f_valid[e] && is_part[e] && !vq_done[e];
    end
    g = need_root[0] ? 2'd0 : need_root[1] ? 2'd1 : 2'd2;
    root_any  = |need_root;
    root_ok   = (ce_ready[0] || !det_en[0]) && (ce_ready[1] || !det_en[1]);
    root_fire = root_any && root_ok;
    for (int e = 0; e < 3; e++)
      f_ready[e] = (!is_root[e] || root_done[e] || (root_fire && g == 2'(e))) &&
                   (!is_part[e] || vq_done[e] || (need_vq[e] && vq_ready[e]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      root_done <= '0; vq_done <= '0;
    end else begin
      for (int e = 0; e < 3; e++) begin
        if (f_valid[e] && f_ready[e]) begin
          root_done[e] <= 1'b0; vq_done[e] <= 1'b0;
        end else begin
          if (root_fire && g == 2'(e)) root_done[e] <= 1'b1;
          if (need_vq[e] && vq_ready[e]) vq_done[e] <= 1'b1;
        end
      end
    end
  end

  // ---------------- vector quantisation and feature storage ----------------
  logic [4:0]            cent_row;
  logic signed [P_W-1:0] vq_cent [8][DIM];
  logic [7:0]            dq_idx  [N_RD];
  logic signed [P_W-1:0] dq_cent [N_RD][DIM];
  logic [2:0]            q_valid;
  logic [7:0]            q [3];
  logic [$bits(fpos_t)-1:0] f_tag [3], q_tag [3];
  fpos_t                 q_pos [3];
  fpos_t                 rd_pos [N_RD];
  logic [7:0]            rd_idx [N_RD];
  logic [CX_W-1:0]       rows_done [N_PART_LEV];
  logic                  vq_idle;

  centroid_rf #(.N_RD(N_RD)) u_cent (
    .clk, .we(c_we), .waddr(cfg_addr[11:4]), .wdim(cfg_addr[3:0]), .wdata(cfg_wdata[P_W-1:0]),
    .vq_row(cent_row), .vq_cent, .dq_idx, .dq_cent
  );

  always_comb
    for (int e = 0; e < 3; e++) begin
      f_tag[e] = f_pos[e];
      q_pos[e] = fpos_t'(q_tag[e]);
    end

  vq_unit #(.TAG_W($bits(fpos_t))) u_vq (
    .clk, .rst_n, .in_valid(need_vq), .in_ready(vq_ready), .f, .in_tag(f_tag),
    .cent_row, .cent(vq_cent), .q_valid, .q, .q_tag
  );
  assign vq_idle = &vq_ready;

  feature_memory #(.IMG_W(IMG_W), .N_RD(N_RD)) u_fs (
    .clk, .rst_n, .frame_start, .wr_valid(q_valid), .wr_pos(q_pos), .wr_idx(q),
    .rows_done, .rd_pos, .rd_idx
  );

  // ---------------- classification engines ----------------
  for (genvar c = 0; c < 2; c++) begin : g_ce
    logic  cclk;
    fpos_t fsp [N_PARTS];
    logic [7:0] fsi [N_PARTS], dqi [N_PARTS];
    logic signed [P_W-1:0] dqc [N_PARTS][DIM];
    logic [31:0] nk, np, npd, nl;

    clock_gate u_cg (.clk, .en(det_en[c]), .gclk(cclk));

    always_comb
      for (int q2 = 0; q2 < N_PARTS; q2++) begin
        rd_pos[c*N_PARTS + q2] = fsp[q2];
        fsi[q2]                = rd_idx[c*N_PARTS + q2];
        dq_idx[c*N_PARTS + q2] = dqi[q2];
        dqc[q2]                = dq_cent[c*N_PARTS + q2];
      end

    class_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ce (
      .clk(cclk), .rst_n, .frame_start, .parts_on(parts_en[c]),
      .cfg_we(ce_we[c]), .cfg_addr, .cfg_wdata,
      .f_valid(root_any && det_en[c] && root_ok), .f_ready(ce_ready[c]), .f(f[g]), .f_pos(f_pos[g]),
      .rows_done, .fs_pos(fsp), .fs_idx(fsi), .dq_idx(dqi), .dq_cent(dqc),
      .det_valid(det_valid[c]), .det(det[c]),
      .n_kept(nk), .n_pruned(np), .n_parts_done(npd), .n_late(nl),
      .cand_overflow(ce_ovf[c]), .idle(ce_idle[c])
    );
    assign n_kept[c] = nk;
    assign n_pruned[c] = np;
    assign n_parts_done[c] = npd;
    assign n_late[c] = nl;
  end

  assign overflow = fpg_ovf | (|(ce_ovf & det_en));

  // frame bookkeeping: after the FPG drains, wait for the VQ and the engines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0; wait_ce <= 1'b0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) in_frame <= 1'b1;
      if (fpg_done) wait_ce <= 1'b1;
      if (wait_ce && vq_idle && !(|q_valid) && !(|f_valid) &&
          (ce_idle[0] || !det_en[0]) && (ce_idle[1] || !det_en[1])) begin
        wait_ce <= 1'b0; in_frame <= 1'b0; frame_done <= 1'b1;
      end
    end
  end
endmodule
