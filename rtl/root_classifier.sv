// root_classifier: on-the-fly root SVM classification over the root pyramid
// levels (3..11) with weights stored in the sparse projected space.
//
// Every projected feature at (x, y) of a root level contributes to each window
// whose FH x FW filter covers it: filter cell (i, j) of window (x-j, y-i).  The
// unit walks the filter cells four at a time with four selected-MAC engines
// (ceil(FH*FW/4) cycles per feature, in_ready low meanwhile) and adds each
// product into the window's partial score in the scores memory.  Features
// arrive in raster order per level, so cell (0,0) of a window is always its
// first contribution (it initialises the entry) and cell (FH-1, FW-1) its last
// (the score plus the bias is then emitted with rs_valid for one cycle).  The
// scores memory holds one entry per (window row mod 16, column) per level.
// Weights: up to 208 cells of 43 bits (flag + six 5-bit weights), cell index
// i*FW+j.  The four engines and the 43-bit cell follow the design; the memory
// organisation, the single-step accumulation and the bias are this design's.
module root_classifier
  import dpm_pkg::*;
#(
  parameter int IMG_W     = 1920,
  parameter int IMG_H     = 1080,
  parameter int N_MAC     = 4,
  parameter int MAX_FH    = 16,
  parameter int MAX_CELLS = 208
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  w_we,
  input  logic [7:0]            w_addr,
  input  wcell_t                w_data,
  input  logic [4:0]            fh,
  input  logic [4:0]            fw,
  input  logic signed [SCORE_W-1:0] bias,
  // projected features of root levels
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [P_W-1:0] p [DIM],
  input  fpos_t                 pos,
  // window root scores
  output logic                  rs_valid,
  output fpos_t                 rs_pos,
  output logic signed [SCORE_W-1:0] rs
);
  function automatic int lw(input int rl);
    return feat_len(IMG_W, rl + ROOT_LEV0);
  endfunction
  function automatic int lh(input int rl);
    return feat_len(IMG_H, rl + ROOT_LEV0);
  endfunction
  function automatic int base(input int rl);
    int b;
    b = 0;
    for (int m = 0; m < rl; m++) b += lw(m) * MAX_FH;
    return b;
  endfunction
  localparam int DEPTH = base(N_ROOT_LEV);
  localparam int AW    = $clog2(DEPTH);

  wcell_t                    wmem   [MAX_CELLS];
  logic signed [SCORE_W-1:0] scores [DEPTH];

  always_ff @(posedge clk)
    if (w_we && int'(w_addr) < MAX_CELLS) wmem[w_addr] <= w_data;

  logic                  busy;
  logic signed [P_W-1:0] p_q [DIM];
  fpos_t                 pos_q;
  logic [7:0]            c_q;        // first cell index of this cycle
  logic [4:0]            i_q, j_q;   // its filter row / column
  logic [7:0]            ncells;

  assign ncells   = 8'(fh) * 8'(fw);
  assign in_ready = !busy;

  // per-engine cell coordinates, window, memory address
  logic [4:0]             ci [N_MAC], cj [N_MAC];
  logic [N_MAC-1:0]       act;
  logic [AW-1:0]          wa [N_MAC];
  logic signed [P_W+WT_W+2:0] prod [N_MAC];
  always_comb begin
    logic [4:0] ii, jj;
    int rl, wx, wy;
    ii = i_q; jj = j_q;
    rl = int'(pos_q.lev) - ROOT_LEV0;
    for (int m = 0; m < N_MAC; m++) begin
      ci[m] = ii; cj[m] = jj;
      wx = int'(pos_q.x) - int'(jj);
      wy = int'(pos_q.y) - int'(ii);
      act[m] = busy && (int'(c_q) + m < int'(ncells)) && rl >= 0 && rl < N_ROOT_LEV &&
               wx >= 0 && wy >= 0 && wx + int'(fw) <= lw(rl) && wy + int'(fh) <= lh(rl);
      wa[m] = act[m] ? AW'(base(rl) + (wy % MAX_FH) * lw(rl) + wx) : '0;
      jj = jj + 1'b1;
      if (jj == fw) begin jj = '0; ii = ii + 1'b1; end
    end
  end

  for (genvar m = 0; m < N_MAC; m++) begin : g_mac
    selected_mac u_mac (
      .p    (p_q),
      .wc (wmem[int'(c_q) + m < MAX_CELLS ? int'(c_q) + m : 0]),
      .score(prod[m])
    );
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < N_MAC; m++)
      if (act[m]) begin
        if (ci[m] == 0 && cj[m] == 0) scores[wa[m]] <= SCORE_W'(prod[m]);
        else                          scores[wa[m]] <= scores[wa[m]] + SCORE_W'(prod[m]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; c_q <= '0; i_q <= '0; j_q <= '0; pos_q <= '0;
      rs_valid <= 1'b0; rs_pos <= '0; rs <= '0;
      for (int d = 0; d < DIM; d++) p_q[d] <= '0;
    end else begin
      rs_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1; p_q <= p; pos_q <= pos;
          c_q <= '0; i_q <= '0; j_q <= '0;
        end
      end else begin
        for (int m = 0; m < N_MAC; m++)
          if (act[m] && ci[m] == fh - 1'b1 && cj[m] == fw - 1'b1) begin
            rs_valid <= 1'b1;
            rs_pos.lev <= pos_q.lev;
            rs_pos.x   <= pos_q.x - CX_W'(cj[m]);
            rs_pos.y   <= pos_q.y - CX_W'(ci[m]);
            rs <= ((ci[m] == 0 && cj[m] == 0) ? SCORE_W'(prod[m])
                                              : scores[wa[m]] + SCORE_W'(prod[m])) + bias;
          end
        if (int'(c_q) + N_MAC >= int'(ncells)) busy <= 1'b0;
        c_q <= c_q + 8'(N_MAC);
        i_q <= ci[N_MAC-1]; j_q <= cj[N_MAC-1];
        // advance one more cell past the last engine
        if (cj[N_MAC-1] + 1'b1 == fw) begin j_q <= '0; i_q <= ci[N_MAC-1] + 1'b1; end
        else j_q <= cj[N_MAC-1] + 1'b1;
      end
    end
  end
endmodule
