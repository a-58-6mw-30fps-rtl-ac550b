// feature_memory: the feature storage (FS) line buffers holding vector-
// quantised HOG features of the part levels (0..8) for parts classification.
//
// Each part level keeps its last 32 feature rows (twice the 16-cell maximum
// root window height) as 8-bit centroid indices in a circular buffer: row y
// lives in slot y mod 32.  Up to three quantised features are written per cycle
// (one per VQ engine).  rows_done[l] counts the rows of level l whose last
// column has been written; a reader may use rows rows_done-32 .. rows_done-1.
// Reads are combinational, one index per port.  The levels share one array
// with per-level base offsets; port count and layout are this design's own.
module feature_memory
  import dpm_pkg::*;
#(
  parameter int IMG_W  = 1920,
  parameter int N_ROWS = 32,
  parameter int N_WR   = 3,
  parameter int N_RD   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic [N_WR-1:0]   wr_valid,
  input  fpos_t             wr_pos [N_WR],
  input  logic [7:0]        wr_idx [N_WR],
  output logic [CX_W-1:0]   rows_done [N_PART_LEV],
  input  fpos_t             rd_pos [N_RD],
  output logic [7:0]        rd_idx [N_RD]
);
  function automatic int lw(input int l);
    return feat_len(IMG_W, l);
  endfunction
  function automatic int base(input int l);
    int b;
    b = 0;
    for (int m = 0; m < l; m++) b += lw(m) * N_ROWS;
    return b;
  endfunction
  localparam int TOTAL = base(N_PART_LEV);
  localparam int AW    = $clog2(TOTAL);
  localparam int RW    = $clog2(N_ROWS);

  logic [7:0] mem [TOTAL];

  function automatic logic [AW-1:0] addr(input fpos_t p);
    int a;
    a = base(int'(p.lev)) + int'(p.y[RW-1:0]) * lw(int'(p.lev)) + int'(p.x);
    return AW'(a);
  endfunction

  always_ff @(posedge clk)
    for (int w = 0; w < N_WR; w++)
      if (wr_valid[w] && int'(wr_pos[w].lev) < N_PART_LEV)
        mem[addr(wr_pos[w])] <= wr_idx[w];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_PART_LEV; l++) rows_done[l] <= '0;
    end else if (frame_start) begin
      for (int l = 0; l < N_PART_LEV; l++) rows_done[l] <= '0;
    end else begin
      for (int w = 0; w < N_WR; w++)
        if (wr_valid[w] && int'(wr_pos[w].lev) < N_PART_LEV &&
            int'(wr_pos[w].x) == lw(int'(wr_pos[w].lev)) - 1)
          rows_done[wr_pos[w].lev] <= wr_pos[w].y + 1'b1;
    end
  end

  always_comb
    for (int r = 0; r < N_RD; r++)
      rd_idx[r] = (int'(rd_pos[r].lev) < N_PART_LEV) ? mem[addr(rd_pos[r])] : 8'd0;
endmodule
