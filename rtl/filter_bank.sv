// filter_bank: the per-pixel front end of feature pyramid generation.
//
// Pixels arrive one per cycle in raster order.  Four line buffers and a 5x5
// register window give, for every pixel, the neighbourhood of the pixel two
// rows up and two columns left (the "centre").  Twelve lpf_gradient units, one
// per pyramid level, low-pass filter and differentiate that neighbourhood in
// parallel, and twelve partial-histogram units add the magnitude into the
// orientation bin of the centre's cell segment: a segment is the c pixels of
// one pixel row inside one cell of size c.  When the centre reaches the last
// column of a segment, the 9-bin segment sum is emitted on ph_valid[l]/ph[l]
// for that cycle together with the cell coordinates and first/last-row flags.
// Centres within two pixels of the image border get zero magnitude.  After the
// last pixel the bank flushes itself for 2*IMG_W+2 cycles (pix_valid ignored)
// so the bottom rows finish; frame_end pulses when the last centre is done.
// Twelve parallel filters and on-the-fly partial histograms follow the design;
// the shared pixel window, the kernels and the flush are this design's.
module filter_bank
  import dpm_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  input  logic [7:0]       pix,
  output logic             busy,        // flushing: pixels are not accepted
  output logic [N_LEV-1:0] ph_valid,
  output ph_t              ph [N_LEV],
  output logic             frame_end
);
  localparam int XW = $clog2(IMG_W + 1);
  localparam int YW = $clog2(IMG_H + 1);
  localparam int LPF_TAB [N_LEV] = '{0, 14, 14, 6, 6, 6, 2, 2, 2, 2, 2, 2};

  logic [7:0]    lb  [4][IMG_W];   // lb[0] = previous row
  logic [7:0]    win [5][5];
  logic [XW-1:0] x;                // column of the incoming pixel
  logic [YW-1:0] y;
  logic [XW-1:0] cx;               // centre column / row
  logic [YW-1:0] cy;
  logic          flush, started;
  logic          step;

  assign busy = flush;
  assign step = flush || pix_valid;

  // input side: line buffers and window
  always_ff @(posedge clk) begin
    if (step) begin
      lb[0][x] <= flush ? 8'd0 : pix;
      for (int r = 1; r < 4; r++) lb[r][x] <= lb[r-1][x];
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
      win[4][4] <= flush ? 8'd0 : pix;
      win[3][4] <= lb[0][x];
      win[2][4] <= lb[1][x];
      win[1][4] <= lb[2][x];
      win[0][4] <= lb[3][x];
    end
  end

  // centre position: two rows and two columns behind the incoming pixel; the
  // window registered this cycle belongs to the centre of the previous step
  logic          cvalid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; flush <= 1'b0; started <= 1'b0;
      cvalid <= 1'b0; frame_end <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      cvalid    <= 1'b0;
      if (step) begin
        // advance incoming coordinate
        if (x == XW'(IMG_W-1)) begin
          x <= '0;
          y <= (y == YW'(IMG_H-1)) ? '0 : y + 1'b1;
        end else x <= x + 1'b1;
        // the centre trails the input by 2*IMG_W+2 pixels
        if (!started) begin
          if (y == YW'(2) && x == XW'(2)) started <= 1'b1;
        end
        cvalid <= started || (y == YW'(2) && x == XW'(2));
        if (!flush && pix_valid && x == XW'(IMG_W-1) && y == YW'(IMG_H-1)) flush <= 1'b1;
        if (flush && x == XW'(1) && y == YW'(2)) begin
          flush <= 1'b0; started <= 1'b0; frame_end <= 1'b1;
          x <= '0; y <= '0;
        end
      end
    end
  end

  // centre coordinate of the window currently registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0;
    end else if (cvalid) begin
      if (cx == XW'(IMG_W-1)) begin
        cx <= '0;
        cy <= (cy == YW'(IMG_H-1)) ? '0 : cy + 1'b1;
      end else cx <= cx + 1'b1;
    end
  end

  logic border;
  assign border = cx < 2 || cx > XW'(IMG_W-3) || cy < 2 || cy > YW'(IMG_H-3);

  for (genvar l = 0; l < N_LEV; l++) begin : g_lev
    localparam int C  = cell_size(l);
    localparam int WC = IMG_W / C;
    localparam int HC = IMG_H / C;
    logic [3:0]  bin;
    logic [8:0]  mag;
    logic [15:0] acc [N_BIN];
    logic [6:0]  mx, my;
    logic [CX_W-1:0] ccx, ccy;

    lpf_gradient #(.LPF_W(LPF_TAB[l])) u_lg (.win, .bin, .mag);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mx <= '0; my <= '0; ccx <= '0; ccy <= '0; ph_valid[l] <= 1'b0; ph[l] <= '0;
        for (int b = 0; b < N_BIN; b++) acc[b] <= '0;
      end else begin
        ph_valid[l] <= 1'b0;
        if (cvalid) begin
          logic [15:0] nxt [N_BIN];
          for (int b = 0; b < N_BIN; b++) begin
            nxt[b] = (mx == 0) ? 16'd0 : acc[b];
            if (!border && int'(bin) == b) nxt[b] = nxt[b] + 16'(mag);
          end
          acc <= nxt;
          if (int'(mx) == C-1) begin
            if (int'(ccx) < WC && int'(ccy) < HC) begin
              ph_valid[l]     <= 1'b1;
              ph[l].lev       <= LEV_W'(l);
              ph[l].cx        <= ccx;
              ph[l].cy        <= ccy;
              ph[l].first_row <= (my == 0);
              ph[l].last_row  <= (int'(my) == C-1);
              for (int b = 0; b < N_BIN; b++) ph[l].hbin[b] <= nxt[b];
            end
          end
          // cell coordinates of the next centre
          if (cx == XW'(IMG_W-1)) begin
            mx <= '0; ccx <= '0;
            if (cy == YW'(IMG_H-1)) begin my <= '0; ccy <= '0; end
            else if (int'(my) == C-1) begin my <= '0; ccy <= ccy + 1'b1; end
            else my <= my + 1'b1;
          end else if (int'(mx) == C-1) begin
            mx <= '0; ccx <= ccx + 1'b1;
          end else mx <= mx + 1'b1;
        end
      end
    end
  end
endmodule
