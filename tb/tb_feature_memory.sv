// tb_feature_memory: writes a whole small part pyramid level by level in
// raster order (three writes per cycle at most) and checks that reads return
// the last 32 rows, and that rows_done follows the completed rows.
`timescale 1ns/1ps
module tb_feature_memory;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 480, IH = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic frame_start = 0;
  logic [2:0] wr_valid = 0;
  fpos_t wr_pos [3];
  logic [7:0] wr_idx [3];
  logic [CX_W-1:0] rows_done [N_PART_LEV];
  fpos_t rd_pos [2];
  logic [7:0] rd_idx [2];
  feature_memory #(.IMG_W(IW), .N_RD(2)) dut (.*);

  function automatic logic [7:0] val(int l, int x, int y);
    return 8'(l * 37 + x * 11 + y * 5);
  endfunction

  initial begin
    for (int i = 0; i < 3; i++) begin wr_pos[i] = '0; wr_idx[i] = '0; end
    for (int i = 0; i < 2; i++) rd_pos[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int l = 0; l < N_PART_LEV; l++) begin
      int W, H;
      W = feat_len(IW, l); H = feat_len(IH, l);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          wr_valid = 3'b010;   // use the middle port
          wr_pos[1] = '{lev: LEV_W'(l), x: CX_W'(x), y: CX_W'(y)};
          wr_idx[1] = val(l, x, y);
        end
        @(negedge clk); wr_valid = 0;
        @(posedge clk); #1;
        `CHECK(int'(rows_done[l]) == y + 1, $sformatf("rows_done level %0d = %0d, want %0d", l, rows_done[l], y + 1))
        // read back random features of the last 32 rows
        for (int k = 0; k < 4; k++) begin
          int ry, rx;
          ry = y - int'($urandom % 32); if (ry < 0) ry = 0;
          rx = $urandom % W;
          rd_pos[k % 2] = '{lev: LEV_W'(l), x: CX_W'(rx), y: CX_W'(ry)};
          #1;
          `CHECK(rd_idx[k % 2] == val(l, rx, ry), $sformatf("read l%0d x%0d y%0d", l, rx, ry))
        end
      end
    end
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    `CHECK(rows_done[0] == 0, "rows_done cleared by frame_start")
    `FINISH
  end
endmodule
