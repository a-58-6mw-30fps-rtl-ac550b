// tb_dpm_top_full: the same end-to-end test as tb_dpm_top, but with the
// detector at its default parameters (1920x1080 full-HD frames, 12 levels,
// both engines).  The checks are in dpm_top_checks.svh.
`timescale 1ns/1ps
module tb_dpm_top_full;
  import dpm_pkg::*;
  `include "tb_common.svh"
  localparam int IW = 1920, IH = 1080, N_FRAMES = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 8000000)

  logic        pix_valid = 0, pix_ready, cfg_we = 0, frame_done, overflow;
  logic [7:0]  pix;
  logic [23:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [1:0]  det_en, parts_en, det_valid;
  det_t        det [2];
  logic [31:0] n_kept [2], n_pruned [2], n_parts_done [2], n_late [2];
  dpm_top dut (.*);

  `include "dpm_top_checks.svh"
endmodule
