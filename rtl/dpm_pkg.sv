// dpm_pkg: types and constants shared by the deformable-parts-model (DPM)
// detection accelerator.
//
// The pyramid has 12 levels whose HOG cell sizes are the ones the design is
// built around (8, 10, 13, 16, 20, 26, 32, 40, 52, 64, 80, 104 pixels).  Level
// l+3 has exactly twice the cell size of level l, so root filters run on levels
// 3..11 and their parts on levels 0..8.  Features are 13-dimensional; the HOG
// feature uses 10 bits per dimension, the projected feature 11 signed bits and
// an SVM weight cell is a 13-bit non-zero flag plus six 5-bit weights (43 bits).
// The bit widths of the coordinates and the configuration address map are this
// design's own choices.
package dpm_pkg;

  localparam int N_LEV      = 12;
  localparam int DIM        = 13;   // HOG / projected feature dimensions
  localparam int N_BIN      = 9;    // orientation hbin per cell
  localparam int HOG_W      = 10;   // bits per HOG dimension
  localparam int S_W        = 10;   // bits per basis vector element
  localparam int P_W        = 11;   // bits per projected dimension
  localparam int WT_W       = 5;    // bits per sparse SVM weight
  localparam int N_MUL      = 6;    // non-zero weights per cell
  localparam int CELL_W     = DIM + N_MUL * WT_W;  // 43-bit weight cell
  localparam int SCORE_W    = 26;
  localparam int N_CENT     = 256;
  localparam int N_PARTS    = 8;
  localparam int ROOT_LEV0  = 3;    // first root level
  localparam int N_ROOT_LEV = N_LEV - ROOT_LEV0;  // 9
  localparam int N_PART_LEV = N_LEV - ROOT_LEV0;  // parts on levels 0..8
  localparam int CX_W       = 8;    // feature column / row coordinate width
  localparam int LEV_W      = 4;

  typedef logic [HOG_W-1:0]           hog_t  [DIM];
  typedef logic signed [P_W-1:0]      pdim_t;
  typedef logic signed [SCORE_W-1:0]  score_t;

  // Cell size of pyramid level l.
  function automatic int cell_size(input int l);
    case (l)
      0: return 8;   1: return 10;  2: return 13;  3: return 16;
      4: return 20;  5: return 26;  6: return 32;  7: return 40;
      8: return 52;  9: return 64;  10: return 80; default: return 104;
    endcase
  endfunction

  // Cells per row / column of a level and number of features (borders dropped).
  function automatic int cells(input int len, input int l);
    return len / cell_size(l);
  endfunction
  function automatic int feat_len(input int len, input int l);
    int n;
    n = len / cell_size(l) - 2;
    return (n < 1) ? 1 : n;
  endfunction

  // Sparse weight cell: {w5,..,w0, flag}; weight k belongs to the k-th set flag bit.
  typedef struct packed {
    logic [N_MUL-1:0][WT_W-1:0] w;
    logic [DIM-1:0]             flag;
  } wcell_t;

  // A partial histogram: the 9-bin sum over one cell-wide row segment.
  typedef struct packed {
    logic [LEV_W-1:0]          lev;
    logic [CX_W-1:0]           cx;
    logic [CX_W-1:0]           cy;
    logic                      first_row;  // first pixel row of the cell
    logic                      last_row;   // last pixel row of the cell
    logic [N_BIN-1:0][15:0]    hbin;
  } ph_t;

  // A feature with its place in the pyramid (feature-map coordinates).
  typedef struct packed {
    logic [LEV_W-1:0]          lev;
    logic [CX_W-1:0]           x;
    logic [CX_W-1:0]           y;
  } fpos_t;

  // Detection: pyramid level, root window top-left in feature cells, DPM score.
  typedef struct packed {
    logic [LEV_W-1:0]          lev;
    logic [CX_W-1:0]           x;
    logic [CX_W-1:0]           y;
    logic signed [SCORE_W-1:0] score;
  } det_t;

  // Configuration address map (cfg_addr[23:20] selects the region).
  localparam logic [3:0] CFG_BASIS  = 4'h1;  // [7:0] = k*13+d,       data[9:0]
  localparam logic [3:0] CFG_CENT   = 4'h2;  // [11:4] = centroid, [3:0] = dim, data[10:0]
  localparam logic [3:0] CFG_CE_REG = 4'h3;  // [19] = CE, [7:0] = register (see class_engine)
  localparam logic [3:0] CFG_ROOT_W = 4'h4;  // [19] = CE, [7:0] = cell, [8] = high word
  localparam logic [3:0] CFG_PART_W = 4'h5;  // [19] = CE, [11:9] = part, [5:0] = cell, [8] = high word

endpackage
