// vq_unit: vector quantisation of projected HOG features to 8-bit centroid
// indices, with three engines sharing one centroid register file.
//
// When idle, the unit accepts every input channel (f1..f3) that is valid and
// starts a batch.  For 32 cycles it presents row r of the eight centroid banks;
// in each engine eight K-means groups compute the sum of squared differences
// (SSD) between the feature and their bank's centroid and keep the running
// minimum distance and its index.  One more cycle takes the minimum of the eight
// group results (lower index on ties) and the engine reports the index
// bank*32+row as q with q_valid for one cycle, together with the tag it was
// given.  A batch therefore takes 34 cycles whatever the number of valid
// channels.  The bank organisation follows the design; the lock-step schedule
// of the three engines and the tie rule are this design's own.
module vq_unit
  import dpm_pkg::*;
#(
  parameter int N_ENG  = 3,
  parameter int N_BANK = 8,
  parameter int BANK_D = 32,
  parameter int TAG_W  = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_ENG-1:0]      in_valid,
  output logic [N_ENG-1:0]      in_ready,
  input  logic signed [P_W-1:0] f      [N_ENG][DIM],
  input  logic [TAG_W-1:0]      in_tag [N_ENG],
  output logic [4:0]            cent_row,
  input  logic signed [P_W-1:0] cent   [N_BANK][DIM],
  output logic [N_ENG-1:0]      q_valid,
  output logic [7:0]            q      [N_ENG],
  output logic [TAG_W-1:0]      q_tag  [N_ENG]
);
  localparam int D_W = 2*(P_W+1) + 4;   // SSD width

  typedef enum logic [1:0] {IDLE, RUN, FINAL} st_t;
  st_t st;

  logic [N_ENG-1:0]      mask;
  logic signed [P_W-1:0] f_q   [N_ENG][DIM];
  logic [D_W-1:0]        mind  [N_ENG][N_BANK];
  logic [4:0]            mini  [N_ENG][N_BANK];
  logic [4:0]            row;

  assign cent_row = row;
  assign in_ready = (st == IDLE) ? {N_ENG{1'b1}} : '0;

  // squared distances for the current row
  logic [D_W-1:0] ssd [N_ENG][N_BANK];
  always_comb begin
    for (int e = 0; e < N_ENG; e++)
      for (int b = 0; b < N_BANK; b++) begin
        logic [D_W-1:0] acc;
        acc = '0;
        for (int d = 0; d < DIM; d++) begin
          logic signed [P_W:0]     df;
          logic signed [2*P_W+1:0] sq;
          df  = (P_W+1)'(f_q[e][d]) - (P_W+1)'(cent[b][d]);
          sq  = df * df;
          acc += D_W'($unsigned(sq));
        end
        ssd[e][b] = acc;
      end
  end

  // minimum of the eight groups
  logic [7:0] best [N_ENG];
  always_comb begin
    for (int e = 0; e < N_ENG; e++) begin
      logic [D_W-1:0] m;
      m = mind[e][0];
      best[e] = {3'd0, mini[e][0]};
      for (int b = 1; b < N_BANK; b++)
        if (mind[e][b] < m) begin
          m = mind[e][b];
          best[e] = 8'(b*BANK_D) + 8'(mini[e][b]);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; mask <= '0; row <= '0; q_valid <= '0;
      for (int e = 0; e < N_ENG; e++) begin
        q[e] <= '0; q_tag[e] <= '0;
        for (int d = 0; d < DIM; d++) f_q[e][d] <= '0;
        for (int b = 0; b < N_BANK; b++) begin mind[e][b] <= '0; mini[e][b] <= '0; end
      end
    end else begin
      q_valid <= '0;
      case (st)
        IDLE: if (|in_valid) begin
          mask <= in_valid;
          for (int e = 0; e < N_ENG; e++)
            if (in_valid[e]) begin f_q[e] <= f[e]; q_tag[e] <= in_tag[e]; end
          row <= '0;
          st  <= RUN;
        end
        RUN: begin
          for (int e = 0; e < N_ENG; e++)
            for (int b = 0; b < N_BANK; b++)
              if (row == 0 || ssd[e][b] < mind[e][b]) begin
                mind[e][b] <= ssd[e][b];
                mini[e][b] <= row;
              end
          row <= row + 1'b1;
          if (row == 5'(BANK_D-1)) st <= FINAL;
        end
        default: begin
          for (int e = 0; e < N_ENG; e++) q[e] <= best[e];
          q_valid <= mask;
          st <= IDLE;
        end
      endcase
    end
  end
endmodule
