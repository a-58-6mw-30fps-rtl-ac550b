// multi_fifo: the FIFO in front of a histogram engine.  Several pyramid levels
// can finish a cell segment in the same cycle, so the FIFO accepts up to N_IN
// writes per cycle (stored in input order, lowest index first) and gives one
// entry per cycle at its head (out_valid / out_ready).  Writes that do not fit
// are dropped and set the sticky overflow flag.  The per-engine FIFO follows the
// design; the depth and the multi-write scheme are this design's choices.
module multi_fifo #(
  parameter type T     = logic [7:0],
  parameter int  N_IN  = 5,
  parameter int  DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in_valid,
  input  T                in_data [N_IN],
  output logic            out_valid,
  input  logic            out_ready,
  output T                out_data,
  output logic            overflow
);
  localparam int AW = $clog2(DEPTH);
  T            mem [DEPTH];
  logic [AW:0] wp, rp, count;
  logic        pop;

  assign count     = wp - rp;
  assign out_valid = (count != 0);
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      logic [AW:0] w, free;
      w    = wp;
      free = (AW+1)'(DEPTH) - count + (AW+1)'(pop);
      for (int i = 0; i < N_IN; i++)
        if (in_valid[i]) begin
          if (free != 0) begin
            mem[w[AW-1:0]] <= in_data[i];
            w    = w + 1'b1;
            free = free - 1'b1;
          end else overflow <= 1'b1;
        end
      wp <= w;
      if (pop) rp <= rp + 1'b1;
    end
  end
endmodule
