// ind_counter: the individuals counter of a PE.
//
// Counts 0..N-1 while en is high and wraps to 0; idx selects the current
// individual in both register banks and last flags the final individual of
// the tile, which ends the initialisation phase or a generation. clear
// forces 0. Reset value 0.
module ind_counter
  import cga_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = idx_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  output logic [IW-1:0] idx,
  output logic          last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     idx <= '0;
    else if (clear) idx <= '0;
    else if (en)    idx <= last ? '0 : idx + 1'b1;
  end

  assign last = (idx == IW'(N - 1));

endmodule
