// bank_temp: register bank of temporal individuals of one PE.
//
// During a generation the best individual produced for position idx is
// written here (we) so that the actual bank, which neighbours are still
// reading, stays untouched; this gives the synchronous update of a
// canonical cellular GA. At the end of the generation all N entries are
// copied at once into the actual bank, so every entry is a parallel output.
// Storage resets to zero (this implementation's choice).
module bank_temp
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64,
  parameter int unsigned N   = 16,
  parameter int unsigned IW  = idx_w(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IW-1:0]    idx,
  input  logic [LEN-1:0]   wr_chrom,
  input  logic [FIT_W-1:0] wr_fit,
  output logic [LEN-1:0]   chrom [N],
  output logic [FIT_W-1:0] fit   [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        chrom[k] <= '0;
        fit[k]   <= '0;
      end
    end else if (we) begin
      chrom[idx] <= wr_chrom;
      fit[idx]   <= wr_fit;
    end
  end

endmodule
