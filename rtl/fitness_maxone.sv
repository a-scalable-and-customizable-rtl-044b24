// fitness_maxone: MAX ONE benchmark fitness, the number of ones in the
// chromosome (maximum = LEN). Purely combinational so one individual is
// evaluated per clock, as the design expects of its benchmark problems.
module fitness_maxone
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64
) (
  input  logic [LEN-1:0]   chrom,
  output logic [FIT_W-1:0] fit
);

  always_comb begin
    fit = '0;
    for (int k = 0; k < LEN; k++)
      fit = fit + FIT_W'(chrom[k]);
  end

endmodule
