// fitness_unit: the interchangeable objective-function slot of a PE.
//
// PROBLEM chooses which benchmark evaluator is built (MAX ONE, ISO-PEAK or
// MMDP); only that one is elaborated. All three are single-cycle
// combinational functions of the chromosome, giving FIT_W-bit unsigned
// scores where larger is fitter. Swapping the objective means changing this
// parameter (or adding a branch here) and re-synthesizing.
module fitness_unit
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter problem_e    PROBLEM = PROB_MAXONE
) (
  input  logic [LEN-1:0]   chrom,
  output logic [FIT_W-1:0] fit
);

  if (PROBLEM == PROB_ISOPEAK) begin : g_isopeak
    fitness_isopeak #(.LEN(LEN)) u_fit (.chrom(chrom), .fit(fit));
  end else if (PROBLEM == PROB_MMDP) begin : g_mmdp
    fitness_mmdp #(.LEN(LEN)) u_fit (.chrom(chrom), .fit(fit));
  end else begin : g_maxone
    fitness_maxone #(.LEN(LEN)) u_fit (.chrom(chrom), .fit(fit));
  end

endmodule
