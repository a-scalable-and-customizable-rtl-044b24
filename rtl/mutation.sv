// mutation: bit-flip mutation with a per-gene probability of 1/2^LW.
//
// Gene k owns the LW-bit random field rnd[k*LW +: LW], LW = ceil(log2(LEN));
// the gene is inverted when its field is all zeros, which happens with
// probability 1/2^LW (1/64 for 64-bit chromosomes, close to 1/LEN). The
// LEN * LW random bits come from the PE's cellular-automaton generator.
// This follows the design; LW rounding up for LEN not a power of two is
// this implementation's choice. Purely combinational.
module mutation
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64,
  parameter int unsigned LW  = idx_w(LEN)
) (
  input  logic [LEN-1:0]    chrom_in,
  input  logic [LEN*LW-1:0] rnd,
  output logic [LEN-1:0]    flip,
  output logic [LEN-1:0]    chrom_out
);

  always_comb
    for (int k = 0; k < LEN; k++)
      flip[k] = (rnd[k*LW +: LW] == '0);

  assign chrom_out = chrom_in ^ flip;

endmodule
