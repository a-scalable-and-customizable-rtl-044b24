// fitness_isopeak: ISO-PEAK benchmark fitness (combinational).
//
// The chromosome of LEN = 2*m bits is read as m pairs (x1,x2),(x3,x4),...
// with x1 in bit 0. The first pair is scored by Iso2 and every other pair
// by Iso1:
//   pair    00   01   10   11
//   Iso1    m    0    0    m-1
//   Iso2    0    0    0    m
// The global optimum is m^2 (1024 for m = 32): first pair 11, all others
// 00; the all-ones string scores m + (m-1)^2 = 993, a strong local peak. The table
// and the sum follow the benchmark definition; placing x1 in bit 0 and
// reading a pair as {x_(2i-1), x_(2i)} = {low bit, high bit} is this
// implementation's choice.
module fitness_isopeak
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64
) (
  input  logic [LEN-1:0]   chrom,
  output logic [FIT_W-1:0] fit
);

  localparam int unsigned M = LEN / 2;

  always_comb begin
    fit = '0;
    // Iso2 on the first pair
    if (chrom[0] && chrom[1])
      fit = FIT_W'(M);
    // Iso1 on pairs 2..m
    for (int i = 1; i < M; i++) begin
      if (!chrom[2*i] && !chrom[2*i+1])
        fit = fit + FIT_W'(M);
      else if (chrom[2*i] && chrom[2*i+1])
        fit = fit + FIT_W'(M - 1);
    end
  end

endmodule
