// fitness_mmdp: Massively Multimodal Deceptive Problem fitness
// (combinational).
//
// The chromosome is cut into Q = LEN/6 sub-problems of 6 bits (sub-problem
// 0 in bits 5:0); each is scored by the number of ones it holds through the
// table below, and the scores are summed. Bits above 6*Q are ignored.
//   ones   0     1     2        3        4        5     6
//   value  1.0   0.0   0.36038  0.64057  0.36038  0.0   1.0
// Values are fixed point with MMDP_FRAC = 12 fraction bits (1.0 = 4096,
// 0.36038 -> 1476, 0.64057 -> 2624, rounded to nearest); the fixed-point
// scale is this implementation's choice. The optimum is Q * 4096.
module fitness_mmdp
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 66
) (
  input  logic [LEN-1:0]   chrom,
  output logic [FIT_W-1:0] fit
);

  localparam int unsigned Q = LEN / 6;

  function automatic logic [FIT_W-1:0] sub_value(input logic [2:0] ones);
    case (ones)
      3'd0, 3'd6: return FIT_W'(4096);
      3'd2, 3'd4: return FIT_W'(1476);
      3'd3:       return FIT_W'(2624);
      default:    return '0;
    endcase
  endfunction

  always_comb begin
    fit = '0;
    for (int s = 0; s < Q; s++) begin
      logic [2:0] ones;
      ones = '0;
      for (int b = 0; b < 6; b++)
        ones = ones + 3'(chrom[6*s+b]);
      fit = fit + sub_value(ones);
    end
  end

endmodule
