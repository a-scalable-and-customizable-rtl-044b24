// genetic_ops: the genetic operations module of a PE, one individual per
// clock, all combinational.
//
// Dataflow: the four neighbour individuals enter a tournament; the winner
// mates the actual (central) individual in a two-point crossover; both
// offspring are mutated and evaluated by two fitness units; the fitter
// offspring then meets the actual individual in the output multiplexer and
// the better of the two is the "best individual" that the PE stores for the
// next generation. The stage order and the final multiplexer follow the
// design. Choices of this implementation: parent 1 is the actual
// individual and parent 2 the selected neighbour; offspring 1 wins a tie
// with offspring 2; an offspring replaces the actual individual when it is
// at least as fit (replaced = 1).
//
// Random inputs: pos_a/pos_b bound the crossover interval, mut_rnd1 and
// mut_rnd2 are the per-gene mutation fields of the two offspring.
module genetic_ops
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter problem_e    PROBLEM = PROB_MAXONE,
  parameter int unsigned PW      = idx_w(LEN),
  parameter int unsigned LW      = idx_w(LEN)
) (
  input  logic [LEN-1:0]    act_chrom,
  input  logic [FIT_W-1:0]  act_fit,
  input  logic [LEN-1:0]    n_chrom, s_chrom, w_chrom, e_chrom,
  input  logic [FIT_W-1:0]  n_fit,   s_fit,   w_fit,   e_fit,
  input  logic [PW-1:0]     pos_a,
  input  logic [PW-1:0]     pos_b,
  input  logic [LEN*LW-1:0] mut_rnd1,
  input  logic [LEN*LW-1:0] mut_rnd2,
  output logic [LEN-1:0]    best_chrom,
  output logic [FIT_W-1:0]  best_fit,
  output logic              replaced
);

  logic [LEN-1:0]   mate_chrom, op, x1, x2, m1, m2, flip1, flip2, off_chrom;
  logic [FIT_W-1:0] mate_fit, f1, f2, off_fit;

  selection_tournament #(.LEN(LEN)) u_sel (
    .n_chrom, .s_chrom, .w_chrom, .e_chrom,
    .n_fit,   .s_fit,   .w_fit,   .e_fit,
    .win_chrom(mate_chrom), .win_fit(mate_fit)
  );

  crossover #(.LEN(LEN), .PW(PW)) u_xo (
    .p1(act_chrom), .p2(mate_chrom), .pos_a, .pos_b,
    .op, .off1(x1), .off2(x2)
  );

  mutation #(.LEN(LEN), .LW(LW)) u_mut1 (
    .chrom_in(x1), .rnd(mut_rnd1), .flip(flip1), .chrom_out(m1));
  mutation #(.LEN(LEN), .LW(LW)) u_mut2 (
    .chrom_in(x2), .rnd(mut_rnd2), .flip(flip2), .chrom_out(m2));

  fitness_unit #(.LEN(LEN), .PROBLEM(PROBLEM)) u_fit1 (.chrom(m1), .fit(f1));
  fitness_unit #(.LEN(LEN), .PROBLEM(PROBLEM)) u_fit2 (.chrom(m2), .fit(f2));

  always_comb begin
    if (f1 >= f2) begin off_chrom = m1; off_fit = f1; end
    else          begin off_chrom = m2; off_fit = f2; end
    replaced = (off_fit >= act_fit);
    if (replaced) begin best_chrom = off_chrom; best_fit = off_fit; end
    else          begin best_chrom = act_chrom; best_fit = act_fit; end
  end

endmodule
