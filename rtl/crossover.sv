// crossover: two-point crossover built from a crossover-operator string
// and AND/OR gates.
//
// Two random numbers (pos_a, pos_b, each reduced modulo LEN) bound an
// interval; the operator string has ones at every bit position inside the
// interval, both ends included, and zeros elsewhere. Where the string is 0
// each offspring keeps its own parent's gene, where it is 1 the parents'
// genes are exchanged:
//   off1 = (p1 & ~op) | (p2 & op)
//   off2 = (p2 & ~op) | (p1 & op)
// The interval rule and the gate network follow the design; reducing the
// random numbers modulo LEN and including both ends are this
// implementation's choices. Purely combinational.
module crossover
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64,
  parameter int unsigned PW  = idx_w(LEN)
) (
  input  logic [LEN-1:0] p1,
  input  logic [LEN-1:0] p2,
  input  logic [PW-1:0]  pos_a,
  input  logic [PW-1:0]  pos_b,
  output logic [LEN-1:0] op,
  output logic [LEN-1:0] off1,
  output logic [LEN-1:0] off2
);

  logic [PW-1:0] a, b, lo, hi;

  always_comb begin
    a  = PW'(int'(pos_a) % LEN);
    b  = PW'(int'(pos_b) % LEN);
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    for (int k = 0; k < LEN; k++)
      op[k] = (PW'(k) >= lo) && (PW'(k) <= hi);
  end

  assign off1 = (p1 & ~op) | (p2 & op);
  assign off2 = (p2 & ~op) | (p1 & op);

endmodule
