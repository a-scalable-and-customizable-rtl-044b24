// ca_prng: pseudo-random number generator built from a one-dimensional
// hybrid cellular automaton mixing rules 90 and 150.
//
// Each cell takes the XOR of its two neighbours (rule 90); cells marked in
// the rule mask also XOR in their own value (rule 150). Boundaries are null
// (missing neighbours read as 0). The whole WIDTH-bit state is the random
// word; it advances once per clock while en is high. A rules-90/150 CA
// generator is what the design calls for; the mask pattern (rule 150 on
// every cell whose index is a multiple of 3 or 4 apart from the edges), the
// null boundary and the way a short seed fills the wide state are this
// implementation's own choices.
//
// Interface: load_en copies the SEED_W-bit seed, repeated and mixed with a
// fixed pattern, into the state on the next edge; otherwise en steps the
// automaton. An all-zero state is replaced by a single one so the generator
// can never lock up. rnd is the registered state (no combinational path).
module ca_prng #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned SEED_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_en,
  input  logic [SEED_W-1:0] seed,
  input  logic              en,
  output logic [WIDTH-1:0]  rnd
);

  logic [WIDTH-1:0] state_q, next_state, seeded;

  // Cells that follow rule 150; all others follow rule 90.
  function automatic logic [WIDTH-1:0] rule150_mask();
    logic [WIDTH-1:0] m;
    for (int k = 0; k < WIDTH; k++)
      m[k] = ((k % 3) == 0) || ((k % 4) == 1);
    return m;
  endfunction

  localparam logic [WIDTH-1:0] MASK = rule150_mask();

  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      logic l, r;
      l = (k == 0)         ? 1'b0 : state_q[k-1];
      r = (k == WIDTH - 1) ? 1'b0 : state_q[k+1];
      next_state[k] = l ^ r ^ (MASK[k] & state_q[k]);
    end
  end

  // Seed expansion: the seed repeated over the width, each copy XORed
  // with the low bits of its copy number, so different seeds give
  // different states and seed 0 still gives a non-zero state.
  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      int unsigned copy;
      copy = k / SEED_W;
      seeded[k] = seed[k % SEED_W] ^ 1'((copy >> (k % SEED_W)) & 1)
                  ^ ((k % SEED_W) == 0 && copy == 0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state_q <= {{(WIDTH-1){1'b0}}, 1'b1};
    else if (load_en)
      state_q <= (seeded == '0) ? {{(WIDTH-1){1'b0}}, 1'b1} : seeded;
    else if (en)
      state_q <= (next_state == '0) ? {{(WIDTH-1){1'b0}}, 1'b1} : next_state;
  end

  assign rnd = state_q;

endmodule
