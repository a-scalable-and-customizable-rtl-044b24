// pe: processor element of the cellular GA array.
//
// A PE evolves N = TILE*TILE individuals of the population, one per clock,
// reusing one genetic operations datapath for all of them. It contains the
// register bank of actual individuals (with the neighbour-port selection),
// the register bank of temporal individuals, the individuals counter, a
// cellular-automaton random number generator, the genetic operations
// module, the control FSM, and two systolic registers: one in the seed
// chain and one in the result chain of its row.
//
// Timing: S0 until DIM seeds have been pushed along the row (each push
// moves the row's seed words one PE east, seed_in -> seed_out); S1, N
// clocks, fills the actual bank with random chromosomes and their fitness;
// then generations of N+1 clocks: N clocks of S2, in which individual idx
// and the four neighbour individuals arriving on in_* produce a best
// individual that is written to the temporal bank, and one clock of S3, in
// which the temporal bank replaces the actual bank. After max_gen
// generations each PE loads the best individual of its last generation
// into res_out and the row shifts these east for DIM clocks (res_in ->
// res_out). All neighbour ports carry individual and fitness.
//
// The block structure follows the design. Own choices: the random word is
// one CA of LEN + 2*LEN*LW cells, bits [LEN-1:0] giving the new random
// chromosome in S1 and its low 2*PW bits the crossover bounds in S2, the
// rest the mutation fields of the two offspring; the PE tracks the best
// individual written during each generation in a register.
module pe
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter int unsigned TILE    = 4,
  parameter int unsigned DIM     = 2,
  parameter int unsigned ROW     = 0,
  parameter int unsigned COL     = 0,
  parameter problem_e    PROBLEM = PROB_MAXONE,
  parameter int unsigned N       = TILE * TILE,
  parameter int unsigned IW      = idx_w(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [GEN_W-1:0]  max_gen,
  // systolic seed chain (seed_valid is common to the whole row)
  input  logic              seed_valid,
  input  logic [SEED_W-1:0] seed_in,
  output logic [SEED_W-1:0] seed_out,
  // neighbour inputs (from the neighbour in that direction)
  input  logic [LEN-1:0]    in_n_chrom, in_s_chrom, in_w_chrom, in_e_chrom,
  input  logic [FIT_W-1:0]  in_n_fit,   in_s_fit,   in_w_fit,   in_e_fit,
  // neighbour outputs (to the neighbour in that direction)
  output logic [LEN-1:0]    out_n_chrom, out_s_chrom, out_w_chrom, out_e_chrom,
  output logic [FIT_W-1:0]  out_n_fit,   out_s_fit,   out_w_fit,   out_e_fit,
  // systolic result chain
  input  logic [LEN-1:0]    res_in_chrom,
  input  logic [FIT_W-1:0]  res_in_fit,
  output logic [LEN-1:0]    res_out_chrom,
  output logic [FIT_W-1:0]  res_out_fit,
  output logic              res_valid,
  // status
  output state_e            state,
  output logic [GEN_W-1:0]  gen,
  output logic [IW-1:0]     idx,
  output logic              replaced,
  output logic              done
);

  localparam int unsigned PW    = idx_w(LEN);
  localparam int unsigned LW    = idx_w(LEN);
  localparam int unsigned RNG_W = LEN + 2 * LEN * LW;

  logic              cnt_last, res_load, res_shift;
  logic [RNG_W-1:0]  rnd;
  logic [FIT_W-1:0]  init_fit;
  logic [LEN-1:0]    act_chrom, best_chrom;
  logic [FIT_W-1:0]  act_fit, best_fit;
  logic [IW-1:0]     n_idx, s_idx, w_idx, e_idx;
  logic [LEN-1:0]    tmp_chrom [N];
  logic [FIT_W-1:0]  tmp_fit   [N];
  logic [SEED_W-1:0] seed_q;
  logic [LEN-1:0]    gbest_chrom_q, res_chrom_q;
  logic [FIT_W-1:0]  gbest_fit_q,   res_fit_q;

  pe_ctrl #(.DIM(DIM)) u_ctrl (
    .clk, .rst_n, .seed_valid, .cnt_last, .max_gen,
    .state, .gen, .res_load, .res_shift, .done
  );

  ind_counter #(.N(N), .IW(IW)) u_cnt (
    .clk, .rst_n, .clear(1'b0),
    .en(state == S1_INIT || state == S2_EVOLVE),
    .idx, .last(cnt_last)
  );

  // Seed chain register: takes the row input on each push, its old value
  // goes to the next PE.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          seed_q <= '0;
    else if (seed_valid) seed_q <= seed_in;
  end
  assign seed_out = seed_q;

  // The generator is (re)loaded with every seed this PE takes in S0; the
  // last one stays.
  ca_prng #(.WIDTH(RNG_W), .SEED_W(SEED_W)) u_rng (
    .clk, .rst_n,
    .load_en(state == S0_SEED && seed_valid),
    .seed(seed_in),
    .en(1'b1),
    .rnd
  );

  fitness_unit #(.LEN(LEN), .PROBLEM(PROBLEM)) u_init_fit (
    .chrom(rnd[LEN-1:0]), .fit(init_fit));

  bank_actual #(.LEN(LEN), .TILE(TILE), .DIM(DIM), .ROW(ROW), .COL(COL),
                .N(N), .IW(IW)) u_act (
    .clk, .rst_n, .idx,
    .init_we(state == S1_INIT), .init_chrom(rnd[LEN-1:0]), .init_fit,
    .load_all(state == S3_STOP), .tmp_chrom, .tmp_fit,
    .act_chrom, .act_fit,
    .out_n_chrom, .out_s_chrom, .out_w_chrom, .out_e_chrom,
    .out_n_fit,   .out_s_fit,   .out_w_fit,   .out_e_fit,
    .n_idx, .s_idx, .w_idx, .e_idx
  );

  genetic_ops #(.LEN(LEN), .PROBLEM(PROBLEM), .PW(PW), .LW(LW)) u_gop (
    .act_chrom, .act_fit,
    .n_chrom(in_n_chrom), .s_chrom(in_s_chrom),
    .w_chrom(in_w_chrom), .e_chrom(in_e_chrom),
    .n_fit(in_n_fit), .s_fit(in_s_fit), .w_fit(in_w_fit), .e_fit(in_e_fit),
    .pos_a(rnd[PW-1:0]), .pos_b(rnd[2*PW-1:PW]),
    .mut_rnd1(rnd[LEN +: LEN*LW]),
    .mut_rnd2(rnd[LEN + LEN*LW +: LEN*LW]),
    .best_chrom, .best_fit, .replaced
  );

  bank_temp #(.LEN(LEN), .N(N), .IW(IW)) u_tmp (
    .clk, .rst_n, .we(state == S2_EVOLVE), .idx,
    .wr_chrom(best_chrom), .wr_fit(best_fit),
    .chrom(tmp_chrom), .fit(tmp_fit)
  );

  // Best individual written during the current generation, and the
  // systolic result register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gbest_chrom_q <= '0;
      gbest_fit_q   <= '0;
      res_chrom_q   <= '0;
      res_fit_q     <= '0;
    end else begin
      if (state == S2_EVOLVE && (idx == '0 || best_fit > gbest_fit_q)) begin
        gbest_chrom_q <= best_chrom;
        gbest_fit_q   <= best_fit;
      end
      if (res_load) begin
        res_chrom_q <= gbest_chrom_q;
        res_fit_q   <= gbest_fit_q;
      end else if (res_shift) begin
        res_chrom_q <= res_in_chrom;
        res_fit_q   <= res_in_fit;
      end
    end
  end

  assign res_out_chrom = res_chrom_q;
  assign res_out_fit   = res_fit_q;
  assign res_valid     = res_shift;

endmodule
