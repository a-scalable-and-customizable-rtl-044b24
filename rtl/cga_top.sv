// cga_top: cellular genetic algorithm processor array with its system
// wrapper.
//
// The population of (DIM*TILE)^2 individuals lives on a toroidal grid that
// is partitioned over DIM x DIM processor elements, TILE x TILE individuals
// each; every PE evolves its individuals one per clock, so a generation
// takes TILE*TILE + 1 clocks whatever DIM is. Defaults: 2 x 2 PEs holding
// 4 x 4 individuals (64 individuals), 64-bit chromosomes, MAX ONE fitness.
//
// Interface and timing:
//   1. Seeds: ser_valid/ser_bit carry DIM*DIM*SEED_W bits serially (see
//      seed_deserializer); every DIM*SEED_W bits one seed word enters each
//      row's systolic chain. The array leaves its seed state after DIM such
//      pushes.
//   2. The array generates the random initial population (TILE*TILE clocks)
//      and runs max_gen generations (sampled throughout; hold it stable).
//   3. Each row shifts the best individual of each of its PEs into its row
//      FIFO (DIM clocks). When every PE is done, the FIFOs are drained row
//      by row through one output: res_valid is high for one clock per
//      individual, DIM*DIM in all, with its chromosome and fitness.
//      best_chrom/best_fit keep the fittest of those seen so far, and
//      finished rises after the last one.
// The serial seed input, the per-row FIFOs and the single output port
// follow the design; the drain order and the best-of-all register are this
// implementation's choices.
module cga_top
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter int unsigned TILE    = 4,
  parameter int unsigned DIM     = 2,
  parameter problem_e    PROBLEM = PROB_MAXONE,
  parameter int unsigned IW      = idx_w(TILE * TILE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ser_valid,
  input  logic               ser_bit,
  input  logic [GEN_W-1:0]   max_gen,
  output logic               res_valid,
  output logic [LEN-1:0]     res_chrom,
  output logic [FIT_W-1:0]   res_fit,
  output logic [LEN-1:0]     best_chrom,
  output logic [FIT_W-1:0]   best_fit,
  output logic               finished,
  output state_e             state,
  output logic [GEN_W-1:0]   gen,
  output logic [IW-1:0]      idx,
  output logic [DIM*DIM-1:0] replaced
);

  localparam int unsigned W  = FIT_W + LEN;
  localparam int unsigned RW = idx_w(DIM + 1);
  localparam int unsigned FA = idx_w(DIM);

  logic [SEED_W-1:0] seed_word [DIM];
  logic              push;
  logic [LEN-1:0]    row_chrom [DIM];
  logic [FIT_W-1:0]  row_fit   [DIM];
  logic              row_valid [DIM];
  logic              arr_done;
  logic [W-1:0]      f_dout  [DIM];
  logic              f_empty [DIM];
  logic              f_pop   [DIM];
  logic [RW-1:0]     row_q;
  logic              res_valid_q;
  logic [W-1:0]      res_q;
  logic [LEN-1:0]    best_chrom_q;
  logic [FIT_W-1:0]  best_fit_q;
  logic              have_best_q;

  seed_deserializer #(.ROWS(DIM)) u_des (
    .clk, .rst_n, .ser_valid, .ser_bit, .seed_word, .push);

  pe_array #(.LEN(LEN), .TILE(TILE), .DIM(DIM), .PROBLEM(PROBLEM), .IW(IW)) u_arr (
    .clk, .rst_n, .max_gen, .seed_valid(push), .seed_word,
    .row_chrom, .row_fit, .row_valid,
    .state, .gen, .idx, .replaced, .done(arr_done)
  );

  for (genvar r = 0; r < DIM; r++) begin : g_fifo
    logic       f_full;
    logic [FA:0] f_count;
    assign f_pop[r] = arr_done && (row_q == RW'(r)) && !f_empty[r];
    row_fifo #(.WIDTH(W), .DEPTH(DIM)) u_fifo (
      .clk, .rst_n,
      .push(row_valid[r]), .din({row_fit[r], row_chrom[r]}),
      .pop(f_pop[r]), .dout(f_dout[r]),
      .empty(f_empty[r]), .full(f_full), .count(f_count)
    );
  end

  // Drain the row FIFOs one after the other through the single output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q        <= '0;
      res_valid_q  <= 1'b0;
      res_q        <= '0;
      best_chrom_q <= '0;
      best_fit_q   <= '0;
      have_best_q  <= 1'b0;
    end else begin
      res_valid_q <= 1'b0;
      if (arr_done && row_q != RW'(DIM)) begin
        if (f_empty[row_q[FA-1:0]]) begin
          row_q <= row_q + 1'b1;
        end else begin
          res_valid_q <= 1'b1;
          res_q       <= f_dout[row_q[FA-1:0]];
          if (!have_best_q || f_dout[row_q[FA-1:0]][W-1:LEN] > best_fit_q) begin
            have_best_q  <= 1'b1;
            best_chrom_q <= f_dout[row_q[FA-1:0]][LEN-1:0];
            best_fit_q   <= f_dout[row_q[FA-1:0]][W-1:LEN];
          end
        end
      end
    end
  end

  assign res_valid  = res_valid_q;
  assign res_chrom  = res_q[LEN-1:0];
  assign res_fit    = res_q[W-1:LEN];
  assign best_chrom = best_chrom_q;
  assign best_fit   = best_fit_q;
  assign finished   = (row_q == RW'(DIM)) && !res_valid_q;

endmodule
