// pe_ctrl: five-state control FSM of a PE.
//
//   S0_SEED   waits for DIM seed pushes on its systolic row, so that every
//             PE of the row holds its own seed;
//   S1_INIT   one random individual per clock, N clocks (N = individuals
//             per PE);
//   S2_EVOLVE genetic operations, one individual per clock, N clocks;
//   S3_STOP   one clock: the temporal bank is copied into the actual bank,
//             the generation counter advances and is compared with max_gen;
//             back to S2 below the limit, on to S4 at it;
//   S4_OUTPUT DIM clocks in which the row shifts the PEs' best individuals
//             out of its east end; the FSM then stays in S4 with done high
//             until reset.
// One generation therefore takes N+1 clocks (17, 5 and 2 for 16, 4 and 1
// individuals per PE). The states, their order and their loops follow the
// design; spending exactly one clock in S3, copying the banks there, and
// staying in S4 after the output are this implementation's choices.
// A max_gen of 0 is treated as 1.
//
// Outputs: state; gen (completed generations); res_load, high on the clock
// that enters S4, when each PE captures its best individual into its
// output register; res_shift, high during the DIM output clocks; done.
module pe_ctrl
  import cga_pkg::*;
#(
  parameter int unsigned DIM = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_valid,
  input  logic             cnt_last,
  input  logic [GEN_W-1:0] max_gen,
  output state_e           state,
  output logic [GEN_W-1:0] gen,
  output logic             res_load,
  output logic             res_shift,
  output logic             done
);

  localparam int unsigned CW = idx_w(DIM + 1);

  state_e           state_q, state_d;
  logic [CW-1:0]    cnt_q;        // seed pushes in S0, output clocks in S4
  logic [GEN_W-1:0] gen_q;
  logic             gen_limit;

  assign gen_limit = (gen_q + 1'b1 >= max_gen);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S0_SEED:   if (seed_valid && cnt_q == CW'(DIM - 1)) state_d = S1_INIT;
      S1_INIT:   if (cnt_last) state_d = S2_EVOLVE;
      S2_EVOLVE: if (cnt_last) state_d = S3_STOP;
      S3_STOP:   state_d = gen_limit ? S4_OUTPUT : S2_EVOLVE;
      S4_OUTPUT: state_d = S4_OUTPUT;
      default:   state_d = S0_SEED;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S0_SEED;
      cnt_q   <= '0;
      gen_q   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S0_SEED) begin
        if (seed_valid) cnt_q <= (state_d == S1_INIT) ? '0 : cnt_q + 1'b1;
      end else if (state_q == S4_OUTPUT) begin
        if (cnt_q != CW'(DIM)) cnt_q <= cnt_q + 1'b1;
      end
      if (state_q == S3_STOP) gen_q <= gen_q + 1'b1;
    end
  end

  assign state     = state_q;
  assign gen       = gen_q;
  assign res_load  = (state_q == S3_STOP) && (state_d == S4_OUTPUT);
  assign res_shift = (state_q == S4_OUTPUT) && (cnt_q != CW'(DIM));
  assign done      = (state_q == S4_OUTPUT) && (cnt_q == CW'(DIM));

endmodule
