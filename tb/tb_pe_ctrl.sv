// tb_pe_ctrl: drives the PE control FSM with a modelled individuals
// counter (N = 16) in a row of DIM = 2 PEs and checks the state sequence
// and its timing: S0 until the second seed push, N clocks of S1, N+1 clocks
// per generation (17 for 16 individuals), max_gen generations, DIM output
// clocks, then done.
module tb_pe_ctrl;
  import cga_pkg::*;
  localparam int DIM = 2, N = 16, G = 5;
  logic clk = 0, rst_n = 0, seed_valid = 0, cnt_last;
  logic [GEN_W-1:0] max_gen = GEN_W'(G);
  state_e state;
  logic [GEN_W-1:0] gen;
  logic res_load, res_shift, done;
  int checks = 0, failures = 0;
  int cnt = 0;

  pe_ctrl #(.DIM(DIM)) dut (.*);
  always #5 clk = ~clk;

  // individuals counter model
  assign cnt_last = (cnt == N - 1);
  always @(posedge clk)
    if (state == S1_INIT || state == S2_EVOLVE) cnt <= (cnt == N - 1) ? 0 : cnt + 1;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (state %0d)", msg, state); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_gen_start, n_loads, n_shift;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(state == S0_SEED, "waits for seeds");
    seed_valid = 1; @(negedge clk); seed_valid = 0;
    repeat (2) @(negedge clk);
    check(state == S0_SEED, "one push is not enough");
    seed_valid = 1; @(negedge clk); seed_valid = 0;
    check(state == S1_INIT, "S1 after DIM pushes");
    repeat (N - 1) begin @(negedge clk); check(state == S1_INIT, "S1 lasts N clocks"); end
    @(negedge clk);
    check(state == S2_EVOLVE, "S2 after init");
    for (int g = 0; g < G; g++) begin
      for (int k = 0; k < N; k++) begin
        check(state == S2_EVOLVE, $sformatf("gen %0d S2 clock %0d", g, k));
        check(!res_load, "no load during generations");
        @(negedge clk);
      end
      check(state == S3_STOP, "S3 after N clocks");
      check(res_load == (g == G - 1), "result load on the last S3");
      @(negedge clk);
      check(gen == GEN_W'(g + 1), "generation count");
    end
    check(state == S4_OUTPUT, "S4 after max_gen generations");
    n_shift = 0;
    repeat (DIM + 3) begin
      if (res_shift) n_shift++;
      @(negedge clk);
    end
    check(n_shift == DIM, "DIM output clocks");
    check(done && state == S4_OUTPUT, "done, stays in S4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
