// tb_cga_top: end-to-end run of the processor array at its default size
// (2 x 2 PEs, 4 x 4 individuals each, 64 individuals of 64 bits, MAX ONE).
// Seeds are shifted in serially, the array initialises, evolves max_gen
// generations and drains the best individual of every PE through the
// single output port. Checks: the seed phase, S1 length, 17 clocks per
// generation, the generation count, the fitness of every emitted
// individual, the count of emitted individuals, that best_chrom/best_fit
// is the fittest of them, and that the population improved over the run.
// Each mechanism is counted and must have happened at least once: seed
// pushes, initial-population writes, offspring replacing and not replacing
// the actual individual, bank copies at the end of a generation, the stop
// test taking both branches, result-chain shifts, FIFO pushes and pops.
module tb_cga_top;
  import cga_pkg::*;
  localparam int DIM = 2, N = 16, L = 64, G = 300;
  logic clk = 0, rst_n = 0, ser_valid = 0, ser_bit = 0;
  logic [GEN_W-1:0] max_gen = GEN_W'(G);
  logic res_valid, finished;
  logic [L-1:0] res_chrom, best_chrom;
  logic [FIT_W-1:0] res_fit, best_fit;
  state_e state;
  logic [GEN_W-1:0] gen;
  logic [3:0] idx;
  logic [DIM*DIM-1:0] replaced;
  int checks = 0, failures = 0, cyc = 0;
  int n_push = 0, n_init = 0, n_repl = 0, n_keep = 0, n_copy = 0, n_stop_loop = 0,
      n_stop_exit = 0, n_shift = 0, n_fifo_push = 0, n_fifo_pop = 0, n_res = 0;
  int last_s3 = -1, max_res = -1, init_best = -1;

  cga_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  // mechanism counters
  always @(negedge clk) if (rst_n) begin
    if (dut.push) n_push++;
    if (state == S1_INIT) n_init++;
    if (state == S2_EVOLVE) for (int p = 0; p < DIM*DIM; p++) if (replaced[p]) n_repl++; else n_keep++;
    if (state == S3_STOP) begin
      n_copy++;
      if (gen + 1 < max_gen) n_stop_loop++; else n_stop_exit++;
      if (last_s3 >= 0) check(cyc - last_s3 == N + 1, "17 clocks per generation");
      last_s3 = cyc;
    end
    if (dut.row_valid[0]) n_shift++;
    for (int r = 0; r < DIM; r++) begin
      if (dut.row_valid[r]) n_fifo_push++;
      if (dut.f_pop[r]) n_fifo_pop++;
    end
    if (res_valid) begin
      n_res++;
      check(int'(res_fit) == $countones(res_chrom), "emitted fitness");
      if (int'(res_fit) > max_res) max_res = int'(res_fit);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    logic [7:0] seeds [DIM*DIM];
    seeds = '{8'd3, 8'd124, 8'd255, 8'd77};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // two pushes of one word per row, least significant bit first
    for (int p = 0; p < DIM; p++)
      for (int r = 0; r < DIM; r++)
        for (int b = 0; b < 8; b++) begin
          check(state == S0_SEED, "seed phase");
          ser_valid = 1; ser_bit = seeds[p*DIM + r][b];
          @(negedge clk);
        end
    ser_valid = 0;
    @(negedge clk);
    check(state == S1_INIT, "initialisation after seeding");
    check(dut.u_arr.g_row[0].g_col[0].u_pe.seed_out == seeds[2] &&
          dut.u_arr.g_row[0].g_col[1].u_pe.seed_out == seeds[0] &&
          dut.u_arr.g_row[1].g_col[0].u_pe.seed_out == seeds[3] &&
          dut.u_arr.g_row[1].g_col[1].u_pe.seed_out == seeds[1], "systolic seeds");
    t0 = cyc;
    wait (state == S2_EVOLVE);
    check(cyc - t0 == N, "S1 lasts 16 clocks");
    for (int k = 0; k < N; k++)
      if (int'(dut.u_arr.g_row[0].g_col[0].u_pe.u_act.fit_q[k]) > init_best)
        init_best = int'(dut.u_arr.g_row[0].g_col[0].u_pe.u_act.fit_q[k]);
    wait (finished);
    @(negedge clk);
    check(gen == GEN_W'(G), "generation count");
    check(n_res == DIM*DIM, "one result per PE");
    check(int'(best_fit) == max_res && $countones(best_chrom) == int'(best_fit), "best of results");
    check(int'(best_fit) > init_best, "population improved");
    // every mechanism happened
    check(n_push == DIM, "seed pushes");
    check(n_init == N, "initial writes");
    check(n_repl > 0, "offspring replaced actual");
    check(n_keep > 0, "actual kept");
    check(n_copy == G, "bank copies");
    check(n_stop_loop > 0 && n_stop_exit == 1, "stop test both ways");
    check(n_shift == DIM, "result-chain shifts");
    check(n_fifo_push == DIM*DIM && n_fifo_pop == DIM*DIM, "fifo traffic");
    $display("pushes %0d init %0d replaced %0d kept %0d copies %0d shifts %0d fifo %0d/%0d results %0d",
             n_push, n_init, n_repl, n_keep, n_copy, n_shift, n_fifo_push, n_fifo_pop, n_res);
    $display("initial best %0d final best %0d of %0d", init_best, best_fit, L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
