// tb_pe: one PE closed on itself as a 1 x 1 torus (2 x 2 individuals,
// 16-bit chromosomes, MAX ONE). Checks: one seed push starts it; S1 takes
// N clocks and stores chromosomes with their true fitness; every generation
// takes N+1 clocks; the four neighbour inputs are the toroidal neighbours
// of the current individual; every stored fitness stays correct; the best
// fitness never drops; after max_gen generations the PE emits the best
// individual of its bank on the result chain.
module tb_pe;
  import cga_pkg::*;
  localparam int L = 16, T = 2, N = 4, G = 40;
  logic clk = 0, rst_n = 0, seed_valid = 0;
  logic [SEED_W-1:0] seed_in = '0, seed_out;
  logic [GEN_W-1:0] max_gen = GEN_W'(G);
  logic [L-1:0] on_c, os_c, ow_c, oe_c, res_c;
  logic [FIT_W-1:0] on_f, os_f, ow_f, oe_f, res_f;
  logic res_valid, replaced, done;
  state_e state;
  logic [GEN_W-1:0] gen;
  logic [1:0] idx;
  int checks = 0, failures = 0;
  int n_repl = 0, n_keep = 0, cyc = 0, last_s3 = -1, prev_best = -1;

  pe #(.LEN(L), .TILE(T), .DIM(1), .ROW(0), .COL(0), .PROBLEM(PROB_MAXONE)) dut (
    .clk, .rst_n, .max_gen, .seed_valid, .seed_in, .seed_out,
    .in_n_chrom(os_c), .in_n_fit(os_f), .in_s_chrom(on_c), .in_s_fit(on_f),
    .in_w_chrom(oe_c), .in_w_fit(oe_f), .in_e_chrom(ow_c), .in_e_fit(ow_f),
    .out_n_chrom(on_c), .out_n_fit(on_f), .out_s_chrom(os_c), .out_s_fit(os_f),
    .out_w_chrom(ow_c), .out_w_fit(ow_f), .out_e_chrom(oe_c), .out_e_fit(oe_f),
    .res_in_chrom('0), .res_in_fit('0), .res_out_chrom(res_c), .res_out_fit(res_f),
    .res_valid, .state, .gen, .idx, .replaced, .done);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  function automatic int bank_best();
    int b = 0;
    for (int k = 0; k < N; k++)
      if (int'(dut.u_act.fit_q[k]) > b) b = int'(dut.u_act.fit_q[k]);
    return b;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // per-clock checks during evolution
  always @(negedge clk) if (rst_n && state == S2_EVOLVE) begin
    int r, c;
    r = idx / T; c = idx % T;
    check(in_n() == dut.u_act.chrom_q[((r + T - 1) % T) * T + c], "north neighbour");
    check(in_s() == dut.u_act.chrom_q[((r + 1) % T) * T + c], "south neighbour");
    check(in_w() == dut.u_act.chrom_q[r * T + (c + T - 1) % T], "west neighbour");
    check(in_e() == dut.u_act.chrom_q[r * T + (c + 1) % T], "east neighbour");
    if (replaced) n_repl++; else n_keep++;
  end

  function automatic logic [L-1:0] in_n(); return os_c; endfunction
  function automatic logic [L-1:0] in_s(); return on_c; endfunction
  function automatic logic [L-1:0] in_w(); return oe_c; endfunction
  function automatic logic [L-1:0] in_e(); return ow_c; endfunction

  // generation timing and bank consistency, checked at every S3
  always @(negedge clk) if (rst_n && state == S3_STOP) begin
    int tb_best;
    tb_best = 0;
    for (int k = 0; k < N; k++)
      if (int'(dut.u_tmp.fit[k]) > tb_best) tb_best = int'(dut.u_tmp.fit[k]);
    check(int'(dut.gbest_fit_q) == tb_best, "best of generation register");
    if (last_s3 >= 0) check(cyc - last_s3 == N + 1, "N+1 clocks per generation");
    last_s3 <= cyc;
  end
  always @(negedge clk) if (rst_n && (state == S2_EVOLVE && idx == 0)) begin
    int b;
    for (int k = 0; k < N; k++)
      check(int'(dut.u_act.fit_q[k]) == $countones(dut.u_act.chrom_q[k]), "stored fitness");
    b = bank_best();
    check(b >= prev_best, "best fitness never drops");
    prev_best <= b;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == S0_SEED, "S0 after reset");
    seed_in = 8'd124; seed_valid = 1;
    @(negedge clk); seed_valid = 0;
    check(seed_out == 8'd124, "seed register");
    check(state == S1_INIT, "S1 after one push");
    t0 = cyc;
    wait (state == S2_EVOLVE);
    check(cyc - t0 == N, "S1 lasts N clocks");
    @(negedge clk);
    wait (state == S4_OUTPUT);
    @(negedge clk);
    check(gen == GEN_W'(G), "max_gen generations");
    check(res_valid, "result valid for DIM clocks");
    check(int'(res_f) == bank_best() && $countones(res_c) == int'(res_f), "best individual out");
    @(negedge clk);
    check(done && !res_valid, "done after output");
    check(n_repl > 0 && n_keep > 0, "replacement both ways");
    $display("replaced %0d kept %0d best %0d", n_repl, n_keep, bank_best());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
