// cga_workload_run: testbench helper that runs one configuration of the
// processor array from serial seeding to the last drained result and
// checks it: clocks per generation (TILE*TILE + 1), generation count, one
// result per PE, every result's fitness recomputed here from its
// chromosome, best_fit equal to the best result, and improvement over the
// best individual of the initial population of PE (0,0). It reports its
// check and failure counts and raises fin when done.
module cga_workload_run
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter int unsigned TILE    = 4,
  parameter int unsigned DIM     = 2,
  parameter problem_e    PROBLEM = PROB_MAXONE,
  parameter int unsigned GENS    = 100,
  parameter int unsigned SEED0   = 1
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   final_best
);
  localparam int N = TILE * TILE;
  logic rst_n = 0, ser_valid = 0, ser_bit = 0;
  logic [GEN_W-1:0] max_gen = GEN_W'(GENS);
  logic res_valid, finished;
  logic [LEN-1:0] res_chrom, best_chrom;
  logic [FIT_W-1:0] res_fit, best_fit;
  state_e state;
  logic [GEN_W-1:0] gen;
  logic [idx_w(N)-1:0] idx;
  logic [DIM*DIM-1:0] replaced;
  int cyc = 0, last_s3 = -1, n_res = 0, max_res = -1, init_best = -1;

  cga_top #(.LEN(LEN), .TILE(TILE), .DIM(DIM), .PROBLEM(PROBLEM)) dut (.*);

  // objective recomputed independently of the design
  function automatic int score(input logic [LEN-1:0] c);
    int s = 0;
    if (PROBLEM == PROB_MAXONE) begin
      s = $countones(c);
    end else if (PROBLEM == PROB_ISOPEAK) begin
      int m = LEN / 2;
      s = (c[0] && c[1]) ? m : 0;
      for (int i = 1; i < m; i++)
        s += (!c[2*i] && !c[2*i+1]) ? m : (c[2*i] && c[2*i+1]) ? m - 1 : 0;
    end else begin
      int tbl [7] = '{4096, 0, 1476, 2624, 1476, 0, 4096};
      for (int q = 0; q < LEN / 6; q++) s += tbl[$countones(c[6*q +: 6])];
    end
    return s;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0dx%0d PEs, problem %0d]: %s", DIM, DIM, PROBLEM, msg);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (state == S3_STOP) begin
      if (last_s3 >= 0) check(cyc - last_s3 == N + 1, "clocks per generation");
      last_s3 = cyc;
    end
    if (res_valid) begin
      n_res++;
      check(int'(res_fit) == score(res_chrom), "result fitness");
      if (int'(res_fit) > max_res) max_res = int'(res_fit);
    end
  end

  initial begin
    checks = 0; failures = 0; fin = 0; final_best = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < DIM * DIM * SEED_W; b++) begin
      ser_valid = 1;
      ser_bit = 1'((SEED0 * 2654435761 + b * 40503) >> (b % 7));
      @(negedge clk);
    end
    ser_valid = 0;
    wait (state == S2_EVOLVE);
    @(negedge clk);
    for (int k = 0; k < N; k++)
      if (int'(dut.u_arr.g_row[0].g_col[0].u_pe.u_act.fit_q[k]) > init_best)
        init_best = int'(dut.u_arr.g_row[0].g_col[0].u_pe.u_act.fit_q[k]);
    wait (finished);
    @(negedge clk);
    check(gen == GEN_W'(GENS), "generation count");
    check(n_res == DIM * DIM, "one result per PE");
    check(int'(best_fit) == max_res, "best of results");
    check(int'(best_fit) > init_best, "improved on the initial population");
    final_best = int'(best_fit);
    fin = 1;
  end
endmodule
