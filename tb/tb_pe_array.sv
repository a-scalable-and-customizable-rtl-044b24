// tb_pe_array: a 2 x 2 array of PEs with 2 x 2 individuals each (a 4 x 4
// toroidal population, 16-bit chromosomes, MAX ONE). Checks: the seed words
// ripple east one PE per push (3 then 124 leaves 124 in the first PE and 3
// in the second); on every evolution clock each PE's four neighbour inputs
// equal the true toroidal neighbours of its current individual in the
// global grid, across PE borders and wrap links alike; each row emits the
// best individual of each of its PEs, easternmost first.
module tb_pe_array;
  import cga_pkg::*;
  localparam int L = 16, T = 2, D = 2, N = T * T, H = D * T, G = 30;
  logic clk = 0, rst_n = 0, seed_valid = 0;
  logic [SEED_W-1:0] seed_word [D];
  logic [GEN_W-1:0] max_gen = GEN_W'(G);
  logic [L-1:0] row_chrom [D];
  logic [FIT_W-1:0] row_fit [D];
  logic row_valid [D];
  state_e state;
  logic [GEN_W-1:0] gen;
  logic [1:0] idx;
  logic [D*D-1:0] replaced;
  logic done;
  int checks = 0, failures = 0, n_border = 0, n_inner = 0;

  pe_array #(.LEN(L), .TILE(T), .DIM(D), .PROBLEM(PROB_MAXONE)) dut (.*);
  always #5 clk = ~clk;

  // testbench view of every PE
  logic [L-1:0]      pop   [D][D][N];
  logic [FIT_W-1:0]  popf  [D][D][N];
  logic [L-1:0]      in_c  [D][D][4];  // n, s, w, e
  logic [SEED_W-1:0] seeds [D][D];
  logic [1:0]        pidx  [D][D];
  state_e            pst   [D][D];
  for (genvar i = 0; i < D; i++) begin : g_i
    for (genvar j = 0; j < D; j++) begin : g_j
      for (genvar k = 0; k < N; k++) begin : g_k
        assign pop[i][j][k]  = dut.g_row[i].g_col[j].u_pe.u_act.chrom_q[k];
        assign popf[i][j][k] = dut.g_row[i].g_col[j].u_pe.u_act.fit_q[k];
      end
      assign in_c[i][j][0] = dut.g_row[i].g_col[j].u_pe.in_n_chrom;
      assign in_c[i][j][1] = dut.g_row[i].g_col[j].u_pe.in_s_chrom;
      assign in_c[i][j][2] = dut.g_row[i].g_col[j].u_pe.in_w_chrom;
      assign in_c[i][j][3] = dut.g_row[i].g_col[j].u_pe.in_e_chrom;
      assign seeds[i][j]   = dut.g_row[i].g_col[j].u_pe.seed_out;
      assign pidx[i][j]    = dut.g_row[i].g_col[j].u_pe.idx;
      assign pst[i][j]     = dut.g_row[i].g_col[j].u_pe.state;
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [L-1:0] grid(input int y, input int x);
    y = (y + H) % H; x = (x + H) % H;
    return pop[y % D][x % D][(y / D) * T + (x / D)];
  endfunction

  function automatic int pe_best(input int i, input int j);
    int b = 0;
    for (int k = 0; k < N; k++) if (int'(popf[i][j][k]) > b) b = int'(popf[i][j][k]);
    return b;
  endfunction

  always @(negedge clk) if (rst_n && state == S2_EVOLVE) begin
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) begin
        int r, c, y, x;
        r = pidx[i][j] / T; c = pidx[i][j] % T;
        y = r * D + i; x = c * D + j;
        check(pst[i][j] == S2_EVOLVE && pidx[i][j] == idx, "lockstep");
        check(in_c[i][j][0] == grid(y - 1, x), $sformatf("PE%0d%0d north", i, j));
        check(in_c[i][j][1] == grid(y + 1, x), $sformatf("PE%0d%0d south", i, j));
        check(in_c[i][j][2] == grid(y, x - 1), $sformatf("PE%0d%0d west", i, j));
        check(in_c[i][j][3] == grid(y, x + 1), $sformatf("PE%0d%0d east", i, j));
        if (i == 0 || j == 0 || i == D - 1 || j == D - 1) n_border++; else n_inner++;
      end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [D][D];
    for (int i = 0; i < D; i++) seed_word[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    seed_word[0] = 8'd3; seed_word[1] = 8'd17; seed_valid = 1;
    @(negedge clk);
    seed_word[0] = 8'd124; seed_word[1] = 8'd99;
    @(negedge clk);
    seed_valid = 0;
    check(seeds[0][0] == 8'd124 && seeds[0][1] == 8'd3, "row 0 seeds");
    check(seeds[1][0] == 8'd99 && seeds[1][1] == 8'd17, "row 1 seeds");
    check(state == S1_INIT, "init after DIM pushes");
    wait (state == S4_OUTPUT);
    @(negedge clk);
    for (int s = 0; s < D; s++) begin
      for (int i = 0; i < D; i++) begin
        check(row_valid[i], "row output valid");
        check(int'(row_fit[i]) == pe_best(i, D - 1 - s) && $countones(row_chrom[i]) == int'(row_fit[i]),
              $sformatf("row %0d output %0d", i, s));
      end
      @(negedge clk);
    end
    check(!row_valid[0] && done, "DIM outputs then done");
    check(gen == GEN_W'(G), "generations");
    check(n_border > 0, "exchange checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
