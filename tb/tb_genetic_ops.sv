// tb_genetic_ops: random neighbourhoods through the whole genetic
// operations module (MAX ONE, 16-bit chromosomes), checked against a
// reference that performs the tournament, the interval crossover, the
// per-gene mutation, the offspring comparison and the final choice against
// the actual individual.
module tb_genetic_ops;
  import cga_pkg::*;
  localparam int L = 16, PW = 4, LW = 4;
  logic [L-1:0] act_chrom, n_chrom, s_chrom, w_chrom, e_chrom, best_chrom;
  logic [FIT_W-1:0] act_fit, n_fit, s_fit, w_fit, e_fit, best_fit;
  logic [PW-1:0] pos_a, pos_b;
  logic [L*LW-1:0] mut_rnd1, mut_rnd2;
  logic replaced;
  int checks = 0, failures = 0, n_repl = 0, n_keep = 0;

  genetic_ops #(.LEN(L), .PROBLEM(PROB_MAXONE), .PW(PW), .LW(LW)) dut (.*);

  function automatic int ones(input logic [L-1:0] v);
    int n = 0;
    for (int k = 0; k < L; k++) n += v[k];
    return n;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [L-1:0] nb [4], mate, o1, o2, off, exp_c;
      int best, lo, hi, fo1, fo2, fo, exp_f;
      logic exp_r;
      for (int k = 0; k < 4; k++) nb[k] = L'($urandom);
      {n_chrom, s_chrom, w_chrom, e_chrom} = {nb[0], nb[1], nb[2], nb[3]};
      n_fit = FIT_W'(ones(nb[0])); s_fit = FIT_W'(ones(nb[1]));
      w_fit = FIT_W'(ones(nb[2])); e_fit = FIT_W'(ones(nb[3]));
      act_chrom = L'($urandom);
      act_fit = FIT_W'(ones(act_chrom));
      pos_a = PW'($urandom); pos_b = PW'($urandom);
      mut_rnd1 = {$urandom, $urandom}; mut_rnd2 = {$urandom, $urandom};
      #1;
      best = 0;
      for (int k = 1; k < 4; k++) if (ones(nb[k]) > ones(nb[best])) best = k;
      mate = nb[best];
      lo = (pos_a < pos_b) ? pos_a : pos_b;
      hi = (pos_a < pos_b) ? pos_b : pos_a;
      for (int k = 0; k < L; k++) begin
        logic in_iv;
        in_iv = (k >= lo) && (k <= hi);
        o1[k] = (in_iv ? mate[k] : act_chrom[k]) ^ (mut_rnd1[k*LW +: LW] == 0);
        o2[k] = (in_iv ? act_chrom[k] : mate[k]) ^ (mut_rnd2[k*LW +: LW] == 0);
      end
      fo1 = ones(o1); fo2 = ones(o2);
      off = (fo1 >= fo2) ? o1 : o2;
      fo = (fo1 >= fo2) ? fo1 : fo2;
      exp_r = (fo >= ones(act_chrom));
      exp_c = exp_r ? off : act_chrom;
      exp_f = exp_r ? fo : ones(act_chrom);
      if (exp_r) n_repl++; else n_keep++;
      checks++;
      if (best_chrom !== exp_c || best_fit != exp_f || replaced !== exp_r) begin
        failures++;
        $display("FAIL t=%0d got %h/%0d exp %h/%0d", t, best_chrom, best_fit, exp_c, exp_f);
      end
    end
    // both outcomes of the final multiplexer must have occurred
    checks++;
    if (n_repl == 0 || n_keep == 0) failures++;
    $display("replaced %0d kept %0d", n_repl, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
