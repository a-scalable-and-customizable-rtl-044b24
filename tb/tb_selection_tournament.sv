// tb_selection_tournament: random neighbour sets with frequent equal
// fitness values; the expected winner is the fittest neighbour, ties going
// to north, then south, then west, then east.
module tb_selection_tournament;
  import cga_pkg::*;
  localparam int L = 16;
  logic [L-1:0] n_chrom, s_chrom, w_chrom, e_chrom, win_chrom;
  logic [FIT_W-1:0] n_fit, s_fit, w_fit, e_fit, win_fit;
  int checks = 0, failures = 0;

  selection_tournament #(.LEN(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [L-1:0] c [4];
      logic [FIT_W-1:0] f [4];
      int best;
      for (int k = 0; k < 4; k++) begin
        c[k] = L'($urandom);
        f[k] = (t < 1000) ? FIT_W'($urandom_range(0, 3)) : FIT_W'($urandom);
      end
      {n_chrom, s_chrom, w_chrom, e_chrom} = {c[0], c[1], c[2], c[3]};
      {n_fit, s_fit, w_fit, e_fit} = {f[0], f[1], f[2], f[3]};
      #1;
      best = 0;
      for (int k = 1; k < 4; k++) if (f[k] > f[best]) best = k;
      checks++;
      if (win_fit !== f[best] || win_chrom !== c[best]) begin
        failures++;
        $display("FAIL t=%0d fits %0d %0d %0d %0d got %0d", t, f[0], f[1], f[2], f[3], win_fit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
