// tb_fitness_mmdp: MMDP on a 66-bit chromosome (11 six-bit sub-problems)
// with the sub-function table scaled by 4096: the optimum 11*4096, the
// deceptive all-threes point, and random chromosomes.
module tb_fitness_mmdp;
  import cga_pkg::*;
  logic [65:0] chrom;
  logic [FIT_W-1:0] fit;
  int checks = 0, failures = 0;
  // table of the benchmark, values times 4096, rounded
  int tbl [7] = '{4096, 0, 1476, 2624, 1476, 0, 4096};

  fitness_mmdp #(.LEN(66)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom = '0; #1; checks++; if (fit != 11*4096) failures++;
    chrom = '1; #1; checks++; if (fit != 11*4096) failures++;
    for (int s = 0; s < 11; s++) chrom[6*s +: 6] = 6'b000111;
    #1; checks++; if (fit != 11*2624) failures++;
    for (int t = 0; t < 2000; t++) begin
      int e;
      e = 0;
      chrom = {$urandom, $urandom, $urandom};
      #1;
      for (int s = 0; s < 11; s++) e += tbl[$countones(chrom[6*s +: 6])];
      checks++;
      if (fit != e) begin failures++; $display("FAIL %h %0d exp %0d", chrom, fit, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
