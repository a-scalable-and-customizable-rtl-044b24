// tb_fitness_maxone: number of ones for fixed and random 64-bit chromosomes.
module tb_fitness_maxone;
  import cga_pkg::*;
  logic [63:0] chrom;
  logic [FIT_W-1:0] fit;
  int checks = 0, failures = 0;

  fitness_maxone #(.LEN(64)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom = '0; #1; checks++; if (fit != 0) failures++;
    chrom = '1; #1; checks++; if (fit != 64) failures++;
    chrom = 64'h8000_0000_0000_0001; #1; checks++; if (fit != 2) failures++;
    for (int t = 0; t < 2000; t++) begin
      int ones;
      ones = 0;
      chrom = {$urandom, $urandom};
      #1;
      for (int k = 0; k < 64; k++) if (chrom[k]) ones++;
      checks++;
      if (fit != ones) begin failures++; $display("FAIL %h %0d", chrom, fit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
