// tb_fitness_isopeak: ISO-PEAK for m = 32. All ones gives 32 + 31*31 = 993,
// all zeros 31*32 = 992, first pair 11 and the rest 00 the optimum 1024; random chromosomes are
// checked pair by pair against the Iso1/Iso2 table.
module tb_fitness_isopeak;
  import cga_pkg::*;
  logic [63:0] chrom;
  logic [FIT_W-1:0] fit;
  int checks = 0, failures = 0;

  fitness_isopeak #(.LEN(64)) dut (.*);

  function automatic int iso1(input logic a, input logic b, input int m);
    if (!a && !b) return m;
    if (a && b) return m - 1;
    return 0;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom = '1; #1; checks++; if (fit != 993) failures++;
    chrom = '0; #1; checks++; if (fit != 992) failures++;
    chrom = 64'h1; #1; checks++; if (fit != 31*32) failures++;   // first pair 01 -> Iso2 = 0
    chrom = 64'h3; #1; checks++; if (fit != 32 + 31*32) failures++;
    for (int t = 0; t < 2000; t++) begin
      int e;
      chrom = {$urandom, $urandom};
      #1;
      e = (chrom[0] && chrom[1]) ? 32 : 0;
      for (int i = 1; i < 32; i++) e += iso1(chrom[2*i], chrom[2*i+1], 32);
      checks++;
      if (fit != e) begin failures++; $display("FAIL %h %0d exp %0d", chrom, fit, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
