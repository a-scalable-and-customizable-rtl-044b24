// tb_mutation: each gene flips exactly when its 6-bit random field is zero;
// with uniformly random fields the flip rate is about 1/64 per gene.
module tb_mutation;
  localparam int L = 64;
  localparam int LW = 6;
  logic [L-1:0] chrom_in, flip, chrom_out;
  logic [L*LW-1:0] rnd;
  int checks = 0, failures = 0;
  int flips = 0;

  mutation #(.LEN(L), .LW(LW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all fields zero: every gene flips; all fields one: none flips
    chrom_in = 64'h0123_4567_89ab_cdef; rnd = '0; #1;
    checks++; if (chrom_out !== ~chrom_in) failures++;
    rnd = '1; #1;
    checks++; if (chrom_out !== chrom_in) failures++;
    for (int t = 0; t < 4000; t++) begin
      logic [L-1:0] exp_out;
      chrom_in = {$urandom, $urandom};
      for (int k = 0; k < L*LW; k += 32) rnd[k +: 32] = $urandom;
      // force a few zero fields
      for (int z = 0; z < 2; z++) rnd[$urandom_range(0, L-1)*LW +: LW] = '0;
      #1;
      for (int k = 0; k < L; k++) exp_out[k] = chrom_in[k] ^ (rnd[k*LW +: LW] == 0);
      checks++;
      if (chrom_out !== exp_out) begin failures++; $display("FAIL t=%0d", t); end
    end
    // rate with unforced random fields
    for (int t = 0; t < 4000; t++) begin
      for (int k = 0; k < L*LW; k += 32) rnd[k +: 32] = $urandom;
      #1;
      flips += $countones(flip);
    end
    // expected 4000*64/64 = 4000 flips
    checks++;
    if (flips < 3500 || flips > 4500) begin failures++; $display("FAIL rate %0d", flips); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
