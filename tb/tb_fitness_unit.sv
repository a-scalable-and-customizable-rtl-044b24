// tb_fitness_unit: the three selectable objectives give their own values
// for the same chromosomes.
module tb_fitness_unit;
  import cga_pkg::*;
  logic [65:0] chrom;
  logic [FIT_W-1:0] f_one, f_iso, f_mmdp;
  int checks = 0, failures = 0;

  fitness_unit #(.LEN(66), .PROBLEM(PROB_MAXONE))  u_one  (.chrom(chrom), .fit(f_one));
  fitness_unit #(.LEN(66), .PROBLEM(PROB_ISOPEAK)) u_iso  (.chrom(chrom), .fit(f_iso));
  fitness_unit #(.LEN(66), .PROBLEM(PROB_MMDP))    u_mmdp (.chrom(chrom), .fit(f_mmdp));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // m = 33 for a 66-bit ISO-PEAK chromosome
    chrom = '1; #1;
    check(f_one == 66, "maxone ones");
    check(f_iso == 33 + 32*32, "isopeak ones");
    check(f_mmdp == 11*4096, "mmdp ones");
    chrom = '0; #1;
    check(f_one == 0, "maxone zeros");
    check(f_iso == 32*33, "isopeak zeros");
    check(f_mmdp == 11*4096, "mmdp zeros");
    chrom = 66'h1; #1;
    check(f_one == 1, "maxone one bit");
    check(f_iso == 32*33, "isopeak one bit");
    check(f_mmdp == 10*4096, "mmdp one bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
