// tb_cga_workloads: the nine evaluated configurations, all with 64
// individuals: 2 x 2 PEs of 4 x 4 individuals, 4 x 4 PEs of 2 x 2 and
// 8 x 8 PEs of one individual each, for MAX ONE and ISO-PEAK on 64-bit
// and MMDP on 66-bit chromosomes. Each runs GENS generations and is
// checked by cga_workload_run; generations take 17, 5 and 2 clocks.
module tb_cga_workloads;
  import cga_pkg::*;
  localparam int GENS = 150;
  logic clk = 0;
  logic fin [9];
  int ch [9], fl [9], best [9];

  always #5 clk = ~clk;

  for (genvar a = 0; a < 3; a++) begin : g_arr
    localparam int D = (a == 0) ? 2 : (a == 1) ? 4 : 8;
    localparam int T = 8 / D;
    cga_workload_run #(.LEN(64), .TILE(T), .DIM(D), .PROBLEM(PROB_MAXONE), .GENS(GENS), .SEED0(3*a+1))
      u_one (.clk, .fin(fin[3*a]), .checks(ch[3*a]), .failures(fl[3*a]), .final_best(best[3*a]));
    cga_workload_run #(.LEN(64), .TILE(T), .DIM(D), .PROBLEM(PROB_ISOPEAK), .GENS(GENS), .SEED0(3*a+2))
      u_iso (.clk, .fin(fin[3*a+1]), .checks(ch[3*a+1]), .failures(fl[3*a+1]), .final_best(best[3*a+1]));
    cga_workload_run #(.LEN(66), .TILE(T), .DIM(D), .PROBLEM(PROB_MMDP), .GENS(GENS), .SEED0(3*a+3))
      u_mmdp (.clk, .fin(fin[3*a+2]), .checks(ch[3*a+2]), .failures(fl[3*a+2]), .final_best(best[3*a+2]));
  end

  initial begin
    int checks, failures;
    repeat (5) @(posedge clk);
    fork
      begin
        repeat (20 * GENS + 2000) @(posedge clk);
        $display("watchdog expired");
        checks = 1; failures = 1;
        for (int k = 0; k < 9; k++) begin checks += ch[k]; failures += fl[k]; end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      begin
        for (int k = 0; k < 9; k++) wait (fin[k]);
      end
    join_any
    @(posedge clk);
    checks = 0; failures = 0;
    for (int k = 0; k < 9; k++) begin
      checks += ch[k]; failures += fl[k];
      $display("config %0d (%s, %s): best %0d", k,
               (k / 3 == 0) ? "2x2 PEs" : (k / 3 == 1) ? "4x4 PEs" : "8x8 PEs",
               (k % 3 == 0) ? "MAX ONE" : (k % 3 == 1) ? "ISO-PEAK" : "MMDP", best[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
