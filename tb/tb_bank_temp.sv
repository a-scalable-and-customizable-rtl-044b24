// tb_bank_temp: random writes to the temporal bank against a shadow array;
// entries not written keep their value, all entries are visible at once.
module tb_bank_temp;
  import cga_pkg::*;
  localparam int L = 64, N = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] idx = '0;
  logic [L-1:0] wr_chrom = '0;
  logic [FIT_W-1:0] wr_fit = '0;
  logic [L-1:0] chrom [N];
  logic [FIT_W-1:0] fit [N];
  logic [L-1:0] sh_c [N];
  logic [FIT_W-1:0] sh_f [N];
  int checks = 0, failures = 0;

  bank_temp #(.LEN(L), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin sh_c[k] = '0; sh_f[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      we = ($urandom_range(0, 3) != 0);
      idx = 4'($urandom);
      wr_chrom = {$urandom, $urandom};
      wr_fit = FIT_W'($urandom);
      @(negedge clk);
      if (we) begin sh_c[idx] = wr_chrom; sh_f[idx] = wr_fit; end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (chrom[k] !== sh_c[k] || fit[k] !== sh_f[k]) begin failures++; $display("FAIL t=%0d k=%0d", t, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
