// tb_ind_counter: counts 0..N-1 and wraps, holds while disabled, last on
// N-1, clear; N = 16 and N = 1.
module tb_ind_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] idx;
  logic last;
  logic [0:0] idx1;
  logic last1;
  int checks = 0, failures = 0;
  int model = 0;

  ind_counter #(.N(16)) dut (.*);
  ind_counter #(.N(1)) dut1 (.clk, .rst_n, .clear, .en, .idx(idx1), .last(last1));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      en = ($urandom_range(0, 4) != 0);
      clear = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      if (clear) model = 0;
      else if (en) model = (model + 1) % 16;
      checks++;
      if (idx != model || last != (model == 15) || idx1 != 0 || !last1) begin
        failures++; $display("FAIL t=%0d idx=%0d model=%0d", t, idx, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
