// tb_seed_deserializer: serial bits, with gaps in ser_valid, become one
// seed word per row; push pulses once per ROWS*8 bits.
module tb_seed_deserializer;
  import cga_pkg::*;
  localparam int ROWS = 2;
  logic clk = 0, rst_n = 0, ser_valid = 0, ser_bit = 0;
  logic [SEED_W-1:0] seed_word [ROWS];
  logic push;
  int checks = 0, failures = 0, pushes = 0;

  seed_deserializer #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      logic [SEED_W-1:0] words [ROWS];
      for (int r = 0; r < ROWS; r++) words[r] = SEED_W'($urandom);
      for (int r = 0; r < ROWS; r++)
        for (int b = 0; b < SEED_W; b++) begin
          if ($urandom_range(0, 3) == 0) begin ser_valid = 0; @(negedge clk); end
          ser_valid = 1; ser_bit = words[r][b];
          @(negedge clk);
          checks++;
          if (push != (r == ROWS - 1 && b == SEED_W - 1)) begin failures++; $display("FAIL push timing"); end
        end
      ser_valid = 0;
      checks++;
      if (!push || seed_word[0] != words[0] || seed_word[1] != words[1]) begin
        failures++; $display("FAIL word %0d", w);
      end
      pushes++;
      @(negedge clk);
      checks++;
      if (push) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
