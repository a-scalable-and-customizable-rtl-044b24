// tb_row_fifo: random push/pop traffic against a queue model, never pushing
// when full or popping when empty; also fills to DEPTH and empties.
module tb_row_fifo;
  localparam int W = 80, D = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [2:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  row_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      push = !full && ($urandom_range(0, 1) == 1);
      pop = !empty && ($urandom_range(0, 2) == 0 || t > 1800);
      din = {$urandom, $urandom, 16'($urandom)};
      checks++;
      if (!empty && dout !== q[0]) begin failures++; $display("FAIL head t=%0d", t); end
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++; $display("FAIL flags t=%0d count=%0d size=%0d", t, count, q.size());
      end
      if (full) n_full++;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
