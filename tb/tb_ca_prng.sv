// tb_ca_prng: checks the rule 90/150 cellular automaton generator against
// a reference automaton kept in the testbench: seed loading, hold while
// disabled, several hundred steps, and that the state never becomes zero
// and does not repeat within the run.
module tb_ca_prng;
  localparam int W = 64;
  localparam int SW = 8;
  logic clk = 0, rst_n = 0, load_en = 0, en = 0;
  logic [SW-1:0] seed = '0;
  logic [W-1:0] rnd, ref_q, first;
  int checks = 0, failures = 0;

  ca_prng #(.WIDTH(W), .SEED_W(SW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] step(input logic [W-1:0] s);
    logic [W-1:0] n;
    for (int k = 0; k < W; k++) begin
      logic self150;
      self150 = (k % 3 == 0) || (k % 4 == 1);
      n[k] = (k > 0 ? s[k-1] : 1'b0) ^ (k < W-1 ? s[k+1] : 1'b0) ^ (self150 & s[k]);
    end
    return n;
  endfunction

  function automatic logic [W-1:0] expand(input logic [SW-1:0] sd);
    logic [W-1:0] v;
    for (int k = 0; k < W; k++) begin
      int copy = k / SW;
      int b = k % SW;
      v[k] = sd[b] ^ ((copy >> b) & 1) ^ (b == 0 && copy == 0);
    end
    return v;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(rnd == 64'd1, "reset state");
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      logic [SW-1:0] sd;
      sd = (t == 0) ? 8'd3 : (t == 1) ? 8'd124 : 8'd0;
      @(negedge clk); seed = sd; load_en = 1; en = 1;
      @(negedge clk); load_en = 0; en = 0;
      ref_q = expand(sd);
      check(rnd == ref_q, $sformatf("seed %0d load", sd));
      check(rnd != '0, "seeded state non-zero");
      @(negedge clk);
      check(rnd == ref_q, "hold while disabled");
      en = 1;
      first = rnd;
      for (int s = 0; s < 300; s++) begin
        @(negedge clk);
        ref_q = step(ref_q);
        check(rnd == ref_q, $sformatf("step %0d", s));
        check(rnd != '0 && rnd != first, "non-zero, no early repeat");
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
