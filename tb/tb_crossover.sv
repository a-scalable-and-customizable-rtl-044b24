// tb_crossover: the 6-bit worked example (operator 001100, parents 111001
// and 010101 give 110101 and 011001) and random cases checked against a
// bit-by-bit reference of the interval mask and the gene exchange.
module tb_crossover;
  localparam int L = 64;
  localparam int PW = 6;
  logic [L-1:0] p1, p2, op, off1, off2;
  logic [PW-1:0] pos_a, pos_b;
  logic [5:0] q1, q2, qop, qo1, qo2;
  logic [2:0] qa, qb;
  int checks = 0, failures = 0;

  crossover #(.LEN(L), .PW(PW)) dut (.*);
  crossover #(.LEN(6), .PW(3)) dut6 (.p1(q1), .p2(q2), .pos_a(qa), .pos_b(qb),
                                     .op(qop), .off1(qo1), .off2(qo2));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example, leftmost printed bit = bit 5
    q1 = 6'b111001; q2 = 6'b010101; qa = 3'd3; qb = 3'd2;
    #1;
    check(qop == 6'b001100, "example operator");
    check(qo1 == 6'b110101, "example offspring 1");
    check(qo2 == 6'b011001, "example offspring 2");
    qa = 3'd7; qb = 3'd0; // 7 mod 6 = 1
    #1;
    check(qop == 6'b000011, "modulo bound");
    for (int t = 0; t < 3000; t++) begin
      int a, b, lo, hi;
      logic [L-1:0] m, e1, e2;
      p1 = {$urandom, $urandom}; p2 = {$urandom, $urandom};
      pos_a = PW'($urandom); pos_b = PW'($urandom);
      #1;
      a = pos_a; b = pos_b;
      lo = a < b ? a : b; hi = a < b ? b : a;
      for (int k = 0; k < L; k++) begin
        m[k] = (k >= lo && k <= hi);
        e1[k] = m[k] ? p2[k] : p1[k];
        e2[k] = m[k] ? p1[k] : p2[k];
      end
      check(op == m && off1 == e1 && off2 == e2, $sformatf("random a=%0d b=%0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
