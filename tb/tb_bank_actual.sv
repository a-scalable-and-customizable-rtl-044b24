// tb_bank_actual: fills the bank of actual individuals, checks reads and
// the whole-bank load, and checks the neighbour-port index rule of four
// PE positions of a 2 x 2 array (4 x 4 individuals each) and of the centre
// PE of a 3 x 3 array against the global toroidal grid: for every
// individual and port, the receiving PE's grid neighbour must be the
// individual sent.
module tb_bank_actual;
  import cga_pkg::*;
  localparam int L = 16, T = 4, N = 16, IW = 4;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] idx;
  logic init_we = 0, load_all = 0;
  logic [L-1:0] init_chrom = '0;
  logic [FIT_W-1:0] init_fit = '0;
  logic [L-1:0] tmp_chrom [N];
  logic [FIT_W-1:0] tmp_fit [N];
  int checks = 0, failures = 0;

  logic [L-1:0] act_c [5], on_c [5], os_c [5], ow_c [5], oe_c [5];
  logic [FIT_W-1:0] act_f [5], on_f [5], os_f [5], ow_f [5], oe_f [5];
  logic [IW-1:0] ni [5], si [5], wi [5], ei [5];

  // instances 0..3: 2x2 array positions; instance 4: centre of 3x3
  for (genvar p = 0; p < 5; p++) begin : g_dut
    localparam int D = (p == 4) ? 3 : 2;
    localparam int R = (p == 4) ? 1 : p / 2;
    localparam int C = (p == 4) ? 1 : p % 2;
    bank_actual #(.LEN(L), .TILE(T), .DIM(D), .ROW(R), .COL(C)) u (
      .clk, .rst_n, .idx, .init_we, .init_chrom, .init_fit,
      .load_all, .tmp_chrom, .tmp_fit,
      .act_chrom(act_c[p]), .act_fit(act_f[p]),
      .out_n_chrom(on_c[p]), .out_s_chrom(os_c[p]), .out_w_chrom(ow_c[p]), .out_e_chrom(oe_c[p]),
      .out_n_fit(on_f[p]), .out_s_fit(os_f[p]), .out_w_fit(ow_f[p]), .out_e_fit(oe_f[p]),
      .n_idx(ni[p]), .s_idx(si[p]), .w_idx(wi[p]), .e_idx(ei[p]));
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // index (in the sending PE) of the individual that the receiving PE at
  // (rr,rc), working on its individual (r,c), finds at grid offset (dy,dx)
  function automatic int expect_idx(input int d, input int rr, input int rc,
                                    input int r, input int c, input int dy, input int dx,
                                    input int sr, input int sc);
    int h, y, x;
    h = d * T;
    y = (r * d + rr + dy + h) % h;
    x = (c * d + rc + dx + h) % h;
    if (y % d != sr || x % d != sc) return -1;  // not owned by the sender
    return (y / d) * T + (x / d);
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin tmp_chrom[k] = '0; tmp_fit[k] = '0; end
    idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initial population writes
    for (int k = 0; k < N; k++) begin
      idx = IW'(k); init_chrom = L'(16'h1000 + k); init_fit = FIT_W'(k); init_we = 1;
      @(negedge clk);
    end
    init_we = 0;
    for (int k = 0; k < N; k++) begin
      idx = IW'(k); #1;
      check(act_c[0] == L'(16'h1000 + k) && act_f[0] == FIT_W'(k), "init write/read");
    end
    // neighbour index rule
    for (int p = 0; p < 5; p++) begin
      int d, pr, pc;
      d = (p == 4) ? 3 : 2; pr = (p == 4) ? 1 : p / 2; pc = (p == 4) ? 1 : p % 2;
      for (int k = 0; k < N; k++) begin
        int r, c;
        r = k / T; c = k % T;
        idx = IW'(k); #1;
        // north port feeds the PE above, which looks south (dy=+1)
        check(ni[p] == expect_idx(d, (pr+d-1)%d, pc, r, c, 1, 0, pr, pc), $sformatf("p%0d k%0d north", p, k));
        check(si[p] == expect_idx(d, (pr+1)%d, pc, r, c, -1, 0, pr, pc), $sformatf("p%0d k%0d south", p, k));
        check(wi[p] == expect_idx(d, pr, (pc+d-1)%d, r, c, 0, 1, pr, pc), $sformatf("p%0d k%0d west", p, k));
        check(ei[p] == expect_idx(d, pr, (pc+1)%d, r, c, 0, -1, pr, pc), $sformatf("p%0d k%0d east", p, k));
        check(on_c[p] == L'(16'h1000 + ni[p]) && oe_f[p] == FIT_W'(ei[p]), "port data");
      end
    end
    // worked example of the design: PE 1, individual 1 sends 5 north and 2 west
    idx = '0; #1;
    check(ni[0] == 4 && si[0] == 0 && wi[0] == 1 && ei[0] == 0, "worked example");
    // whole-bank load
    for (int k = 0; k < N; k++) begin tmp_chrom[k] = L'(16'h2000 + 3*k); tmp_fit[k] = FIT_W'(100 + k); end
    @(negedge clk); load_all = 1; @(negedge clk); load_all = 0;
    for (int k = 0; k < N; k++) begin
      idx = IW'(k); #1;
      check(act_c[3] == L'(16'h2000 + 3*k) && act_f[3] == FIT_W'(100 + k), "load_all");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
