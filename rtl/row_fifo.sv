// row_fifo: synchronous first-in first-out buffer at the east end of a PE
// row. It stores the best individuals the row shifts out after the last
// generation so that they can be read out one at a time through a single
// output port. Show-ahead: dout is the oldest entry whenever empty is low;
// pop removes it on the clock edge. Push and pop may happen together.
// Pushing when full or popping when empty is an error (asserted) and is
// ignored. DEPTH defaults to the number of PEs in a row (2); the FIFO
// organisation is this implementation's choice.
module row_fifo #(
  parameter int unsigned WIDTH = 80,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned AW    = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [AW:0]      cnt_q;
  logic             do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else begin
      if (do_push) begin
        mem[wr_q] <= din;
        wr_q      <= inc(wr_q);
      end
      if (do_pop) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assign dout  = mem[rd_q];
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == (AW+1)'(DEPTH));
  assign count = cnt_q;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
