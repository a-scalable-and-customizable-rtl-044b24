// seed_deserializer: turns the 1-bit serial seed input into one seed word
// per PE row for the systolic seed chains.
//
// Bits arrive on ser_bit, one per clock while ser_valid is high, least
// significant bit of row 0's word first, then row 1's word, and so on.
// After ROWS*SEED_W bits the collected words appear on seed_word and push
// pulses for one clock; every push moves each row's seed chain one PE east,
// so ROWS pushes (ROWS*ROWS*SEED_W bits in total for a square array) seed
// every PE. The serial seed input follows the design; the bit order and the
// word framing are this implementation's choices.
module seed_deserializer
  import cga_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter int unsigned BITS = ROWS * SEED_W,
  parameter int unsigned CW   = idx_w(BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ser_valid,
  input  logic              ser_bit,
  output logic [SEED_W-1:0] seed_word [ROWS],
  output logic              push
);

  logic [BITS-1:0] sh_q;
  logic [CW-1:0]   cnt_q;
  logic            push_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      cnt_q  <= '0;
      push_q <= 1'b0;
    end else begin
      push_q <= 1'b0;
      if (ser_valid) begin
        sh_q <= {ser_bit, sh_q[BITS-1:1]};
        if (cnt_q == CW'(BITS - 1)) begin
          cnt_q  <= '0;
          push_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_word
    assign seed_word[r] = sh_q[r*SEED_W +: SEED_W];
  end
  assign push = push_q;

endmodule
