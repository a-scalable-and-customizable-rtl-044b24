// bank_actual: register bank of the actual (current-generation) individuals
// of one PE, with the logic that picks which individual each of the four
// neighbour ports sends.
//
// The PE holds N = TILE*TILE individuals, index idx = r*TILE + c for row r
// and column c of its tile. The global population grid is interleaved over
// the DIM x DIM PEs: individual (r,c) of the PE at array position (ROW,COL)
// sits at grid row r*DIM+ROW, grid column c*DIM+COL. All PEs process the
// same index at the same time, so an inner PE sends its current individual
// on every port. A PE on the array border instead sends, across the wrap
// link, the individual its toroidal partner needs:
//   ROW == 0      : north port sends ((r+1) mod TILE, c)
//   ROW == DIM-1  : south port sends ((r-1) mod TILE, c)
//   COL == 0      : west  port sends (r, (c+1) mod TILE)
//   COL == DIM-1  : east  port sends (r, (c-1) mod TILE)
// This is the design's neighbour-exchange rule (index plus or minus the
// row increment TILE, or plus or minus one wrapping inside the tile row),
// written here with explicit modular arithmetic.
//
// Writes: init_we stores one individual at idx (initial population);
// load_all copies the whole temporal bank in one clock at the end of a
// generation. Reads are combinational. Storage resets to zero (this
// implementation's choice).
module bank_actual
  import cga_pkg::*;
#(
  parameter int unsigned LEN  = 64,
  parameter int unsigned TILE = 4,
  parameter int unsigned DIM  = 2,
  parameter int unsigned ROW  = 0,
  parameter int unsigned COL  = 0,
  parameter int unsigned N    = TILE * TILE,
  parameter int unsigned IW   = idx_w(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IW-1:0]    idx,
  // initial population write
  input  logic             init_we,
  input  logic [LEN-1:0]   init_chrom,
  input  logic [FIT_W-1:0] init_fit,
  // generation update from the temporal bank
  input  logic             load_all,
  input  logic [LEN-1:0]   tmp_chrom [N],
  input  logic [FIT_W-1:0] tmp_fit   [N],
  // current individual
  output logic [LEN-1:0]   act_chrom,
  output logic [FIT_W-1:0] act_fit,
  // what each neighbour port sends
  output logic [LEN-1:0]   out_n_chrom, out_s_chrom, out_w_chrom, out_e_chrom,
  output logic [FIT_W-1:0] out_n_fit,   out_s_fit,   out_w_fit,   out_e_fit,
  output logic [IW-1:0]    n_idx, s_idx, w_idx, e_idx
);

  logic [LEN-1:0]   chrom_q [N];
  logic [FIT_W-1:0] fit_q   [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        chrom_q[k] <= '0;
        fit_q[k]   <= '0;
      end
    end else if (load_all) begin
      for (int k = 0; k < N; k++) begin
        chrom_q[k] <= tmp_chrom[k];
        fit_q[k]   <= tmp_fit[k];
      end
    end else if (init_we) begin
      chrom_q[idx] <= init_chrom;
      fit_q[idx]   <= init_fit;
    end
  end

  // Neighbour-exchange index selection.
  always_comb begin
    int unsigned r, c;
    r = int'(idx) / TILE;
    c = int'(idx) % TILE;
    n_idx = (ROW == 0)       ? IW'(((r + 1) % TILE) * TILE + c)        : idx;
    s_idx = (ROW == DIM - 1) ? IW'(((r + TILE - 1) % TILE) * TILE + c) : idx;
    w_idx = (COL == 0)       ? IW'(r * TILE + (c + 1) % TILE)          : idx;
    e_idx = (COL == DIM - 1) ? IW'(r * TILE + (c + TILE - 1) % TILE)   : idx;
  end

  assign act_chrom   = chrom_q[idx];
  assign act_fit     = fit_q[idx];
  assign out_n_chrom = chrom_q[n_idx];
  assign out_n_fit   = fit_q[n_idx];
  assign out_s_chrom = chrom_q[s_idx];
  assign out_s_fit   = fit_q[s_idx];
  assign out_w_chrom = chrom_q[w_idx];
  assign out_w_fit   = fit_q[w_idx];
  assign out_e_chrom = chrom_q[e_idx];
  assign out_e_fit   = fit_q[e_idx];

endmodule
