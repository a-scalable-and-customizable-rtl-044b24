// pe_array: DIM x DIM processor elements wired as a toroidal mesh, with a
// systolic seed chain and a systolic result chain along every row.
//
// Mesh: each PE's north input is the south output of the PE above it, its
// west input the east output of the PE to its left, and so on, with the
// first and last rows and columns joined (torus). Together with the
// border index rule inside each PE's actual bank this makes the
// DIM*TILE x DIM*TILE population grid behave as a full torus of
// individuals, one individual per grid cell.
// Seed chain: row i takes seed_word[i] at its west end on every seed_valid
// clock and shifts the row's seeds one PE east. Result chain: after the last
// generation each row shifts its PEs' best individuals out of its east end,
// easternmost PE first, one per clock for DIM clocks (row_valid[i]).
// The mesh, the rows and the per-row systolic input follow the design;
// sharing one seed_valid across all rows is this implementation's choice.
// Status outputs come from PE (0,0); all PEs run in lockstep.
module pe_array
  import cga_pkg::*;
#(
  parameter int unsigned LEN     = 64,
  parameter int unsigned TILE    = 4,
  parameter int unsigned DIM     = 2,
  parameter problem_e    PROBLEM = PROB_MAXONE,
  parameter int unsigned IW      = idx_w(TILE * TILE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [GEN_W-1:0]  max_gen,
  input  logic              seed_valid,
  input  logic [SEED_W-1:0] seed_word [DIM],
  output logic [LEN-1:0]    row_chrom [DIM],
  output logic [FIT_W-1:0]  row_fit   [DIM],
  output logic              row_valid [DIM],
  output state_e            state,
  output logic [GEN_W-1:0]  gen,
  output logic [IW-1:0]     idx,
  output logic [DIM*DIM-1:0] replaced,
  output logic              done
);

  logic [LEN-1:0]    on_c [DIM][DIM], os_c [DIM][DIM], ow_c [DIM][DIM], oe_c [DIM][DIM];
  logic [FIT_W-1:0]  on_f [DIM][DIM], os_f [DIM][DIM], ow_f [DIM][DIM], oe_f [DIM][DIM];
  logic [SEED_W-1:0] sd   [DIM][DIM];
  logic [LEN-1:0]    rc   [DIM][DIM];
  logic [FIT_W-1:0]  rf   [DIM][DIM];
  logic              rv   [DIM][DIM];
  logic              dn   [DIM][DIM];
  state_e            st   [DIM][DIM];
  logic [GEN_W-1:0]  gn   [DIM][DIM];
  logic [IW-1:0]     ix   [DIM][DIM];

  for (genvar i = 0; i < DIM; i++) begin : g_row
    for (genvar j = 0; j < DIM; j++) begin : g_col
      localparam int unsigned IU = (i + DIM - 1) % DIM;  // row above
      localparam int unsigned ID = (i + 1) % DIM;        // row below
      localparam int unsigned JL = (j + DIM - 1) % DIM;  // column left
      localparam int unsigned JR = (j + 1) % DIM;        // column right

      logic [SEED_W-1:0] s_in;
      logic [LEN-1:0]    r_in_c;
      logic [FIT_W-1:0]  r_in_f;
      if (j == 0) begin : g_west_end
        assign s_in   = seed_word[i];
        assign r_in_c = '0;
        assign r_in_f = '0;
      end else begin : g_inner
        assign s_in   = sd[i][j-1];
        assign r_in_c = rc[i][j-1];
        assign r_in_f = rf[i][j-1];
      end

      pe #(.LEN(LEN), .TILE(TILE), .DIM(DIM), .ROW(i), .COL(j),
           .PROBLEM(PROBLEM), .IW(IW)) u_pe (
        .clk, .rst_n, .max_gen,
        .seed_valid, .seed_in(s_in), .seed_out(sd[i][j]),
        .in_n_chrom(os_c[IU][j]), .in_n_fit(os_f[IU][j]),
        .in_s_chrom(on_c[ID][j]), .in_s_fit(on_f[ID][j]),
        .in_w_chrom(oe_c[i][JL]), .in_w_fit(oe_f[i][JL]),
        .in_e_chrom(ow_c[i][JR]), .in_e_fit(ow_f[i][JR]),
        .out_n_chrom(on_c[i][j]), .out_n_fit(on_f[i][j]),
        .out_s_chrom(os_c[i][j]), .out_s_fit(os_f[i][j]),
        .out_w_chrom(ow_c[i][j]), .out_w_fit(ow_f[i][j]),
        .out_e_chrom(oe_c[i][j]), .out_e_fit(oe_f[i][j]),
        .res_in_chrom(r_in_c), .res_in_fit(r_in_f),
        .res_out_chrom(rc[i][j]), .res_out_fit(rf[i][j]), .res_valid(rv[i][j]),
        .state(st[i][j]), .gen(gn[i][j]), .idx(ix[i][j]),
        .replaced(replaced[i*DIM + j]), .done(dn[i][j])
      );
    end

    assign row_chrom[i] = rc[i][DIM-1];
    assign row_fit[i]   = rf[i][DIM-1];
    assign row_valid[i] = rv[i][DIM-1];
  end

  always_comb begin
    done = 1'b1;
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++)
        done = done & dn[i][j];
  end

  assign state = st[0][0];
  assign gen   = gn[0][0];
  assign idx   = ix[0][0];

endmodule
