// selection_tournament: picks the mate of the current individual from its
// four neighbours (north, south, west, east) by cascaded comparators.
//
// Two first-level tournaments run in parallel, north against south and
// west against east; the two winners meet in a final comparison. The
// output is the fittest neighbour and its fitness. The comparator cascade
// follows the design; on equal fitness the first-named input (north, west,
// then the north/south winner) wins, which is this implementation's choice.
// Purely combinational.
module selection_tournament
  import cga_pkg::*;
#(
  parameter int unsigned LEN = 64
) (
  input  logic [LEN-1:0]   n_chrom, s_chrom, w_chrom, e_chrom,
  input  logic [FIT_W-1:0] n_fit,   s_fit,   w_fit,   e_fit,
  output logic [LEN-1:0]   win_chrom,
  output logic [FIT_W-1:0] win_fit
);

  logic [LEN-1:0]   ns_chrom, we_chrom;
  logic [FIT_W-1:0] ns_fit,   we_fit;

  always_comb begin
    // first level
    if (n_fit >= s_fit) begin ns_chrom = n_chrom; ns_fit = n_fit; end
    else                begin ns_chrom = s_chrom; ns_fit = s_fit; end
    if (w_fit >= e_fit) begin we_chrom = w_chrom; we_fit = w_fit; end
    else                begin we_chrom = e_chrom; we_fit = e_fit; end
    // final comparison
    if (ns_fit >= we_fit) begin win_chrom = ns_chrom; win_fit = ns_fit; end
    else                  begin win_chrom = we_chrom; win_fit = we_fit; end
  end

endmodule
