// cga_pkg: types and constants shared by the cellular genetic algorithm
// processor array.
//
// The array partitions a toroidal population grid over DIM x DIM processor
// elements (PEs); each PE owns a TILE x TILE interleaved share of it. The
// default sizes are the running example of the design: 64 individuals in a
// 2 x 2 array of PEs with 4 x 4 individuals each, 64-bit chromosomes.
// The fitness width, the seed width and the fixed-point scale of the MMDP
// table are this implementation's own choices.
package cga_pkg;

  // Benchmark problem evaluated by the plug-in fitness module.
  typedef enum logic [1:0] {
    PROB_MAXONE  = 2'd0,
    PROB_ISOPEAK = 2'd1,
    PROB_MMDP    = 2'd2
  } problem_e;

  // Five-state control FSM of every PE.
  typedef enum logic [2:0] {
    S0_SEED   = 3'd0,  // seed is propagated
    S1_INIT   = 3'd1,  // initial population is generated
    S2_EVOLVE = 3'd2,  // genetic operations are applied
    S3_STOP   = 3'd3,  // stop condition is verified
    S4_OUTPUT = 3'd4   // best individuals are sent out
  } state_e;

  // Fitness values are unsigned integers of this width.
  localparam int unsigned FIT_W = 16;

  // Width of one seed word travelling along a systolic row.
  localparam int unsigned SEED_W = 8;

  // Width of the generation limit.
  localparam int unsigned GEN_W = 32;

  // MMDP sub-function scaled by 2^MMDP_FRAC (value 1.0 -> 4096).
  localparam int unsigned MMDP_FRAC = 12;

  // Index width for a count of n items (at least 1 bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

endpackage
