# Partitioned processor array for cellular genetic algorithms

A cellular genetic algorithm (cGA) places its population on a two-dimensional
toroidal grid. Each individual mates only within its own neighbourhood (here
the four nearest cells: north, south, west, east). Every individual is
updated once per generation, and all updates of one generation are
synchronous. The natural hardware for this gives one processor element (PE)
to each individual. That is fast, but a 64-individual population then needs
64 copies of the genetic datapath and of the fitness function.

This design partitions the grid instead. An array of `DIM x DIM` PEs holds a
population of `(DIM*TILE) x (DIM*TILE)` individuals, `TILE x TILE` of them in
each PE. Each PE evolves its individuals one per clock, through one shared
datapath. The point of the design is that partitioning does not change the
algorithm. Every individual still sees exactly the four neighbours it would
have on a fully wired torus. Only the number of clocks per generation
changes, and with it the area:

| array (`DIM x DIM`) | individuals per PE (`TILE x TILE`) | clocks per generation |
|---|---|---|
| 2 x 2 (default) | 4 x 4 = 16 | 17 |
| 4 x 4 | 2 x 2 = 4 | 5 |
| 8 x 8 | 1 x 1 = 1 | 2 |

All three configurations hold 64 individuals. One generation takes
`TILE*TILE + 1` clocks: one clock per individual, plus one clock to commit
the new generation. The fitness functions provided are single-cycle
combinational logic; a multi-cycle objective would need a stall that is not
built.

## How the grid is spread over the PEs

Call the PE at array row `i`, column `j` PE(i,j). Its individual number
`k = r*TILE + c` (tile row `r`, tile column `c`) lives at this global grid
cell:

    grid row    = r*DIM + i
    grid column = c*DIM + j

So the PEs are interleaved, not laid out as blocks. For the default 2 x 2
array, the 8 x 8 grid is made of 2 x 2 groups. Each group holds the same
individual number `k` of all four PEs:

    k=0: PE(0,0) PE(0,1) | k=1: PE(0,0) PE(0,1) | ...
         PE(1,0) PE(1,1) |      PE(1,0) PE(1,1) |

All PEs work on the same `k` in the same clock. The grid neighbours of an
individual are then nearly always individual `k` of the adjacent PE, which
that PE is processing anyway. Each PE drives four neighbour ports
(`out_n/s/w/e`), and by default every port carries the current individual
with its fitness.

The exception is the wrap links of the PE array. Take the east neighbour of
individual `(r, TILE-1)` in PE(i, DIM-1). It is not in the same group; it is
individual `(r, 0)` of PE(i, 0), one group further on. So the PEs on the
array border send something other than their current individual across the
wrap link:

| PE position | port | sends individual |
|---|---|---|
| row 0 | north | `((r+1) mod TILE, c)` |
| row DIM-1 | south | `((r-1) mod TILE, c)` |
| column 0 | west | `(r, (c+1) mod TILE)` |
| column DIM-1 | east | `(r, (c-1) mod TILE)` |

Here is an example with DIM = 2 and TILE = 4, while every PE works on its
individual 0. PE(0,0) sends its individual 4 north, to PE(1,0), which needs
it as a south neighbour. It sends individual 0 south, and individual 1 west
to PE(0,1). A PE in both a border row and a border column applies both rules.
With `DIM = 1` a PE is its own neighbour on all four sides, and the rules
still give the plain `TILE x TILE` torus.

This selection sits in the bank of actual individuals (`bank_actual`), as
four read ports with index logic fixed by the PE's position parameters `ROW`
and `COL`. The mesh itself (`pe_array`) is a plain torus of PEs: a PE's
north input is the south output of the PE above it, and so on, with wrap
links.

## Synchronous update: two register banks

A PE has two banks of `TILE*TILE` individuals, each stored with its
fitness:

* The **actual bank** holds the current generation. The neighbour ports and
  the genetic datapath read it, and it never changes during a generation,
  because neighbouring PEs are still reading it.
* The **temporal bank** receives the result for individual `k` in the clock
  that processes `k`.

In the extra clock at the end of a generation, the whole temporal bank is
copied into the actual bank in parallel. This gives exactly the synchronous
update of a canonical cGA.

## The genetic datapath (one individual per clock)

`genetic_ops` is purely combinational:

1. **Selection** (`selection_tournament`): north is compared with south and
   west with east, then the two winners are compared. The output is the
   fittest neighbour. On equal fitness the order of preference is north,
   south, west, east.
2. **Crossover** (`crossover`): parent 1 is the actual individual and parent
   2 the selected neighbour. Two random numbers, each taken modulo `LEN`,
   bound an interval (both ends included). An operator string has ones
   inside the interval. Each offspring keeps its own parent's gene where the
   string is 0 and takes the other parent's gene where it is 1. In gates:
   `off1 = p1&~op | p2&op` and `off2 = p2&~op | p1&op`. For example,
   operator `001100` with parents `111001` and `010101` gives `110101` and
   `011001`.
3. **Mutation** (`mutation`): each gene has its own `LW = ceil(log2 LEN)`-bit
   random field and is flipped when that field is zero. This gives a flip
   probability of `1/2^LW`, which is 1/64 for 64-bit chromosomes. Each
   offspring gets its own field vector.
4. **Evaluation**: two fitness units score the two offspring.
5. **Replacement**: the fitter offspring (offspring 1 on a tie) replaces the
   actual individual if it is at least as fit. Otherwise the actual
   individual is kept. The replacement is therefore elitist per cell, so the
   best fitness of a PE never decreases.

## Random numbers

Each PE has its own `ca_prng`, a one-dimensional cellular automaton with
null boundaries that mixes rules 90 and 150. Rule 150 applies to cells whose
index `k` has `k%3 == 0` or `k%4 == 1`; the other cells use rule 90. The
automaton is `LEN + 2*LEN*LW` cells wide (832 for 64-bit chromosomes) and
advances every clock. Its state is used as follows:

* bits `[LEN-1:0]`: the new random chromosome during initialisation;
* bits `[2*PW-1:0]`: the crossover bounds during evolution;
* the rest: the two mutation field vectors.

A seed word fills the wide state by repetition, each copy XORed with its
copy number. An all-zero state is replaced by a single one.

The mutation scheme calls for one `LW`-bit random field per gene, that is
`LEN` small generators. Here they are slices of the one wide automaton, so
each PE has a single generator with a single seed. The CA rule mask and the
seed expansion are this implementation's choices.

## Control sequence

Each PE has the same five-state FSM (`pe_ctrl`), and all PEs run in
lockstep:

| state | what happens | clocks |
|---|---|---|
| S0 seed | seed words move along each row, one PE per push | until `DIM` pushes |
| S1 init | one random individual per clock, with its fitness | `TILE*TILE` |
| S2 evolve | genetic datapath, one individual per clock | `TILE*TILE` |
| S3 stop | commit the temporal bank, count the generation, compare with `max_gen` | 1 |
| S4 output | the best individual of every PE leaves on the row's result chain | `DIM` |

From S3 the FSM goes back to S2 until `max_gen` generations are done, then
on to S4. After S4's `DIM` clocks it stays in S4 with `done` set until reset.
A `max_gen` of 0 runs one generation.

**Seeding.** Each row has a systolic seed chain. On a push, the first PE
takes the row's input word and each other PE takes its west neighbour's old
word. Pushing 3, then 124, then 255 into a row of three leaves 255, 124 and
3 in the three PEs. A PE loads its generator with every seed it takes, so
the last one counts.

**Output.** During each generation a PE tracks the best individual it
writes. On entering S4 it copies that individual into its result register.
The row's result registers then shift east for `DIM` clocks, easternmost PE
first, into the row's FIFO (`row_fifo`).

## Top level (`cga_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `ser_valid`, `ser_bit` | in | 1 | serial seed input |
| `max_gen` | in | 32 | number of generations; hold it stable during a run |
| `res_valid`, `res_chrom`, `res_fit` | out | 1, LEN, 16 | drained results, one per clock, `DIM*DIM` in all |
| `best_chrom`, `best_fit` | out | LEN, 16 | fittest drained result so far |
| `finished` | out | 1 | all results drained |
| `state`, `gen`, `idx`, `replaced` | out | | FSM state, generation count, current individual, per-PE replacement flag (status and debug) |

Serial seeding works as follows. `DIM*DIM*8` bits are sent while
`ser_valid` is high: least significant bit first, row 0's word first within
each group of `DIM*8` bits. Each complete group becomes one push of the seed
chains, and after `DIM` groups every PE holds a seed. When all PEs are done,
the row FIFOs are drained row by row through the single result port.

## Objective functions

`fitness_unit` picks the objective at elaboration time through the
parameter `PROBLEM` (`cga_pkg::problem_e`). To plug in another objective,
add a branch there. Fitness is unsigned, 16 bits wide, and larger is better.

* **MAX ONE** (`PROB_MAXONE`): the number of ones. The optimum is `LEN`.
* **ISO-PEAK** (`PROB_ISOPEAK`): the chromosome is read as `m = LEN/2` bit
  pairs, with pair 1 in bits 1:0. Pair 1 is scored by Iso2 (11 -> m,
  otherwise 0). Every other pair is scored by Iso1 (00 -> m, 11 -> m-1,
  otherwise 0). The optimum is `m^2` (1024 for 64 bits): pair 1 = 11, all
  others 00. All ones gives the deceptive value 993.
* **MMDP** (`PROB_MMDP`): `LEN/6` six-bit sub-problems, each scored by its
  number of ones: 0 or 6 ones -> 1.0, 1 or 5 -> 0, 2 or 4 -> 0.36038,
  3 -> 0.64057. The scores are fixed point with 1.0 = 4096. For 66 bits
  there are 11 sub-problems and the optimum is 45056.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DIM` | 2 | PEs per row and per column |
| `TILE` | 4 | individuals per PE per row and per column |
| `LEN` | 64 | chromosome length in bits (66 for MMDP) |
| `PROBLEM` | `PROB_MAXONE` | objective |
| `cga_pkg::FIT_W` | 16 | fitness width |
| `cga_pkg::SEED_W` | 8 | seed word width |
| `cga_pkg::GEN_W` | 32 | generation counter width |

Area grows with `DIM*DIM` datapaths. Storage is the same for every split of
the same population. Each PE also holds a CA of `LEN*(2*LW+1)` cells and
three fitness units: two for offspring and one for new random individuals.

## Simulating

Every testbench is self-checking. It ends with one
`TB_RESULT checks=N failures=M` line and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cga_pkg.sv tb/tb_cga_top.sv --top-module tb_cga_top -o sim
    obj_dir/sim

The main testbenches are:

* `tb_cga_top`: the default configuration end to end. It seeds serially,
  runs 300 generations and drains. It checks the clocks per phase and per
  generation, the results and their fitness, and improvement over the
  initial population. It also counts how often each mechanism occurred
  (seed pushes, initial writes, replacement and keeping, bank commits, both
  outcomes of the stop test, result shifts, FIFO traffic). With its seed,
  MAX ONE reaches the optimum of 64.
* `tb_cga_workloads`: the nine configurations in the table above (three
  arrays x three objectives, 150 generations each, through the helper
  `cga_workload_run`). It checks clocks per generation (17, 5 and 2),
  result fitness against an independent model, and improvement.
* `tb_pe_array`: on every evolution clock, checks each PE's four neighbour
  inputs against the true neighbours on the global torus.
* One testbench per block for the leaf modules, with reference models.

The simulator is two-state. All state that is read is reset.

## Choices this implementation makes

These points are not fixed by the algorithm. Each is a decision of this RTL
that can be changed locally:

* **Replacement rule.** The offspring replaces the actual individual only if
  it is at least as fit. The canonical algorithm replaces unconditionally
  with the best offspring. Change it in `genetic_ops`.
* **Selection.** One neighbour is chosen by the tournament and always mates
  the central individual. The crossover probability is 1.
* **Timing.** S3 takes exactly one clock, which gives the `TILE*TILE + 1`
  generation time.
* **Widths and encodings.** These are own choices: the CA rule mask, the
  seed expansion, the 8-bit seed word, the serial bit order, the FIFO depth
  (`DIM`), the drain order, the 16-bit fitness, the MMDP fixed-point scale,
  the bit order of the ISO-PEAK pairs, and the tie rules.
* **MMDP size.** The number of sub-problems follows from `LEN` (`LEN/6`).
* **Not built.** Changing one PE's seed after start-up is not provided
  separately: a fresh run re-seeds all PEs through reset and S0. There is
  no handshake on the result port (one result per clock, no back-pressure)
  and no bus interface to a host system.

## Files

`rtl/` holds one module or package per file:

* `cga_pkg`: shared types;
* `ca_prng`: random number generator;
* `selection_tournament`, `crossover`, `mutation`: genetic operators;
* `fitness_maxone`, `fitness_isopeak`, `fitness_mmdp`, `fitness_unit`:
  objective functions;
* `genetic_ops`: the genetic datapath;
* `bank_actual`, `bank_temp`: the two register banks;
* `ind_counter`, `pe_ctrl`: individuals counter and control FSM;
* `pe`, `pe_array`: processor element and mesh;
* `seed_deserializer`, `row_fifo`, `cga_top`: wrapper parts and top level.

`tb/` holds a `tb_<module>` testbench for each of them, plus
`tb_cga_workloads` with its helper `cga_workload_run`.
