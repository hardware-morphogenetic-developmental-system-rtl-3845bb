# Morphogenetic development array

Each cell of a multi-cellular circuit has to decide which of a few predefined
functions (cell types) it takes. The circuit does not store a separate
function per cell. It stores a compact genome, and the hardware "grows" the
pattern of cell types from that genome, the way an embryo differentiates from
chemical gradients:

* A few cells are **diffusers**. A diffuser owns one of four signal types
  (chemicals) at full intensity, 15.
* During **signalling**, the intensity spreads to neighbouring cells and drops
  by one for every step of Manhattan distance.
* During **expression**, each cell compares its four 4-bit intensities with
  the four entries of an **expression table**. It takes the function of the
  entry with the smallest Hamming distance.

The genome is therefore only the diffuser positions and a 4 × 16-bit table.
Every cell runs the same small machine, the *morphogenetic element*, in lock
step with all the others. Complete development takes 4096 clocks, however
large the array is. The RTL follows a published bit-serial design for the
POEtic bio-inspired reconfigurable chip. It keeps that design's cycle-level
schedule, written as plain synthesizable SystemVerilog.

## The developmental rule

For each signal type independently, after a load:

1. A diffuser cell holds the signal as *valid* with intensity 15. Every other
   cell holds it as *uninitialised*.
2. On each developmental step, an uninitialised signal becomes valid, with
   the intensity of an initialised neighbour minus one. A value below 0 is
   clamped to 0. If no neighbour is initialised, the signal stays
   uninitialised. A signal that is set never changes again.
3. After every step, each cell forms the 16-bit word `{I4, I3, I2, I1}` from
   its intensities. Uninitialised signals count as 0. The cell's function is
   the index `j` of the table entry at minimum Hamming distance. On a tie the
   lower index wins.

Because the signals are 4-bit, 16 steps are enough for every reachable cell.
Example with one signal and diffusers in cells (3,3) and (7,6) of an 8-row ×
7-column organism. After 15 steps the intensities are:

```
9 A B C B A 9
A B C D C B A
B C D E D C B
C D E F E D C
B C D E D C C
A B C D C C D
9 A B C C D E
9 A B C D E F
```

With table entries A, F, 3, 1 (signal 1 field, others 0), a cell holding D is
at distance 1 from F. It therefore takes function 1.

## Time base: molecular cycles

The original maps the element onto 16-bit shift memories. So everything is
timed in **molecular cycles** (MC) of 16 clocks, one full rotation of such a
memory. A developmental step is 16 MCs (256 clocks). Development is 16 steps
(4096 clocks).

| MC    | signalling block                                   | expression block                                       | control            |
|-------|----------------------------------------------------|--------------------------------------------------------|--------------------|
| 0–3   | send signal *k* in MC *k*, receive neighbours' signal *k*, decrement it bit-serially | idle                        | `s_f_n`=1          |
| 1–4   | first clock of MC *k*+1: normalise and store signal *k* | idle                                              | `s_f_n`=1          |
| 5     | stream stored intensities                          | EXPR-0-R: clear shortest distance, best, counter       | `pmrst`, `pmeven`  |
| 6     | stream                                             | EXPR-1-R: Hamming distance to entry 0                  | `pmrst`, `exprtblshift` |
| 7     | stream                                             | EXPR-0: compare distance 0 with shortest               | `pmeven`           |
| 8     | stream                                             | EXPR-1: update best (entry 0), counter++, distance to entry 1 | `exprtblshift` |
| 9–12  | stream                                             | same pattern for entries 1 and 2                       |                    |
| 13    | stream                                             | EXPR-0: compare distance 3                             | `pmeven`           |
| 14    | stream                                             | EXPR-1: update best (entry 3)                          |                    |
| 15    | stream                                             | EXPREND: `func_out` ← best                             | `pm15`, `pmeven`   |

Points to note:

* **The expression pipeline is two stages deep.** Computing the Hamming
  distance of entry *j* takes one MC, because the 16 bits stream past. The
  serial compare with the stored shortest distance takes the next MC. The
  update then happens on the first clock of the following EXPR-1 cycle. That
  same cycle is already computing the distance to entry *j*+1. Two init
  cycles plus 2 × 4 entry cycles fill MC 5–14.
* **The table rotates back to its start on its own.** `exprtblshift` is high
  for exactly four MCs per step (6, 8, 10, 12). Those 64 shifts are one full
  rotation of the 64-bit table, so the next step starts at entry 0 again.
* **Signalling is synchronous even though it is serial.** Signal *k* is sent
  during MC *k* from the stored value. It is overwritten only on the first
  clock of MC *k*+1. So every neighbour sees the previous step's value, and
  the hardware computes exactly the synchronous rule above.
* `func_out` changes once per step, at clock 240. After step 16 it no longer
  changes. The element keeps running: development is continuous, not one-shot.

## Serial neighbour link

Each element has one output line, read by all four neighbours, and four input
lines (N, E, S, W). In MC *k* (*k* = 0..3) the line carries a 16-bit frame for
signal *k*:

```
frame bit:  0      1   2   3   4    5 .. 15
            valid  i0  i1  i2  i3   0
```

The intensity is sent LSB first. The sender's output is registered: frame bit
*c* is on the line during clock *c*+1 of the MC. The receiver registers it
again, so it examines the four valid bits at clock 2 (`input_select` latches
which neighbour to use) and decrements the chosen intensity during clocks 3–6
(`decrement_compare`: borrow flip-flop, one result bit per clock). A
neighbour that does not exist, at the array border, reads as a constant-0 line,
which means "uninitialised".

## Module map

```
morpho_array            ROWS x COLS organism, fixed neighbour wiring
└─ morpho_element       one cell
   ├─ morpho_ctrl       MC/step counters, decodes s_f_n, pmrst, pm15, pmeven, exprtblshift
   ├─ signalling block
   │  ├─ cellular_input     input register, border mask (PRESENT)
   │  ├─ input_select       latch valid bits, pick first valid neighbour
   │  ├─ decrement_compare  bit-serial minus one, below-zero flag
   │  ├─ normalize          the set-once / clamp / stay-invalid rule
   │  ├─ diffusion_memory   valid, intensity, diffuser flag x 4; serial 16-bit readout
   │  └─ cellular_output    frame transmitter
   └─ expression block
      ├─ expression_table   64-bit rotating shift memory
      ├─ hamming_distance   bit-serial XOR counter
      ├─ compare_distance   bit-serial magnitude compare, LSB first
      ├─ shortest_distance  shortest distance so far (init 31)
      ├─ function_counter   entry index
      └─ best_function      best index and the Function output register
morpho_pkg              sizes, signal_t, ctrl_t
```

## Using the array

```
morpho_array #(.ROWS(3), .COLS(3)) u (
  .clk, .rst_n,
  .load,          // 1-clock pulse: take the genome, restart development
  .diffuser_cfg,  // [ROWS][COLS] 4-bit: which signals cell (r,c) diffuses
  .table_cfg,     // [4] 16-bit entries {T4,T3,T2,T1}; entry j is function j
  .func,          // [ROWS][COLS] 2-bit cell function
  .sig,           // [ROWS][COLS][4] stored {valid, intensity}, for observation
  .developed);    // high from 4096 clocks after load
```

Row 0 is the north edge and column 0 the west edge. The genome inputs are
sampled only on `load`. `rst_n` is an asynchronous reset, but it does not
load a genome. At 10 MHz one development takes 410 µs, about 2400 genomes
per second. This rate suits running an evolutionary search on the chip.

## Choices this RTL makes where the source design is silent or platform-bound

* **Links are fixed wires.** In the original, the four neighbour links are
  set up at run time by the chip's dynamic routing layer. That layer, the
  chip's CPU, its peripherals and its configuration interface are not part of
  this RTL. The genome is loaded through parallel ports instead.
* **Below zero** becomes a valid 0, and an invalid signal is held with
  intensity 0. The source only says the value is "renormalised".
* **Neighbour priority** is N, E, S, W. The rule allows "any" initialised
  neighbour. With synchronous steps, all initialised neighbours carry the same
  value when a cell is first set, so the result does not depend on the choice.
* **Function = entry index.** The hardware stores 16 bits per entry, with no
  separate function field.
* **Ties** keep the earlier entry (strict "shorter" test).
* **Bit orders** (intensity LSB first, T1 in the low nibble), the register
  stages on the link and the start value 31 of the shortest distance are this
  design's own.
* The control signals are decoded from a counter instead of being stored in
  rotating memories. The names and the per-cycle phases follow the original
  timing diagram. `pmeven` is high in the EXPR-0 phases.
* The chemical memory is a register file with an index multiplexer, which
  yields the same 16-bit stream as a rotating memory.
* `developed`/`dev_done` and the `sig` observation ports are additions.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. A watchdog stops each run. The array
testbenches compare against `tb/morpho_ref_pkg.sv`, an untimed step-by-step
model of the rule above:

* `tb_morpho_array`: default 3 × 3 size, 8 random genomes. It checks every
  signal and function after every step, and that `developed` rises at exactly
  4096 clocks.
* `tb_morpho_array_e2e`: 3 × 18, 6 random genomes. It also reaches the
  below-zero clamp (a signal travels 16 cells). It counts that every mechanism
  occurred: neighbour initialisation, clamp, several valid neighbours, cells
  staying uninitialised, diffusers, non-zero functions, table ties, and
  `developed`.
* `tb_two_diffuser_example`: the 8 × 7 example above. It checks against the
  published snapshots after 2 and 15 steps, including "D expresses entry 1".
* `tb_morpho_element`: one element driven by four modelled neighbours. It
  checks the stored signals, the transmitted frames and `func_out` every step.
* One testbench per sub-block (`tb_<module>`). Most are exhaustive or random
  against a small model.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/morpho_pkg.sv tb/morpho_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_morpho_array.sv --top-module tb_morpho_array -o sim
./obj_dir/sim
```

The packages must come first. The same command works for any testbench,
after changing the last file and the top module. All testbenches run in well
under a second.

## Limits

The design checks that the hardware reproduces the developmental rule and
its timing. It does not include the phenotype layer that would use `func`,
the evolutionary algorithm that would produce genomes, or the platform that
maps the element onto reconfigurable molecules. The sizes (4 signals, 4-bit
intensities, 4 entries, 16-clock molecular cycles) are package constants in
`morpho_pkg`. The schedule in `morpho_ctrl` and `morpho_element` assumes these
values, so changing them means revisiting the schedule.
