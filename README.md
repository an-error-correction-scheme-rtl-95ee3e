# TRIT-CGRA: a coarse-grained reconfigurable array that corrects soft errors by re-running, and stops re-running early

A CGRA that runs stream-processing kernels (image filters, FIRs, FFTs)
keeps its function in configuration memory. An upset bit in that memory
does not go away by itself: every later output is wrong until the
configuration is reloaded. Feedback loops in the datapath behave the same
way. This design protects the array with **time redundancy** rather than
triplication. It runs each block of N outputs more than once on the same
hardware and reloads the configuration before every run. Its one twist is
**immediate termination** (TRIT). Errors are assumed rare and mostly
persistent, so the second run stops at the first output that disagrees
with the first run. A single comparison at that address in a third run
then decides which of the two runs to trust.

The cost is one output buffer of N words, a few comparators and counters
in the controllers, and throughput: about 0.5 outputs per cycle when no
error occurs.

The scheme and the array structure follow the journal article *An Error
Correction Scheme through Time Redundancy for Enhancing Persistent
Soft-Error Tolerance of CGRAs* (Imagawa, Hiromoto, Ochi, Sato, IEICE
Trans. Electron., vol. E98-C, 2015). The article describes the control
scheme exactly and the array only in outline. Everything the article
leaves open was decided here, and is listed under
[Departures and own choices](#departures-and-own-choices).

## How one block is processed

Let x[0..N-1] be the input block and y[0..N-1] the result.

1. **Load.** The external system streams the N input words into the input
   memory. They stay there for all runs.
2. **Reload + primary exec.** Every cell's configuration memory is
   rewritten from a master copy while all PE registers are held at 0. The
   array then processes x, and every output j goes to `buffer[j]`.
3. **Reload + comparing exec.** The array runs again. Output j is compared
   with `buffer[j]`, and nothing is written. If all N outputs match, the
   block is done (`RES_MATCH`). At the first mismatch the run **stops at
   once**, and its address is recorded as X.
4. **Reload + verifying exec** (only after a mismatch). The array runs a
   third time. Outputs before X are ignored. At X, one of two things
   happens:
   * output X equals `buffer[X]`. The primary run was right and the
     comparing run was hit. The third run stops here and the buffer is
     kept (`RES_PRIMARY_OK`).
   * output X differs from `buffer[X]`. The primary run was hit, so the
     error entered it at or before X. The third run writes `buffer[X]`
     and every later output up to N-1 (`RES_COMPARE_OK`).
5. **Send.** The buffer is streamed out.

Why this works: at most one error event is assumed per block. Outputs
before X agree between two runs, so they are right. At X exactly one of
the two runs is wrong, and the third run settles which one. When the
primary run was hit, its buffer is wrong from X on, so the third run
overwrites everything from X. When the comparing run was hit, the buffer
is already right.

Stopping the second (and third) run early shortens the window in which a
second error would make correction impossible. Under persistent errors
that makes this scheme more reliable than running all three runs to the
end. Under purely transient errors it is less reliable, because outputs
after X are checked only once.

What is **not** protected: the controllers, the input memory, the buffer
and the configuration store. Two error events in one block are not
handled either. Such a block can end with wrong data and no indication.

## Architecture

```
trit_cgra                      top: everything below, external ports
├── array_ctrl                 block sequencer: load, reload, 3 execs, send
├── cfg_store                  master configuration, one word per cell
├── cell_array  (4 x 4)        ALU / MULT cells on a checkerboard
│   └── array_cell             one cell
│       ├── cfg_mem            84-bit configuration register (+ upset model)
│       ├── wiring             6 word + 5 flag multiplexers
│       └── pe                 input regs, operand muxes, FU, output regs
│           └── alu | mult_unit
└── data_memory
    ├── mem_ctrl               compare / stop at X / decide / overwrite
    ├── sram_1r1w  (input)     N primary input words
    └── sram_1r1w  (buffer)    N results, the only output buffer
```

`trit_pkg` holds the shared types: operation codes, operand and output
selects, the configuration-word layout, exec modes, result codes and phases.

### Cell array and interconnect

Each cell drives one word wire and one flag wire towards each of its
four sides, per track. A wire that cell (r, c) drives south is received
by cells (r+1, c) and (r+2, c). The hop set is (1, 2), set by
`MAX_HOP = 2`. The other directions work the same way. A cell therefore
receives 4 sides x 2 hops x `TRACK` wires.

The array's only external connection is its north edge, where the data
memory sits:

* **Input.** Wires that would arrive from beyond the north edge carry the
  input word. Every column gets the same word, with flag = 1 while it is
  valid.
* **Output.** The north-going wires of row 0 leave the array. `out_col`
  picks the column that carries the result.
* **Other edges.** East, south and west edges deliver 0.

Routing is combinational. A configuration can therefore close a loop
without a register, and lint tools report such loops through the
multiplexer mesh (Verilator: `UNOPTFLAT`; yosys lists them during
synthesis). A correct mapping puts a register (`OUT_REG`) on every cycle.

### PE

Inputs `i_data_a`, `i_data_b` and `i_flag_a` come from the wiring. Each
input is registered every cycle, into `r_data_a`, `r_data_b` and
`r_flag_a`. Each word operand is a 3:1 choice: direct input, its register
or the cell constant `i_const`. The flag operand is direct or registered.
The function unit is the ALU (16 operations, see `alu_op_e`) or, in a
MULT cell, the multiplier (`mult_op_e`). Its result is registered in
`r_data_y` and `r_flag_y`. What leaves the PE is again a choice: the
combinational result (`OUT_COMB`), the output register (`OUT_REG`), or
the registered operand a (`OUT_BYP`, a one-cycle delay). `clr` zeroes all
five registers. The controller raises it during every reload, so every
run starts from the same state.

Each cell's configuration register resets to all zeros, and also starts
at that value at power-up. All zeros ties every PE input to 0 and every
outgoing wire to its own PE, so no wire depends on another. A random power-up
configuration could instead close a loop through the wiring with no
register in it, and that loop would oscillate until reset.

## Configuration word

This is the part a user must get right. One word per cell, 84 bits at the
defaults, MSB first:

| bits | field | meaning |
|---|---|---|
| 83..68 | `i_const` | constant operand (DATA_W bits) |
| 67..55 | `pe_cfg_t` | `op`[4], `a_sel`[2], `b_sel`[2], `f_reg`[1], `y_sel`[2], `fy_sel`[2] |
| 54..0 | wiring | 11 selects of 5 bits |

The wiring selects are numbered as fields k = 0..10 (bits `[5k+4:5k]`).
For `TRACK = 1` they are:

| k | multiplexer |
|---|---|
| 0 | PE flag input `i_flag_a` |
| 1..4 | flag wire leaving N, E, S, W |
| 5 | PE input `i_data_b` |
| 6 | PE input `i_data_a` |
| 7..10 | word wire leaving N, E, S, W |

For other `TRACK` values the numbering comes from the package functions
`fld_fout`, `fld_b`, `fld_a` and `fld_out`.

Select values:

* **0** is the local PE output for an outgoing multiplexer, and constant
  0 for a PE-input multiplexer.
* **1 + (side x MAX_HOP + hop - 1) x TRACK + track** is the wire that
  arrives from `side` (N = 0, E = 1, S = 2, W = 3), driven by the cell
  `hop` positions away. With the defaults, the wires from the north are 1
  (hop 1) and 2 (hop 2), from the east 3 and 4, from the south 5 and 6,
  and from the west 7 and 8.
* **Any larger value** gives 0, so 31 turns a multiplexer off.

`tb/tb_cfg_pkg.sv` has helper functions (`word`, `pcfg`, `wcfg`, `src`)
for building these words. The testbenches use three mappings:

* **Running sum of 7·x** (`tb_trit_cgra`, latency 2, a cyclic datapath):
  * cell 1, a MULT cell, takes x from the north, multiplies it by
    `i_const` = 7 into a register and sends the product west;
  * cell 0, an ALU cell, adds the product to its own registered sum,
    which arrives back from the south, and sends the sum north (the
    output) and south;
  * cell 4 routes the sum from its north input back north.
* **Color invert** (`tb_workloads`, latency 0): cell 0 XORs x with
  0x00FF, taken combinationally.
* **Horizontal difference** (`tb_workloads`, latency 1): cell 0 computes
  x[i] - x[i-1] by using the direct and the registered copy of the same
  input.

## Timing and throughput

The external system gives `lat`, the number of cycles from a word
entering the array to its result leaving it. For an exec command
accepted at clock edge 0:

* input i reaches the array in the cycle after edge i+1;
* output j is checked in the cycle after edge j+1+lat.

Lengths of each controller phase, in cycles (checked by `tb_trit_cgra`):

| phase | cycles |
|---|---|
| reload (`PH_CFG`) | 16 (one cell per cycle), then 1 to issue the exec |
| full exec (primary; comparing without mismatch; verifying with overwrite) | N + lat + 2 |
| exec stopped at X (comparing; verifying that agrees) | X + lat + 3 |
| load input / send output | about N + 2 each |

With N = 1024 and lat = 2, an error-free block takes 4144 cycles in
total: the execs deliver 0.498 outputs per cycle. When an error occurs,
that figure is between about 0.33 and almost 1.0, depending on X.

## Interface of `trit_cgra`

| signal | dir | meaning |
|---|---|---|
| `cfg_we, cfg_waddr[4], cfg_wdata[84]` | in | write the master configuration of cell `cfg_waddr` (r·COLS + c); ignored while `busy` |
| `start, n_words[11], lat[8], out_col[2]` | in | start a block; the three values are sampled at `start` |
| `in_valid, in_data[16]` / `in_ready` | in / out | N input words, accepted when both are high |
| `out_valid, out_data[16], out_last` | out | N result words, no back-pressure |
| `busy, blk_done, result, x_addr[10], phase` | out | status; `blk_done` pulses once per block |
| `seu_en, seu_cell[4], seu_bit[7]` | in | invert one configuration bit of one cell; it stays wrong until the next reload |
| `set_en` | in | invert bit 0 of every array output in this cycle (transient error) |

The two error-injection inputs exist for testing. Tie them to 0 in
normal use. Assertions check that `start` is given only while idle, and
that the memory controller receives commands only while idle and with
1 ≤ N ≤ DEPTH.

## Parameters

| parameter | default | notes |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | array size |
| `DATA_W` | 16 | word width (8 was also evaluated); flags are 1 bit |
| `TRACK` | 1 | wires per hop and side |
| `MAX_HOP` | 2 | hop set (1..MAX_HOP) |
| `DEPTH` | 1024 | buffer and input-memory words; 65536 was also evaluated |
| `LAT_W` | 8 | width of `lat` |
| `MULT_MASK` (cell_array) | checkerboard | which cells are MULT cells |

The configuration-word width follows from these: `DATA_W + 13 + (8·TRACK + 3)·5`.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=…
failures=…`. A run of the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/trit_pkg.sv tb/tb_cfg_pkg.sv tb/tb_trit_cgra.sv --top-module tb_trit_cgra
./obj_dir/Vtb_trit_cgra
```

For any other testbench, change the file and `--top-module`. Testbenches
that build configuration words need `tb/tb_cfg_pkg.sv` on the command
line. The testbenches are:

* `tb_trit_cgra`: full default size, blocks of N = 1024. Covers a clean
  block, upsets and transients in the primary and the comparing exec, a
  routing upset, and a clean block after an upset (the reload has
  scrubbed it). Every output is checked, and so is the length of every
  phase and the count of each mechanism.
* `tb_workloads`: the color-invert and horizontal-difference filters,
  with N = 1000 and N = 100, each also with a corrected upset.
* `tb_cell_array_t2`: the cell array alone, built with 8-bit words,
  `TRACK = 2` and hop (1, 2, 3). It runs the running sum on routes that
  use the second track, a track change and 3-hop wires.
* One testbench per module, `tb_<module>`. `tb_mem_ctrl` and
  `tb_data_memory` run the stop-at-X logic against a behavioural array
  with injected errors, and check exec lengths to the cycle.

## Departures and own choices

The article gives the execution-control algorithm, the block structure
(array controller, data memory with memory controller and buffer, cells
made of PE, wiring resource and configuration memory), the PE register
set, the multiplexer counts, and the sizes used here. The rest was chosen
here:

* **Function units.** The ALU and multiplier operation lists and flag
  meanings, and every encoding.
* **PE multiplexers.** The exact inputs of the PE's operand and output
  multiplexers, read from a block diagram.
* **Wiring.** How one outgoing wire per side serves both hop distances
  while the multiplexer count stays at six word and five flag
  multiplexers. Every multiplexer can pick any arriving wire.
* **Placement and array edge.** The checkerboard of ALU and MULT cells,
  and the north edge as the only link to the data memory, with one input
  word broadcast to all columns.
* **Reload.** A configuration store next to the controller (the article
  does not say where the reloaded data comes from). Reload at one cell
  per cycle, with the PE registers cleared during it.
* **Interfaces.** The per-block `lat` and `out_col` values, the
  command/handshake interfaces and the exact cycle timing.
* **Memories.** Synchronous-read memories with one read and one write
  port. The input memory is the same size as the buffer.
* **Error injection.** The upset and transient injection ports.

Not built: the baselines the article compares against, which are
conventional time redundancy with two buffers and majority voting,
selective TMR and full TMR. Its reliability (Monte-Carlo) and area
evaluations are not reproduced. The 8-tap FIR is not mapped. The
edge-detection filter and the 1024-point FFT do not route at track 1,
hop (1, 2), according to the article's own results. They would need
`TRACK = 2`. The RTL supports this as a parameter, and the cell array has
been simulated with it (`tb_cell_array_t2`), but the complete top has only
been simulated at its defaults.
