# FLAME CGRA: multi-cycle operations on a coarse-grained reconfigurable array

A coarse-grained reconfigurable array (CGRA) runs a loop by giving every tile
one control word per cycle from a small per-tile memory, replaying that memory
every initiation interval (II). Compilers for such arrays usually pretend that
every operation finishes in one cycle. At a useful clock rate that is false for
division, multiplication, memory access and fused operations, and the way a
multi-cycle operation is placed decides how much of the array stays busy.

This RTL implements the FLAME architecture, an array whose tiles support three
strategies for multi-cycle operations. The strategy is chosen by the control
words alone, with no change to the hardware:

| strategy | what the tile does | cost |
|---|---|---|
| **exclusive** | issues the operation and holds that control word, doing nothing else, until the result is ready | simple; the tile idles for LAT-1 cycles |
| **inclusive** | `OPT_START` hands the operands to the multi-cycle unit and the tile moves on as if the operation took one cycle; a later word with `OPT_END` picks up the result | the tile keeps working while the division runs; the schedule must put the end exactly LAT-1 cycles after the start |
| **distributed** | the compiler splits the operation into a chain of single-cycle slices (`OP_DIVS`) that can run on different tiles | no multi-cycle unit needed, but the data-flow graph grows |

The default build is a 4 x 4 array with a 9-cycle divider, the configuration
that FLAME evaluates at 1 GHz.

## Array

```
            host CPU
   command |      ^ response
           v      |
       +------------------+          +--------------------------------+
       |    flame_ctrl    |--------->|   spm (1024 words, 4+1 ports)  |
       +------------------+          +--------------------------------+
        | control words,               |         |         |        |
        | lengths, run/clear          LSU       LSU       LSU      LSU
        v                          +-------+ +-------+ +-------+ +-------+
   (to every tile)                 | (0,0) |-| (0,1) |-| (0,2) |-| (0,3) |
                                   +-------+ +-------+ +-------+ +-------+
                                       |         |         |         |
                                      ...  4 x 4 mesh of tiles  ...
```

* `flame_cgra` is the top: `ROWS x COLS` tiles in a mesh. Every tile has
  registered north/south/west/east outputs, each feeding the facing input of
  its neighbour; inputs on the array edge read zero.
* Only the top row has load/store units, one scratchpad port per column.
* `flame_ctrl` is the host's window: it loads control words and data, starts a
  run of a given number of cycles and answers each command.

## The tile

Each cycle a tile:

1. reads the control word at its **signal counter** (`pc`) from `cfg_mem`;
2. picks up to three operands through the operand crossbar, from the four
   neighbour inputs, its four registers or the word's 32-bit constant;
3. computes **one** result: from the ALU or, on an `OPT_END` or a finishing
   exclusive word, from a multi-cycle unit (divider, multiplier, or the
   load/store unit's load);
4. routes the result, a neighbour input or a register to any of its four
   outputs and to one register through the output crossbar. These writes land
   at the clock edge, so a neighbour sees a value one cycle after it is made.

The signal counter wraps after the tile's last loaded word (`len`), so
`len + 1` control words, plus the cycles that exclusive words wait, make up the
tile's II. All tiles of a mapping must give the same II.

### Control word (`cfg_t`, 77 bits)

| field | width | meaning |
|---|---|---|
| `op` | 5 | `op_e`: ALU operation, `OP_DIVS`, `OP_STORE`, or a multi-cycle operation: `OP_DIV`, `OP_REM`, `OP_MUL`, `OP_MAC` (a*b+c), `OP_LOAD`, `OP_LDMUL` (SPM[a]*b) |
| `src_a`, `src_b`, `src_c` | 3 x 4 | operand sources (`src_e`): `SRC_N/S/W/E`, `SRC_R0..R3`, `SRC_IMM`, `SRC_NONE` (= 0) |
| `imm` | 32 | constant |
| `issue` | 2 | `ISS_SINGLE`, `ISS_EXCL` (exclusive) or `ISS_START` (`OPT_START`) for a multi-cycle `op` |
| `fin` | 3 | `OPT_END`: `END_NONE`, `END_QUO`, `END_REM`, `END_MUL` (product or MAC), `END_LD` (loaded word), `END_LDMUL` (fused load-multiply) selects which finished result is the tile result |
| `route[4]` | 4 x 4 | source for the N, S, W, E outputs; `SRC_NONE` keeps the output unchanged; `SRC_RES` is this cycle's result |
| `rf_we`, `rf_waddr`, `rf_wsrc` | 1 + 2 + 4 | register write |

`issue` and `fin` are separate fields on purpose. One word can start one
multi-cycle operation and end an earlier one. This matches FLAME's placement
rule that an operation's start cycle may coincide with another's end cycle,
because the two use different ports.

### Exclusive timing

With `DIV_LAT = 9`, a word `OP_DIV / ISS_EXCL` issued in cycle t:

```
cycle    t      t+1 ... t+7     t+8            t+9
pc       k      k       k       k              k+1
FU       issue  busy    busy    result valid
tile     -      waits (ev_o[0]) routes result   next word
```

While it waits, the tile routes nothing and writes no register.

### Inclusive timing

`OPT_START` in cycle t advances the counter at once. The result exists only in
cycle t + LAT - 1. The word the schedule puts there must carry the matching
`fin`, or the result is lost. An assertion reports a finished result that no
word takes. Between the start and the end the tile runs other words normally.
The division may also end in the next loop iteration. For example, with II = 10
a remainder started at word 2 ends at word 0 of the next iteration.

With `DIV_PIPE = 1` (default) the divider has a pipeline register after each
of its 9 stages. A new division can then start every cycle, even one of the
same kind as another still in flight. With `DIV_PIPE = 0` one stage is reused
for 9 cycles and only one division may be in flight; an assertion checks this.
`MUL_PIPE` works the same way for the multiplier.

### Loads and fused operations

The scratchpad reads synchronously, so a load takes two cycles. The address
leaves the tile in the issue cycle, and the word returns in the next cycle.
`OP_LOAD` is therefore a multi-cycle operation like the division. With
`ISS_EXCL` the tile waits one cycle. With `ISS_START` the next word must carry
`fin = END_LD`, and it may start something else at the same time. `OP_STORE`
writes in its own cycle.

Two fused operations show how a fused pattern becomes one multi-cycle
operation:

* `OP_MAC` computes `a * b + c` in the multiplier. It has the same latency
  (`MUL_LAT`) and the same `END_MUL` end as `OP_MUL`.
* `OP_LDMUL` computes `SPM[a] * b` in `mc_ldmul_fu`, on top-row tiles only.
  It takes 3 cycles: the load is issued through the tile's LSU, the word and
  the product are registered in the next cycle, and the result is read in the
  third cycle (`END_LDMUL` two words after the start). The unit is not
  pipelined. A new `OP_LDMUL` may issue only in the cycle the previous one
  delivers.

### Distributed division

`OP_DIVS` is one single-cycle slice of unsigned restoring division. It works on
a packed state word: `{remainder[31:16], dividend/quotient[15:0]}`, and takes
the divisor in the low half of operand b. A 16-bit dividend, zero-extended, is
already the initial state. Each slice does `DIST_NB = 2` steps, so eight
slices, on any tiles, leave the quotient in bits 15:0 and the remainder in
bits 31:16. Both can be extracted with `OP_AND` / `OP_SHR`. Every slice is the
same circuit (`div_bits`), which keeps the per-tile hardware small.

### Three kinds of tile

FLAME compares the cost of a tile built for each strategy, and the parameters
give the same three builds. `DIV_PIPE = 0` gives the small one-at-a-time
divider, which is enough for exclusive mappings. `DIV_PIPE = 1` gives the
pipelined divider that inclusive mappings use to overlap divisions.
`HAS_DIV = 0` drops the multi-cycle divider entirely, which leaves a tile that
can divide only in distributed slices. Every tile still has its `OP_DIVS`
slice. An assertion stops `OP_DIV`/`OP_REM` on a tile without the divider.

### Multi-cycle division unit

`mc_div_fu` divides signed 32-bit operands. It works on their magnitudes with
restoring division, `ceil(32 / LAT)` quotient bits per stage. With LAT = 9
that is 4 bits per stage, so eight stages do the work and the ninth passes the value through. The signs are
fixed at the output. The quotient rounds toward zero and the remainder takes the
dividend's sign, as in C. Division by zero gives quotient -1 and remainder =
dividend.

## Host interface

Commands (`cmd_t`: `cmd`, `tile`, `addr`, `payload`) are taken when
`cmd_valid_i && cmd_ready_o`. Each is answered by a one-cycle `rsp_valid_o`
pulse:

| command | fields | response (cycle after acceptance unless noted) |
|---|---|---|
| `CMD_CFG_WRITE` | tile, addr = word index, payload = `cfg_t` | `RSP_ACK` |
| `CMD_CFG_LEN` | tile, addr = index of the last word | `RSP_ACK` |
| `CMD_SPM_WRITE` | addr, payload[31:0] | `RSP_ACK` |
| `CMD_SPM_READ` | addr | `RSP_DATA`, data = word, two cycles after acceptance (the scratchpad read is registered) |
| `CMD_RUN` | payload[31:0] = cycles | one clear cycle, then *cycles* run cycles; `RSP_DONE` after the last |

`cmd_ready_o` is low during a run. Responses cannot be back-pressured.

## Parameters (top)

| parameter | default | from |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | FLAME's evaluated array |
| `DIV_LAT` | 9 | FLAME's division latency at 1 GHz (2 at 200 MHz) |
| `DIV_PIPE`, `MUL_PIPE` | 1, 1 | own choice (FLAME's inclusive results use pipelining) |
| `HAS_DIV` | 1 | own choice; 0 leaves the multi-cycle divider out of every tile |
| `MUL_LAT` | 2 | own choice |
| `CFG_DEPTH` | 16 | own choice |
| `SPM_WORDS` | 1024 | own choice |
| `DIST_NB` | 2 | own choice |

The data width (32), register count (4) and control-word layout are in
`flame_pkg`.

## What is FLAME's and what is this design's own

From FLAME:
* the three strategies;
* the tile that holds its counter for exclusive operations and advances it on
  completion;
* `OPT_START` / `OPT_END`, one result per tile per cycle;
* optional pipeline registers in the multi-cycle unit;
* load/store units only on the top row;
* the 4 x 4 size and the 9-cycle division;
* memory loads, multiplications and divisions as the multi-cycle operations;
* multiply-accumulate and the fused load-multiply (3 cycles, not pipelined)
  as fused multi-cycle operations.

This design's own:
* every encoding, the operation set and the operand/route sources;
* the register-file size;
* memory and configuration depths, the host command set;
* the divider algorithm and the packed half-width state of the distributed
  slices;
* the multiplier latency and the 2-cycle load.

Departures and limits:
* Distributed slices are unsigned and 16-bit. The multi-cycle divider is
  signed and 32-bit.
* Multiply-accumulate and load-multiply are the only fused operations.
  FLAME's fusion experiments rely on compiler-chosen patterns that are not
  specified.
* Stores are single-cycle; only loads wait for the memory.
* There is no compiler. Control words are written by hand (see the
  testbenches). Nothing checks a mapping beyond the assertions in `tile`.
* Edge inputs read zero. The array has no wrap-around links.
* Each tile has exactly four neighbour ports (`NDIRS` in `flame_pkg`). FLAME
  also makes the port count per tile a parameter.

## Files

* `rtl/flame_pkg.sv`: types, control word, command/response.
* `rtl/flame_cgra.sv` (top), `rtl/flame_ctrl.sv`, `rtl/spm.sv`.
* `rtl/tile.sv` with `cfg_mem`, `tile_xbar`, `tile_rf`, `alu`, `lsu`,
  `mc_div_fu`, `mc_mul_fu`, `mc_ldmul_fu` and `div_bits`.
* `tb/<module>_tb.sv`: one self-checking testbench per module.
* `tb/flame_cgra_2x2_tb.sv`, `tb/flame_gemm_tb.sv`: whole-array programs (see
  below).

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal --top-module flame_cgra_tb \
  -Irtl rtl/flame_pkg.sv rtl/*.sv tb/flame_cgra_tb.sv
./obj_dir/Vflame_cgra_tb
```

(`rtl/flame_pkg.sv` must come first. Passing it twice only draws a duplicate
warning, which `-Wno-fatal` allows.)

`flame_cgra_tb` is the end-to-end test at the default sizes. It runs the loop
`i = x / NJ; j = x % NJ; C[j*NI + i] = A[x] < 0 ? 0 : A[x]` over 24 elements,
mapped by hand three ways:
* exclusive, on one tile, 27 cycles per iteration;
* inclusive on two tiles, II = 10: the remainder overlaps the division in the
  pipelined divider and ends in the next iteration, and the load and the
  multiply-accumulate also run as `OPT_START`/`OPT_END` pairs;
* distributed, with the division passed through seven tiles as eight slices,
  II = 15.

A fourth run scales A in place with `OP_LDMUL` (II = 5, the `x++` runs while
the fused operation is in flight).

The testbench loads everything through the command port and reads C back. It
checks the run lengths. It counts exclusive stalls, inclusive overlaps,
pipelined overlaps and distributed slices from `tile_ev_o`, and fails if any
of them never happens.

`flame_cgra_2x2_tb` runs the same loop on a 2 x 2 array with a 3-cycle
divider and FUs without pipeline registers. Its mappings take 15 cycles per
iteration (exclusive), II = 8 (inclusive) and II = 16 (distributed). The
inclusive one starts the remainder only after the division has ended, because
that divider takes one operation at a time. The same testbench then scales an
array in place with `OP_LDMUL`, once exclusive (6 cycles per element) and once
inclusive (II = 5).

`flame_gemm_tb` multiplies two 4 x 4 matrices on the default array, written
the way a compiler sees the loop after flattening: one loop over the 16 outputs,
`i = x / 4`, `j = x % 4`, and the k loop unrolled four times. Its hand-made
modulo schedule has II = 16, while one iteration takes 26 cycles, so
iterations overlap. The division and remainder share the pipelined divider.
The eight loads run as `OPT_START`/`OPT_END` pairs, and the four
multiplications start on consecutive cycles in the pipelined multiplier. The
file's header lists the schedule tile by tile; it is the example to copy when
writing a new mapping.

`tile_tb` runs the same three mechanisms on a single tile and checks the
exact cycles. It also runs the distributed program on a tile built with
`HAS_DIV = 0`. The unit testbenches compare against arithmetic written in the
testbench, including divider latency and throughput.

## How far to trust it

Every module passes its own testbench under Verilator, and a deliberately
broken copy of each module fails it. The hand-written mappings exercise every
control-word field that a mapping needs. They do not cover schedules a
compiler would produce for large graphs, so a new mapping should be run with
assertions enabled. Timing, area and power have not been measured.
