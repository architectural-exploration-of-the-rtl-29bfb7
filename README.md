# ADRES 4x4_reg_con_all — a VLIW processor and a coarse-grained array sharing one set of FUs

ADRES couples two processors in one data path. A 4-issue VLIW processor runs
the control-heavy code; when it reaches a loop that has been modulo-scheduled
for the array, it issues a single CGA instruction, and sixteen functional
units (the four VLIW FUs plus twelve array FUs) execute that loop as a
coarse-grained reconfigurable array (CGA), one configuration context per
cycle. When the loop is done the VLIW processor continues at the next
instruction, exactly like returning from a function call.

This RTL builds the instance `4x4_reg_con_all`, the array that the published
architecture exploration of ADRES selects as its best energy/performance
trade-off: a 4x4 grid, non-pipelined (every operation takes one cycle), with
mesh, mesh_plus and diagonal register-file interconnect. It is written in
synthesizable SystemVerilog (IEEE 1800-2017) and simulates with plain
Verilator.

## The array

```
            global DRF 64x32 (12R/4W)   global PRF 64x1 (4R/4W)
              |  |  |        |  |  |       ...
row 0       [FU]----[FU]----[FU]----[FU]      VLIW section: load/store FUs
              |  \  / |  \  / |  \  / |       (vliw_tile)
row 1       [FU/RF]-[FU/RF]-[FU/RF]-[FU/RF]
              |  /  \ |  /  \ |  /  \ |       CGA section: FU + local DRF
row 2       [FU/RF]-[FU/RF]-[FU/RF]-[FU/RF]   16x32 (2R/1W) + local PRF 16x1
              |  \  / |  \  / |  \  / |       (1R/1W) + 3 configuration
row 3       [FU/RF]-[FU/RF]-[FU/RF]-[FU/RF]   memories each (cga_tile)
       (mesh_plus links, two steps away, not drawn)
```

* **Row 0** holds the four VLIW FUs (`vliw_tile`). Each owns three read ports
  and one write port of the global data register file (DRF) and one read and
  one write port of the global predicate register file (PRF), which gives the
  12R/4W and 4R/4W port counts. Only these FUs load and store, through four
  data memory ports. They work in both modes.
* **Rows 1–3** are the CGA tiles (`cga_tile`): an FU without memory access,
  a local DRF (16 x 32 bit, 2 read / 1 write), a local PRF (16 x 1 bit,
  1 read / 1 write), three 128-word configuration memories (one behind the FU
  and its source muxes, one behind the DRF, one behind the PRF), the source
  muxes and the output registers.
* **The VLIW control unit** (`vliw_cu`) fetches, dispatches, branches and
  switches mode.
* The instruction cache and the data memory are outside the core. Both are
  assumed never to miss: the core expects `imem_rdata` and `dmem_rdata` to
  answer their address in the same cycle.

Data is 32 bits wide, predicates 1 bit.

## How a cycle works (non-pipelined timing)

Every FU is combinational. In one clock cycle an operation reads its
sources, computes, and at the rising edge:

* the FU's **output register** (`out_data`, and `out_pred` for compares)
  takes the result if the guard predicate was true;
* the selected **register file** word is written (global DRF/PRF for row 0,
  local DRF/PRF for the other rows).

Register files read asynchronously, so a value written at an edge is
readable in the next cycle; there is no same-cycle bypass. Neighbours only
ever see **output registers**, never a neighbour's combinational result, so
a value produced in cycle t is usable by an adjacent FU in cycle t+1. This
one-cycle hop is the unit of every schedule on the array.

## Interconnect of reg_con_all

Each FU source mux (`src_sel_e` in `adres_pkg`, 16 inputs) can pick:

| select | source |
|---|---|
| `SRC_RFA`, `SRC_RFB` | local DRF read ports A and B (row 0: the global DRF read port of that operand) |
| `SRC_SELF` | own output register (accumulation) |
| `SRC_N/S/E/W` | **mesh**: output registers of the four neighbours |
| `SRC_N2/S2/E2/W2` | **mesh_plus**: output registers two steps away, routing over the neighbour |
| `SRC_NE/NW/SE/SW` | **reg_con2**: read port B of the local DRF of the diagonal tile (for a row 0 neighbour: its global DRF read port B) |
| `SRC_IMM` | 16-bit sign-extended immediate from the configuration word |

and every local DRF write port can take its own FU's result or, via
**reg_con1**, the output register of any diagonal FU (`wsrc_sel_e`). In CGA
mode a row 0 tile's global DRF write port has the same choice. The
guard mux (`psrc_sel_e`) picks constant true/false, the local (or, in row 0,
global) PRF, the FU's own predicate register, or a mesh neighbour's predicate
register.

Links that would leave the 4x4 grid do not exist and read as zero. The
VLIW row has no local DRF, so its diagonal links end at the global DRF
instead:

* a row 1 FU reading NE or NW sees the global DRF read port B of that row 0
  tile;
* a row 0 tile can write the global DRF from its SE or SW FU's output
  register.

Both reuse the tile's own global DRF ports, so the port counts stay
12 read and 4 write. Apart from these links, the CGA rows reach the global
DRF only through row 0.

## The two modes

**VLIW mode.** Each cycle the control unit fetches a 4-slot instruction
(`vliw_instr_t`, one `vliw_op_t` per slot) at `pc` and dispatches slot *i*
to VLIW FU *i*. An operation reads `DRF[src1]`, `DRF[src2]` or a 16-bit
sign-extended immediate, and `DRF[src3]` (store data), is guarded by
`PRF[pred]` when `pred_en` is set, and writes `DRF[dst]` — or `PRF[dst]`
for compares. The CGA tiles are idle: their configuration memories read
as all-zero words, which decode as NOP with no register writes.

Slot 0 may carry a control operation:

| op | effect |
|---|---|
| `OP_BR` | `pc = imm` if the guard is true, else `pc + 1` |
| `OP_CGA` | run an array loop, then continue at `pc + 1` |
| `OP_HALT` | stop fetching; `halted` goes high |

**CGA mode.** `OP_CGA` carries the loop descriptor: `imm[6:0]` is the first
context address, `imm[13:7]` is II − 1 (II = initiation interval, the number
of contexts per iteration, 1–128), and `DRF[src1]` is the iteration count
(0 skips the loop). The mode controller then broadcasts the context address
`ctx` = base, base+1, …, base+II−1, base, … one per cycle for II x count
cycles (addresses wrap modulo 128). Every FU, DRF and PRF control unit reads
its own configuration memory at `ctx`, so all sixteen FUs execute their part
of the modulo schedule in parallel. The VLIW slots receive NOPs meanwhile;
the other three slots of the instruction that holds `OP_CGA` still execute
in its issue cycle. The prologue and epilogue of a modulo-scheduled loop are
not handled by hardware: the schedule folds them into its contexts and its
count, or guards them with predicates.

### A worked schedule

`tb/tb_adres_top.sv` runs `y[j] = 3*x[j] + 7` with II = 2 (contexts A, B)
and, in the same loop, sums `x` and counts iterations below a threshold:

| tile | A | B |
|---|---|---|
| (0,0) | `LD out = mem[r1]` | `r1 = r1 + 1` |
| (1,0) | – | `out = N * 3`, local DRF[0] = out (mesh, vertical) |
| (2,1) | `out = NW.RF_B + 7` (reg_con2 from (1,0)) | – |
| (0,1) | `r2 = r2 + 1` | `ST mem[r2] = S2` (mesh_plus from (2,1)) |
| (1,1) | `out = RF_A + out` | local DRF[2] = NW output register (reg_con1 from (0,0)) |
| (1,2) | `pred = W < T`, local PRF[0] = !pred | `out += 100` guarded by local PRF[0] |
| (1,3) | – | `out += 1` guarded by W's predicate |

Each element crosses three FUs, so the store for iteration *k* happens in
iteration *k*+1: the loop runs N+1 times and its first store writes a
known fill value below the output array. A second CGA loop, with two
contexts, moves the array results into the global DRF through row 0. Part
of that traffic uses the diagonal links: (0,0) writes the global DRF from
(1,1), and (1,0) reads the global DRF through (0,1).

## Configuration memories

Each control unit has a 128-word memory (`cfg_mem`), loaded through the
top-level `cfg_*` port: `cfg_row`/`cfg_col` pick the tile, `cfg_unit` the
control unit (`CU_FU`, `CU_DRF`, `CU_PRF`; a row 0 tile has one memory and
ignores `cfg_unit`), `cfg_addr` the context. Word layouts are the packed
structs `cga_fu_cfg_t` (32 bits), `cga_drf_cfg_t` (16), `cga_prf_cfg_t` (10)
and `vliw_cfg_t` (78, the width of `cfg_wdata`; narrower words use its low
bits). The memories are not reset: load every context a loop uses, and load
zeros (NOP) into the tiles a loop does not use. Loading while the core is
held in reset is the simple way to do this.

## Operation set

`OP_ADD SUB MUL AND OR XOR SHL SHR SRA MOV` write a data result (multiply
keeps the low 32 bits, shifts use `src2[4:0]`). `OP_EQ NE LT LTU` write
`pred_dst1` = condition and `pred_dst2` = its complement, plus 0/1 as data.
`OP_LD` (`dst = mem[src1 + src2]`) and `OP_ST` (`mem[src1 + src2] = src3`)
work only in row 0. A false guard suppresses every write, including a
store.

## Files

| file | contents |
|---|---|
| `rtl/adres_pkg.sv` | sizes, opcodes, mux encodings, instruction and configuration structs, the source mux functions |
| `rtl/adres_top.sv` | the 4x4 instance: control unit, global DRF/PRF, tiles, interconnect |
| `rtl/vliw_cu.sv` | fetch, dispatch, branches, VLIW/CGA mode controller |
| `rtl/vliw_tile.sv` | a VLIW FU with its muxes, output registers and configuration memory |
| `rtl/cga_tile.sv` | a CGA FU with local DRF/PRF, three configuration memories, muxes |
| `rtl/fu.sv` | the functional unit |
| `rtl/regfile.sv` | the parameterised multi-port register file (all four kinds) |
| `rtl/cfg_mem.sv` | a configuration memory |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_adres_top` runs the whole design; `tb_fft1024`, `tb_idct396` and `tb_idct396_vliw` run the kernels |
| `tb/adres_ref_pkg.sv` | FU reference model used by the tile testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/adres_pkg.sv tb/adres_ref_pkg.sv rtl/fu.sv rtl/regfile.sv rtl/cfg_mem.sv \
  rtl/cga_tile.sv rtl/vliw_tile.sv rtl/vliw_cu.sv rtl/adres_top.sv \
  tb/tb_adres_top.sv --top-module tb_adres_top
./obj_dir/Vtb_adres_top
```

A block alone needs `adres_pkg.sv`, the block's files and its testbench
(plus `adres_ref_pkg.sv` for `tb_cga_tile`, `tb_vliw_tile`). The testbenches
drive every input and the design resets all state it reads, so results do
not depend on Verilator's random initial values.

What is checked:

* `tb_fu`: every operation against a reference model, with and without
  memory access, guard true and false.
* `tb_regfile`: the global DRF configuration (12R/4W) and a local PRF against
  a shadow copy, including write collisions.
* `tb_cfg_mem`: all 128 words, the all-zero output outside CGA mode.
* `tb_cga_tile`, `tb_vliw_tile`: random contexts and random VLIW operations
  against a reference model of the tile, cycle by cycle.
* `tb_vliw_cu`: the exact pc/mode/context trace of a program with branches,
  a CGA loop, a skipped loop, a loop whose contexts wrap, and HALT; the
  loop lengths must be exactly II x count cycles.
* `tb_adres_top`: the program above with N = 200 at the default sizes; it
  checks the memory image, the exact cycle count (one per VLIW instruction
  plus II x count per loop), and that every mechanism (mode switch, branch,
  load, store, mesh in both directions, mesh_plus, reg_con1, reg_con2,
  local PRF guard, neighbour predicate guard, false guard) occurred.
* `tb_fft1024`, `tb_idct396`, `tb_idct396_vliw`: the two kernels below, at
  full size, against bit-exact references and exact cycle counts.

## What is this design's own choice

The published description fixes the array size and topology, the 32-bit
data path, 1-bit predicates, register file sizes and port counts, the
128-word configuration memories with one per FU/RF, load/store in the VLIW
row only, the FU port set (three sources, one data and two predicate
destinations, a guard input) and the non-pipelined timing. Everything below
is this implementation's choice:

* the operation set, all encodings, the instruction format, the CGA loop
  descriptor and the configuration word layouts (no compiler output exists
  for them, so schedules are written by hand);
* which register carries each link: neighbours read output registers,
  reg_con2 carries local DRF read port B, reg_con1 writes take diagonal
  output registers, and at row 0 both end at the tile's own global DRF
  ports;
* the source and guard mux selects are fields of the FU's configuration
  word, as the published data path figure draws them. The published text
  instead gives each multiplexer a memory of its own; the depth and the
  behaviour are the same either way;
* no wrap-around links at the array edges;
* no operand-swap crossbar between the source muxes and the FU. The
  published data path has one, but here the src1 and src2 muxes see the
  same sources, so a swap is never needed;
* one predicate output register per FU, holding the condition (pred dst1).
  The published data path also registers pred dst2. Here the complement
  reaches a register file only through the PRF write mux, and neighbours
  see only the condition;
* no hardware stage counter for prologue/epilogue predication; loops fold
  prologue and epilogue into their schedule;
* configuration memories written as register arrays with asynchronous read,
  where a real chip would use SRAM macros, and loaded through a simple
  write port;
* reset clears register files, output registers and the control unit, not
  the configuration memories;
* the instruction cache and data memory are not part of the RTL.

Only the selected interconnect is built. The other interconnect options of
the exploration (extra FU bypass, shared global-DRF ports for the array,
predicate/data busses) and the pipelined successor core are not.

## The two kernels on the array

The instance was chosen for two kernels: an IDCT over 396 8x8 blocks and
one 1024-point FFT. Both run here at full size on the default parameters,
each with a hand-written schedule. No compiler comes with this RTL.

**FFT (`tb_fft1024`).** This is a radix-2 decimation-in-time transform in
32-bit integers. The twiddles are in Q12 fixed point, and products are
scaled by >>> 12. It makes ten CGA loop calls, one per stage. Each call
runs 512 iterations of one butterfly with II = 10.

* Row 0 computes the addresses and does the loads and stores.
* Row 1 forms the products and keeps operands in its local DRFs.
* The reg_con1 diagonal write inputs capture the a operand from row 0.
* Row 2 reads it back over the reg_con2 diagonal links to form a - t.
* The second result is stored over a mesh_plus link.

The run takes 51,241 cycles: one per VLIW instruction, plus 10 x 512 x 10
in CGA mode. The result is bit-exact against the same algorithm computed
in the testbench, and a test tone lands in the expected bin.

**IDCT (`tb_idct396`).** Each block is transformed in two passes of
8-point matrix-vector products, y[i] = (sum_k M[i][k] x[k]) >>> 12. M is
the 8x8 IDCT matrix in 12-bit fixed point. Each pass writes its output
transposed, so the second pass reads the columns of the first pass's
result as contiguous vectors.

A one-iteration setup loop (17 contexts) loads M. It leaves column k of M
in local DRF words 0..7 of one tile in rows 1 and 2. The main loop has
II = 32 and handles one vector per iteration:

1. Row 0 computes the addresses.
2. Row 0 loads the 8 inputs. Rows 1 and 2 keep them in DRF word 8, using
   the mesh and mesh_plus links.
3. For each of the 8 outputs, 8 tiles multiply DRF[i] by DRF[8].
4. Row 3 reduces the 8 products in three levels. These use the mesh and
   mesh_plus links, including W + E2 at tile (3,1).
5. Tile (2,1) scales the result, and tile (0,1) stores it through S2.

An output takes six contexts, but a new one starts every three. The
contexts fall into three phases, and each tile has at most one operation
per phase:

| phase | operations |
|---|---|
| 0 | the multiplies of output i, and the last add of output i-1 |
| 1 | the pair adds, and the scaling |
| 2 | the cross adds, and the store |

Every output register is read before it is overwritten. A pass over
3,168 vectors therefore takes 101,376 cycles, and the full run takes
202,776 cycles. The result is compared word for word with the testbench's
own computation. A DC-only block must come out flat.

**IDCT in VLIW mode only (`tb_idct396_vliw`).** The same transform runs on
the four VLIW slots alone, with the coefficients as immediates. The
testbench packs the loop body into 4-slot instructions with a small list
scheduler. The scheduler respects the one-cycle result latency and the
register hazards. The body is 42 instructions for 152 operations, and the
run takes 266,116 cycles. So the array schedule is 1.31 times faster,
although it leaves most tiles idle in most contexts and does not overlap
loop iterations.

The published figures for the IDCT (energy divided by power) put the
compiled schedule at about 47,000 cycles at 100 MHz. A compiler that
overlaps iterations (modulo scheduling) and packs the 16 FUs densely would
close much of that gap. The published FFT row cannot be compared: it
implies fewer cycles than 5,120 butterflies need on 16 FUs.

## Sizes against the evaluated kernels

The IDCT's data is 396 x 64 = 25,344 words per array. With its
intermediate array and the matrix, it needs 76,096 words in all. The
FFT's data is 2 x 1024 words plus 1,024 twiddle words. Both live in the
external data memory, which the 32-bit addresses cover. The loops use 49
(IDCT) and 10 (FFT) of the 128 configuration memory words, and at most
9 of the 16 local DRF words.
