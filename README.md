# A reconfigurable custom functional unit beside the FUs of a VLIW processor

An application-specific processor speeds up its hot code by executing short
chains of simple operations (an add feeding a shift feeding an XOR, say) as a
single *customized instruction*. Instead of one fixed custom unit per chain,
this design uses one **reconfigurable custom functional unit (RCFU)**: a small
grid of processing elements (PEs) whose operations and wiring are set by the
customized instruction being executed.

The RCFU is attached to an N-issue VLIW processor as one more slot of the
instruction word. In the same cycle the N ordinary functional units (FUs) and
the RCFU all work, and they share the register file: 2N read ports and N write
ports. A chain of operations is only worth putting on the RCFU if its inputs
and results fit in the ports the FUs of that bundle leave free; operations that
do not fit go to the FUs in parallel. The design follows the architecture
proposed in H.-S. Wang, *Generating and Exploiting Reconfigurable Custom
Functional Unit in Application Specific VLIW Processors* (M.S. thesis,
National Chiao Tung University, 2009); the default sizes are that work's
example of a 6-read / 3-write processor with a two-level, single-cycle, 32-bit
RCFU. Everything the thesis leaves open (encodings, bundle format, PE mix of
the default grid, and more) is this design's own choice and is listed below.

```
              bundle memory ──► sequencer (one bundle per cycle, halt bit)
                                   │
        ┌──────── 2N read ports ───┴──────────────────────────┐
        │  vliw_regfile (NREG x 32, 2N read, N write)          │
        └──┬───────────────┬──────────────────────────────▲───┘
           │ port values   │ port values (all 2N)         │ N write ports
     ┌─────▼─────┐   ┌─────▼──────────────────────────┐   │
     │ vliw_fu x N│   │ rcfu                           │   │
     │ (ALU, MUL) │   │  rcfu_cfg_mem ─► rcfu_array    │   │
     └─────┬─────┘   │  (CI table)     (PE grid)      │   │
           │         └─────┬──────────────────────────┘   │
           └──── N FU results + N RCFU results ──► write-back select
```

## The PE grid (`rcfu_array`, `rcfu_pe`)

The grid has `ROWS` levels of `COLS` positions. Each position holds a PE of one
fixed kind, or nothing:

| kind       | code | operations                          |
|------------|------|-------------------------------------|
| `PE_ARITH` | 1    | MOVE, ADD, SUB                      |
| `PE_LOGIC` | 2    | MOVE, AND, OR, XOR, NOT             |
| `PE_SHIFT` | 3    | MOVE, SLL, SRL, SRA (amount `b[4:0]`) |
| `PE_NONE`  | 0    | no PE built at this position        |

Multiply, divide and memory access are deliberately not in PEs; they stay on
the FUs. Kinds may be mixed within one level, which is the point of the
generation method this design follows: each level gets the mix of operation
kinds the target code needs rather than one kind per level.

The kinds are set by the parameter `PE_KIND_MAP`, two bits per position,
position `r*COLS + c` at bits `[2p+1:2p]`. The default `12'hE65` gives

```
row 0:  A  A  L      (positions 0 1 2)
row 1:  A  L  S      (positions 3 4 5)
```

Routing is what makes the grid usable and is the part to understand:

* A PE in **row 0** takes each operand from any of the RCFU inputs, which are
  the 2N register read-port values of the current bundle.
* A PE in **row r > 0** takes each operand from any PE of **row r-1**, and
  from nowhere else. There is no path from the register file into a lower row
  and no path that skips a row.
* A value needed two or more levels below its producer is carried down by
  PEs doing **MOVE** (every kind has MOVE). A mapping tool must reserve those
  PEs, which is why MOVE counts as a use of a PE.
* Operand B may instead be the PE's 8-bit constant, sign-extended (shift
  amounts, small masks).
* Each of the N RCFU outputs selects the output of **any** PE, at any level.

The grid is combinational. Per PE the operand selects are 4 bits (16
sources) and the output selects 6 bits (64 PEs); the array checks at
elaboration time that its sizes fit those fields.

## Customized instructions (`rcfu_cfg_mem`, `rcfu`)

A customized instruction (CI) is an index into a table of `CI_DEPTH`
configurations. An entry holds, for every position, a `pe_cfg_t`

```
{ op[3:0], src_a[3:0], src_b[3:0], b_imm, imm[7:0] }   // 21 bits, op is the MSB
```

and then one 6-bit output select per RCFU output. The word is laid out LSB
first: position p's `pe_cfg_t` at bits `p*21`, the output select of output o
at `ROWS*COLS*21 + o*6`. For the default grid an entry is 6*21 + 3*6 = 144
bits. Entries are written through the `cfg_*` port; the table is read
combinationally, so a CI reconfigures the grid in the cycle it issues.
Configuration entries for empty positions are ignored.

An issued CI whose configuration asks a PE for an operation outside its kind,
selects a source that does not exist, or routes an empty position to an
output raises `cfg_err`; the offending PE outputs 0.

With `RCFU_LAT = L > 1` the RCFU becomes an L-cycle unit: its outputs pass
through L-1 register stages, and `res_valid` follows the CI by L-1 cycles.

## The VLIW slice and its port budget (`vliw_rcfu_core`)

The top executes one bundle per cycle from an `IMEM_DEPTH`-entry bundle memory,
starting at bundle 0 on `start` and stopping after the first bundle with its
halt bit set (`done` then stays high). There are no branches and no memory
operations: programs are straight-line basic blocks, which is the scope in
which customized instructions are formed.

A bundle, LSB first (widths for the default N = 3, 32 registers):

| field            | bits per item              | meaning |
|------------------|----------------------------|---------|
| `rd[p]`, p < 2N  | 5                          | register read by port p |
| `fu[i]`, i < N   | op 4, a 3, b 3, b_imm 1, imm 16 | FU operation; a, b are read-port numbers; `b_imm` uses the sign-extended `imm` |
| `ci_idx`, `ci_valid` | 4, 1                   | customized instruction to issue |
| `wb[j]`, j < N   | rd 5, src 3, en 1          | write port j: src 0..N-1 is FU src, N..2N-1 is RCFU output src-N |
| `halt`           | 1                          | last bundle |

That is 144 bits for N = 3. The RCFU's inputs are the read-port values
themselves, so a CI and the FUs of its bundle draw from the same 2N registers,
and RCFU outputs compete with FU results for the N write ports. Keeping a
bundle legal is the compiler's job; the hardware checks two things:

* writing an RCFU output when no RCFU result is valid (no CI this cycle for a
  single-cycle unit, none L-1 cycles ago for an L-cycle unit) drops that
  write and sets `sched_err`;
* two write ports naming the same register trips an assertion in
  `vliw_regfile` (the higher port wins).

Reads return the register values from before the bundle; all writes happen at
the end of the cycle. With `RCFU_LAT > 1` the bundle that executes L-1 cycles
after a CI is the one that writes its results (exposed latency, no
interlocks).

`stat_cycles`, `stat_fu_ops`, `stat_ci`, `stat_overlap` (CIs issued while at
least one FU was busy) and `stat_reconf` (CIs whose index differs from the
previous CI) count the run since the last `start`; `cfg_err` and `sched_err`
are sticky until then. `dbg_addr`/`dbg_data` read any register at any time.

## Parameters

| parameter (top) | default | origin |
|-----------------|---------|--------|
| `N` (FUs; 2N read, N write ports) | 3 | source design's example processor (6 read / 3 write) |
| `ROWS`          | 2       | two levels, as for that processor at 60 % coverage |
| `COLS`, `PE_KIND_MAP` | 3, A A L / A L S | own choice; the source gives the level count but the width and kinds of the example grid are not recoverable |
| `RCFU_LAT`      | 1       | single-cycle unit is the source design's main case; 2 and 3 are also evaluated there |
| `NREG`          | 32      | own choice |
| `IMEM_DEPTH`    | 64      | own choice |
| `CI_DEPTH`      | 16      | own choice |
| data width      | 32      | source design (`rcfu_pkg::XLEN`) |

The source design evaluates N = 2, 3, 4 with grids of 1 to 8 levels. Those
are parameter changes here (up to 16 sources per row and 64 PEs per grid),
but the width and PE kinds of each level must be supplied, since they come
out of the generation tool for a given set of applications.

## Files

| file | contents |
|------|----------|
| `rtl/rcfu_pkg.sv`       | PE kinds, PE and FU operation codes, `pe_cfg_t` |
| `rtl/rcfu_pe.sv`        | one PE |
| `rtl/rcfu_array.sv`     | PE grid, level-to-level routing, output select, latency stages |
| `rtl/rcfu_cfg_mem.sv`   | customized-instruction configuration table |
| `rtl/rcfu.sv`           | RCFU = table + grid |
| `rtl/vliw_regfile.sv`   | 2N-read / N-write register file with an inspection port |
| `rtl/vliw_fu.sv`        | base FU: ALU with multiply |
| `rtl/vliw_rcfu_core.sv` | top: bundle memory, sequencer, FUs, RCFU, write-back, counters |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes; each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/rcfu_pkg.sv tb/tb_vliw_rcfu_core.sv --top-module tb_vliw_rcfu_core
./obj_dir/Vtb_vliw_rcfu_core
```

| testbench | what it shows |
|-----------|---------------|
| `tb_rcfu_pe`         | every operation code on each PE kind, including rejection of foreign operations |
| `tb_rcfu_array`      | random legal and illegal configurations against a level-by-level model, single-cycle and 3-cycle grids, valid timing |
| `tb_rcfu_array_deep` | an eight-level trapezoid grid (8 inputs, 4 outputs, 20 PEs, empty positions) as for an 8-read / 4-write processor, single-cycle and 4-cycle |
| `tb_rcfu_cfg_mem`    | reset clearing, write timing, read-back |
| `tb_rcfu`            | hand-written CIs (two-level chains, MOVE through a level, an illegal CI), switched every cycle, 1- and 2-cycle units |
| `tb_vliw_regfile`    | all 6 read and 3 write ports against a shadow copy |
| `tb_vliw_fu`         | every FU operation against an independent reference |
| `tb_vliw_rcfu_core`  | default top: 25 random programs with random CIs against an architectural model (registers, counters, one cycle per bundle), then the two error flags; counts FU+RCFU overlap, reconfiguration, MOVE level skips, two-level chains, use of each PE kind and fully mixed write-back, and fails if any never happened |
| `tb_vliw_rcfu_core_lat2` | the same with a 2-cycle RCFU, plus delayed write-back |
| `tb_workload_crc32`  | CRC-32 of "abc" (0x352441C2) with the bit step as two CIs while an FU counts bits in parallel; 2 cycles per bit |
| `tb_workload_example_schedule` | N = 2 processor with a five-PE three-level grid (one empty position) running an eight-operation graph in two cycles, FU and RCFU together |

`tb_core_common.svh` and `tb_bundle_types.svh` hold code shared by the
top-level testbenches (the bundle types must match the top's field order).

## What is not here, and how far to trust it

* The base processor around the execute slice (fetch pipeline, branches,
  data memory, loads and stores, divide) is not built; the source design takes
  it as given. The bundle memory and sequencer exist only so the slice can
  run programs.
* The compile-time side of the source design, which generates the grid shape
  from application profiles and maps and schedules operations onto FUs and
  RCFU, is software and is not part of this RTL. Programs and configurations
  in the testbenches are written by hand or generated randomly.
* The default grid's width and PE mix, the constant operand, the CI table,
  all encodings and the bundle format are this design's choices.
* A "lower PEs adjacent to the upper level" connection is read as a full
  crossbar between consecutive levels; a sparser network would need fewer
  select bits and fewer multiplexers.
* A multi-cycle RCFU is built as register stages at the output of a
  combinational grid, leaving retiming to synthesis, rather than as a grid
  pipelined level by level.
* All testbenches pass in Verilator; the RTL also elaborates and synthesizes
  (generic cells) in Yosys. Nothing has been timed against a cell library, so
  the source design's delay figures (1.3 to 10 ns depending on depth, in
  130 nm) are not reproduced here.
