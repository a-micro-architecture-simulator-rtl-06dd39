# A clustered VLIW stream processor in SystemVerilog

This is a small stream processor in the style of Imagine, written as synthesizable RTL. A
controller streams wide, statically scheduled instructions to a row of identical arithmetic
clusters. Each cluster has five pipelined functional units. Data sits in a three-level register
hierarchy:

* the **SRF** (stream register file), one array shared by all clusters;
* the **SP** (scratch pad), one per cluster;
* the **LRFs** (local register files), two at the inputs of every functional unit.

There are no caches, no interlocks and no dynamic scheduling. The program decides, cycle by cycle,
which unit does what, where each operand comes from and where each result goes. The hardware just
does it and counts what it did.

The default build has 4 clusters. Each cluster holds 2 ALUs, 2 multipliers and 1 divide unit.
Every register array has 64 words of 32 bits. The cluster count is a parameter, and the test
benches also build 1, 2 and 8 clusters.

```
             +-------------------+      +-------------+
  host ----> | instruction memory|----> | controller  |---- issue, one 137-bit word per cluster
             |  DEPTH rows x NCL |      |  start/done |
             +-------------------+      +-------------+
                                               |
        +-------------------+------------------+------------------+
        v                   v                                     v
  +-----------+       +-----------+                         +-----------+
  | cluster 0 |       | cluster 1 |          ...            | cluster N |
  | ALU ALU   |       |           |                         |           |
  | MUL MUL   |       |           |                         |           |
  | DIV       |       |           |                         |           |
  | SP, LRFs  |       |           |                         |           |
  +-----------+       +-----------+                         +-----------+
        ^  |                ^  |                                  ^  |
        |  v                |  v                                  |  v
  +-------------------------------------------------------------------------+
  |          SRF, 64 x 32 bit, shared: 10 reads + 5 writes per cluster       |
  +-------------------------------------------------------------------------+
                                   ^ |
                        host port (stream load / store)
```

## The register hierarchy and where values travel

The central idea is to keep values as close to the unit that consumes them as possible.

* **LRF0 / LRF1** (64 words each, two per unit). Operand 1 of a unit can come from its own
  LRF0, and operand 2 from its own LRF1. A unit can write its result back into its own LRF0,
  which suits accumulations and chained operations on one unit. It can also write into the LRF1
  of any of the other four units in its cluster, which forwards a value straight to a neighbour.
* **SP** (64 words per cluster). Every unit of the cluster can read and write it. It holds
  values that several units need, or values that must wait.
* **SRF** (64 words, shared). It holds the input and output streams, and it is the only path
  between clusters. With 4 clusters there are 40 read ports and 20 write ports on one array, so
  programs should use it for stream data and cross-cluster exchange only.

Each operand field selects its source with 2 bits:

| code | operand 1 | operand 2 |
|---|---|---|
| `00` | zero (unused) | zero (unused) |
| `01` | SRF[addr] | SRF[addr] |
| `10` | SP[addr] | SP[addr] |
| `11` | own LRF0[addr] | own LRF1[addr] |

The 3-bit destination field is relative to the issuing unit:

| code | result goes to |
|---|---|
| `000` | nowhere |
| `001` | SRF[wbaddr] |
| `010` | SP[wbaddr] of this cluster |
| `011` | own LRF0[wbaddr] |
| `100`..`111` | LRF1[wbaddr] of the 1st..4th *other* unit, in ascending unit order |

Units are numbered 0 ALU-1, 1 ALU-2, 2 MUL-1, 3 MUL-2, 4 DIV. For ALU-1, `100` therefore means
ALU-2, `101` MUL-1, `110` MUL-2 and `111` DIV. For MUL-1 the same codes mean ALU-1, ALU-2, MUL-2
and DIV.

All arrays read combinationally and write on the clock edge. There is no bypass: a value written
at the end of cycle *t* is visible from cycle *t+1*. Two writes to the same register in one cycle
are resolved by fixed priority, so the result is always defined:

1. a higher unit number wins over a lower one;
2. in the SRF, a higher cluster number wins over a lower one;
3. the host port has the lowest priority.

## Instruction format

One cluster instruction is 137 bits. It holds five unit instructions, laid out from ALU-1 in the
top bits down to DIV in the bottom bits:

```
 136        108 107         79 78          53 52          27 26           0
 [ ALU-1 29b  ][ ALU-2 29b   ][ MUL-1 26b   ][ MUL-2 26b   ][ DIV 27b     ]
```

Each unit instruction has the same fields, MSB first. Only the opcode width differs: ALU 4 bits,
MUL 1 bit, DIV 2 bits.

```
 src0(2) addr0(6) src1(2) addr1(6) dest(3) wbaddr(6) opcode(4|1|2)
```

In general, a unit instruction is 8, 5 or 6 bits plus 3 × ADDR_BIT + DEST_BIT. The address width
(6) and the destination width (3; 4 if a cluster had 6 to 13 units) are derived in `sp_pkg`.

| unit | opcode | operation |
|---|---|---|
| ALU | 1..13 | ADD, SUB, ABS(op1), AND, OR, XOR, NOT(op1), SLL, SRL, SRA, LT, LE, EQ |
| ALU | 0, 14, 15 | no operation |
| MUL | 1 | signed fixed-point multiply, Q16.16: `(a*b) >>> 16` |
| DIV | 1 / 2 / 3 | signed quotient / remainder / unsigned integer square root of op1 |

More details of the operations:

* Shifts use the low 5 bits of operand 2.
* The compare operations (LT, LE, EQ) are signed and return 1 or 0.
* Division rounds toward zero, as in C.
* Divide by zero gives an all-ones quotient, and the remainder equals the dividend.
* `INT_MIN / -1` gives `INT_MIN` with remainder 0.
* The square root is `floor(sqrt(op1))`, with op1 taken as unsigned.

Any slot with opcode 0 is idle. An idle slot reads and writes nothing and is not counted.

## Timing: static scheduling with exposed latencies

The units are pipelined 2 (ALU), 4 (MUL) and 6 (DIV) cycles deep. An instruction issued in cycle
*t* reads its operands in cycle *t*. Its result is written at the end of cycle *t + L − 1*, so the
earliest instruction that can use it issues at *t + L*. For example, an ALU result can be used two
rows later.

Nothing stalls. An instruction that reads too early gets the old value, and programs may rely on
this: a row can read a register that an earlier, still-running operation is about to overwrite.
Every unit accepts a new instruction every cycle.

The controller runs a program like this:

1. It takes a `start` pulse together with `prog_len`.
2. It reads one instruction-memory row per clock. The memory read is synchronous, so each row
   issues one cycle after its address is presented.
3. It gives word *c* of each row to cluster *c*, with a common `issue` strobe.
4. After the last row, it waits 6 cycles (the deepest pipeline) so that every result has landed.
5. It raises `done` and holds it until the next start.

`cycles` reports start-to-done time: `prog_len + 6`.

## Statistics

Every cluster counts, at issue:

* the ALU, MUL and DIV operations it executes;
* its accesses to each register level: SRF, SP, and LRF (LRF0 and LRF1 together).

A read counts when its source code is not `00`. A write counts when its destination is not `000`.

Each cluster also keeps a usage map: one bit per SP register and one per LRF register. A bit is
set when any issued operation reads that register or writes it. `sp_used` and `lrf_used` report
how many bits are set, which tells you how much of each level a program really needs. The shared
SRF has its own map at the top level, reported as `srf_used`. Host preloads do not mark
registers.

All counters and maps clear when a run starts. They appear on the top-level `perf` port as one
`perf_t` per cluster, next to `srf_used` and the measured `cycles`.

## Modules

| file | contents |
|---|---|
| `rtl/sp_pkg.sv` | sizes, derived widths, encodings, structs, slot decode |
| `rtl/stream_processor.sv` | top: instruction memory, controller, clusters, shared SRF, host port |
| `rtl/controller.sv` | start/run/drain state machine, row fetch, cycle counter |
| `rtl/inst_mem.sv` | DEPTH rows of NCL cluster instructions, write one word, read a whole row |
| `rtl/cluster.sv` | slot decode, operand fetch, five units, write-back routing, SP, LRFs, counters |
| `rtl/alu_unit.sv`, `mul_unit.sv`, `div_unit.sv` | the pipelined functional units |
| `rtl/regfile.sv` | 64 × 32 array with parameterised read and write ports, used for every level |

The top-level parameters are `NCL` (clusters, default 4) and `DEPTH` (instruction rows, default
256). The unit mix and the array sizes are constants in `sp_pkg`. Changing the unit mix also changes
the instruction width and the destination encoding, so keep the slot-order functions there
consistent.

### Host interface

All of these ports are used only while the processor is idle. Assertions check this.

* `imem_we/addr/cl/wdata` writes one cluster instruction.
* `host_we/lvl/cl/fu/addr/wdata` writes one register of any level:
  * `host_lvl` selects SRF, SP, LRF0 or LRF1;
  * `host_cl` selects the cluster;
  * `host_fu` selects the unit.
* `host_rdata` reads the selected register combinationally.

These ports stand in for the stream load and store path between off-chip memory and the SRF, and
they are how constants are preloaded into the LRFs.

## Verification

Each test bench checks its module against an independent model and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog.

* `tb_alu_unit`, `tb_mul_unit`, `tb_div_unit` send random operands and opcodes, including
  corner values, and check the result, its destination and its exact latency.
* `tb_regfile` applies random multi-port traffic and checks write priority.
* `tb_inst_mem` and `tb_controller` check the row layout, issue order, `cycles` and `done`.
* `tb_cluster` runs random cluster instructions against a cycle-accurate model of a cluster. The
  model is in `tb/sp_ref.svh`.
* `tb_stream_processor` is the full-size build (4 clusters, 256 rows). It preloads every register,
  then runs random programs against the model and compares every register and every counter.
  It also counts that the following actually occurred, and fails if any never happened:
  * stale reads of in-flight results;
  * same-cycle write collisions;
  * cross-cluster exchange through the SRF.
* `tb_fft32` builds 1, 2, 4 and 8 clusters and runs a 32-point complex FFT on each:
  * it generates a radix-2 decimation-in-frequency schedule for each size;
  * twiddle factors sit in the multipliers' LRF0s;
  * butterflies with twiddle 1 or −j use the ALUs only;
  * results are checked bit-exactly against a fixed-point model, and within 0.01 of a
    double-precision DFT.

  It prints one line per build. With the included schedule generator:

  | clusters | rows | cycles | SRF / SP / LRF registers used (all clusters) |
  |---|---|---|---|
  | 1 | 239 | 245 | 64 / 28 / 112 |
  | 2 | 141 | 147 | 64 / 28 / 136 |
  | 4 | 83 | 89 | 64 / 28 / 144 |
  | 8 | 45 | 51 | 64 / 28 / 152 |

To run one test bench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fft32 rtl/sp_pkg.sv tb/tb_fft32.sv
./obj_dir/Vtb_fft32
```

## Departures from the design this follows, and open points

The design follows a published description of a stream-processor simulator. That description gives
the organisation, the unit mix, the register sizes, the instruction formats and encodings, the
opcode tables and the pipeline depths. Where this RTL differs, or had to decide something the
description leaves open:

* **It is hardware, not a simulator.** Instructions are written through a port instead of being
  read from a file. The off-chip data memory is not modelled; the host register port takes its
  place. The original reports an estimated run time per cluster, computed from operation counts
  and unit latencies. This design instead measures the real cycle count, which also includes
  dependency waits and the final drain.
* **Register usage is defined here.** The original reports how many registers of each level a
  program needs, but does not define "used". Here a register counts as used once any issued
  operation reads it or writes it.
* **Chosen, not given:**
  * the slot order inside the 137-bit word;
  * the mapping of destination codes `100`–`111` to the other units;
  * operand fetch in the issue cycle;
  * the same-cycle write priority;
  * the host interface;
  * the instruction-memory depth of 256 rows;
  * the Q16.16 multiply format;
  * the divide-by-zero and overflow results;
  * treating DIV opcode 3 as square root (the original's prose also calls it "exponent").
* **FFT cycle counts differ.** The original's hand-written FFT program is not available. It reports
  449, 277, 138 and 84 cycles for 1, 2, 4 and 8 clusters; the schedule generated here takes
  245, 147, 89 and 51. Both show the same trend: near-linear speed-up up to 4 clusters, then
  diminishing returns, because each FFT stage waits for the previous one through the shared SRF.
  The two sets of numbers do not measure the same program or the same quantity.
* **The SRF port count grows with the cluster count** (10 reads and 5 writes per cluster). That is
  faithful to a single shared 64-word SRF, but it is the part of the design that scales worst.
