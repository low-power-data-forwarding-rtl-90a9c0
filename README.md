# Low-power data forwarding for a four-way VLIW core

In a pipelined processor with forwarding, many results are consumed only by the
one, two or three instructions that follow their producer. Those consumers
already receive the value through the bypass network, yet a conventional
pipeline still writes every result into the register file (RF) and still reads
every source operand from it. On a wide VLIW machine the RF is a large
multi-ported array (here 64 x 32 bits, 8 read and 4 write ports) and those
accesses are a large part of the core's power.

This design removes the useless accesses. The compiler, which on a VLIW already
knows the exact cycle in which every value is produced and consumed, marks

* a **Write Inhibit** bit on a result whose every use lies within the
  forwarding window and which is redefined before any later use: that value
  never goes to the RF;
* a **Read Inhibit** bit on a source operand whose producer is one of the three
  bundles just ahead: that RF read port is left idle (its address lines are held
  still so the port does not toggle) and the operand arrives through a
  forwarding path instead.

The hardware cost is one gate on each RF write enable, a small register per read
port, and three extra bits per operation. The hard part is keeping the scheme
correct when the fixed producer/consumer timing breaks: exceptions, interrupts and
cache misses. That is handled by *forced writeback* (below).

## Pipeline and forwarding paths

Five stages, one bundle of four operations per cycle:

| stage | work |
|-------|------|
| IF  | fetch a 140-bit bundle (`fetch_unit`, `icache`) |
| ID  | decode, RF read (8 ports), MEM/ID bypass (`decode_unit`, `regfile`, `bypass_mux`) |
| EX  | four one-cycle ALUs, EX/EX and MEM/EX bypass, branch resolution (`alu`, `bypass_mux`) |
| MEM | one load/store unit in slot 0 (`lsu`, `dmem`) |
| WB  | RF write, gated by Write Inhibit (`regfile`) |

For a consumer bundle `w(k)` the operand source is fixed by distance:

| producer | path | where it is taken |
|----------|------|-------------------|
| `w(k-1)` | EX/EX  | EX/MEM register into the EX operand mux |
| `w(k-2)` | MEM/EX | MEM/WB register into the EX operand mux |
| `w(k-3)` | MEM/ID | MEM/WB register into the ID operand mux (the value is being written back in the same cycle) |
| older    | RF     | RF read port in ID |

So a value can live up to three cycles without ever touching the RF. The
decoder compares every source register with the destinations of the bundles in
EX, MEM and WB; the nearest producer wins, and inside one bundle the highest slot
wins. The select signals travel with the bundle into EX.

## Inhibit bits

Each operation is stored as `{wi, ri1, ri2, word[31:0]}`; a bundle is four such
entries (12 extra bits over 128). `wi` travels with the operation down to WB and
clears that write port's enable. `ri1`/`ri2` disable the read port of that source
in ID: the port's address register keeps its old value.

Rules the compiler (or the test generator) must follow:

* Write Inhibit only on a value whose uses are all within **2 bundles** of the
  producer (with `EXACT=1`) or **3 bundles** (with `EXACT=0`), and which is
  redefined before any later use. Why the limit differs is explained below.
* Read Inhibit only on a source whose producer lies within the three bundles
  ahead, in the same straight-line code (the assertion `a_ri_window` in
  `vliw_core` checks this).
* A load result is written in MEM/WB, so the bundle right after the load may not
  use it (assertion `a_load_use`).

## Forced writeback: exceptions, interrupts, cache misses

When a bundle is cancelled or delayed, a consumer may no longer be at the
expected distance from its producer, and a write-inhibited value held only in an
interstage register would be lost. `exc_ctrl` handles this:

* **force event.** In the cycle an exception is raised in ID, EX or MEM, an
  interrupt is accepted, or the instruction cache misses, every bundle in ID, EX,
  MEM and WB ignores its Write Inhibit bits. Each stage keeps a sticky *force* bit
  that moves with the bundle; WB also uses the event directly in the same cycle.
* **forced reads.** After a force event, after entering the handler and after
  the return from exception, the next three decoded bundles ignore their Read
  Inhibit bits and read every source from the RF.
* **exact mode (`EXACT=1`, default).** The excepting bundle is *marked*. When it
  reaches WB it and all older bundles have completed; the three younger bundles in
  flight are deleted, the address of the first of them is saved as EPC, and fetch
  continues at `EXC_VECTOR` in the next cycle. The exception is served one cycle
  after it is raised in MEM. The return operation `RFI` resumes at EPC. The
  limit of two bundles comes from the bundle two ahead of the excepting one: it
  has already left WB when the exception is raised in MEM, so its write-inhibited
  results can no longer be forced into the RF. With uses at most two bundles
  away, its last consumer is the excepting bundle itself, which completes. With
  three, the consumer would be the first deleted bundle, which runs again after
  the handler and finds the value nowhere.
* **inexact mode (`EXACT=0`) and interrupts.** The youngest valid bundle in
  ID/EX/MEM is marked, so everything already in the pipeline completes (with
  forced writeback) before the handler starts. Only the bundle in IF is
  fetched again, and no value it needs can come from a bundle that has already
  retired, so values may live three bundles.
* **data-cache miss.** The whole pipeline, WB included, freezes while the miss
  is signalled for a load or store in MEM. All bundles keep their distance, so the
  inhibit bits stay valid and no forcing is needed.
* **instruction-cache miss.** IF inserts bubbles; the gap would stretch the
  distance between producer and consumer, so the miss raises a force event.

Interrupts are level requests, accepted only outside a handler and with no
exception in flight; `irq_ack` pulses when one is served.

## Instruction set

The operation set is this design's own, small enough to exercise the mechanism.

```
[31:26] opcode  [25:20] rd (STW: data register)  [19:14] rs1
[13:8]  rs2 (register form)   or   [13:0] signed imm14 (immediate form)
```

| opcode | op | semantics |
|--------|----|-----------|
| 00 | NOP | |
| 01..0B | ADD SUB AND OR XOR SHL SHR SHRU MUL CMPEQ CMPLT | `rd = rs1 op rs2`; SHR is arithmetic, MUL the low 32 bits, compares give 0/1 |
| 21..2B | same, immediate form (opcode bit 5) | `rd = rs1 op sext(imm14)` |
| 10 | LDW | `rd = mem[(rs1 + imm) >> 2]` |
| 11 | STW | `mem[(rs1 + imm) >> 2] = rd` |
| 12 / 13 | BR / BRF | branch if `rs1 != 0` / `rs1 == 0`, target `pc + imm` (bundle units) |
| 14 | GOTO | `pc = pc + imm` |
| 15 | RFI | return from exception to EPC |
| 16 | TRAP | raise an exception in EX |

Memory, branch, RFI and TRAP operations are legal only in slot 0; elsewhere
they raise the illegal-operation exception in ID. A word access to an address
that is not a multiple of 4 raises an exception in MEM and is dropped. Register
`r0` reads as zero. Branches resolve in EX; a taken branch deletes the two
younger bundles (no delay slots).

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `NSLOT` | 4 | `vliw_pkg` issue width |
| `XLEN` | 32 | `vliw_pkg` |
| `NREG` | 64 | `vliw_pkg`; 8 read and 4 write ports |
| `FWD_DEPTH` | 3 | `vliw_pkg`, bundles covered by forwarding |
| `IMEM_DEPTH` | 1024 bundles | `vliw_top` |
| `DMEM_WORDS` | 1024 | `vliw_top` |
| `EXACT` | 1 | `vliw_top`, exception mode |
| `EXC_VECTOR` | 512 | `vliw_top`, handler address |

## Measuring the saving

`vliw_top` outputs an `events` struct every cycle: RF reads and writes performed,
reads and writes saved by the inhibit bits, forced reads and writes, and the use
of each forwarding path. With a per-access energy for the RF, the RF power of a
run is estimated as
`P ~ sum over cycles of (E_idle + n_reads * E_read + n_writes * E_write)`;
the RF model counts `n_reads`/`n_writes` per cycle for this purpose. A read port
whose address does not change draws almost no power, which is why inhibited ports
hold their address instead of being driven to zero.

## Measured effect

On the FIR kernel of `tb_fir_workload` (coefficients and delay line in
registers, products and partial sums consumed one or two bundles after they are
made) the inhibit bits cut RF reads from 992 to 478 (-51%) and RF writes from 541
to 93 (-82%), with identical results and cycle count. With a linear RF power
model (a fixed cost per cycle plus a cost per access, a fully loaded cycle of 8
reads and 4 writes costing 2.5 times the fixed part, reads and writes taken as
equally expensive) that is an RF power reduction of about 28% for this kernel,
which has unusually short-lived values; code with more branches and longer-lived
values saves much less. In the random programs of
`tb_vliw_top` about a quarter of the reads and a tenth of the writes are
saved; forced accesses after exceptions and misses give back a part of that.

The two liveness limits are real. Running programs whose values live three
bundles on the machine in exact mode gives wrong results after exceptions,
because the bundle re-executed after the handler finds neither a forwarded nor
a stored value.

## Files

* `rtl/vliw_pkg.sv` types and constants; `rtl/vliw_top.sv` core plus instruction
  and data stores; `rtl/vliw_core.sv` pipeline; the other files one block each.
* `tb/tb_<block>.sv` a self-checking test per block. `tb/vliw_tb_pkg.sv` holds
  the operation encoders, a sequential reference model and a random program
  generator that sets the inhibit bits by liveness analysis.
* `tb/tb_vliw_core.sv` directed cases: a DCT-like fragment with inhibited
  register traffic, the MEM/EX and MEM/ID cases, an exception raised in MEM with
  forced writeback, and a data-cache stall of three cycles.
* `tb/tb_vliw_top.sv` runs the top at its default size: 30 random programs with
  random instruction/data-cache misses and interrupts, every retired bundle
  compared with the reference model, final RF and memory compared, and a check
  that every mechanism occurred at least once.
* `tb/tb_vliw_top_inexact.sv` the same with `EXACT=0` and values living up to
  three bundles; the handler may be entered up to three bundles after the
  excepting one.
* `tb/tb_fir_workload.sv` an 8-tap FIR filter (32 outputs, fully unrolled, seven
  bundles per output) run twice at the default size, without and with inhibit
  bits; results, cycle count and the RF traffic of both runs are checked.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/vliw_pkg.sv tb/vliw_tb_pkg.sv rtl/*.sv tb/tb_vliw_top.sv --top-module tb_vliw_top
./obj_dir/Vtb_vliw_top
```

Each test ends with a line `TB_RESULT checks=<n> failures=<m>`. Block tests are
built the same way with their own `tb_<block>.sv` and top module.

## Departures and limits

* The pipeline is the generic five-stage organisation. Commercial cores of this
  kind (six stages, separate multipliers, branch registers) differ in detail; only
  the RF size and port count are taken from such a core.
* The caches are plain arrays; tags, refill and the cache controllers are not
  modelled. Miss signals are inputs of the top.
* The hardware alternatives to compiler-set bits (re-using unused encoding bits,
  or detecting short-lived values in hardware) are not built.
* The bypass priority inside a bundle (highest slot wins), the exception
  sources, the marking scheme, EPC, interrupt masking and the whole ISA are this
  design's choices.
* The compiler's liveness analysis is software; the test generator contains a
  simplified version for straight-line basic blocks.
