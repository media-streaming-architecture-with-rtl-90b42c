# Media streaming system with homogeneous ALU cluster IPs

Media kernels such as FFTs, filters and block transforms apply the same
arithmetic to long streams of data. This design runs them on several
identical processing elements, the *ALU cluster IPs*, which sit as slaves
on one AMBA AHB bus. A host processor (an AHB master outside this RTL)
does the following:

1. It splits a kernel into pieces.
2. It loads each IP's program, data and coefficients over the bus.
3. It starts the IPs.

The IPs then compute in parallel without using the bus. The host collects
the results once each IP reports that it is done.

Each IP holds a small statically scheduled VLIW machine with five
functional units (two ALUs, two multipliers and a divider). Each unit input
has its own register bank, so the units never compete for one register
file. Optional IEEE 754 single-precision support adds FADD/FSUB to the
ALUs, FMUL to the multipliers and FDIV to the divider. Three stand-alone
floating-point units (`fpu_type1/2/3`) are also provided as separate
macros. The top level instantiates them beside the bus, each with its own ports.

```
 host (AHB master) ──HADDR/HWDATA──┬───────────────┬─── ... ───┐
                                   │               │           │
                              ahb_decoder     alu_cluster_ip  alu_cluster_ip ... (NUM_CLUSTERS)
                         (HSELx, response mux)  ├ ahb_wrapper (FSM + ahb_agu)
                                                ├ alu_cluster
                                                │   ├ pc_decoder
                                                │   ├ 2 x alu_unit, 2 x mul_unit, div_unit
                                                │   ├ 10 x irf, sprf
                                                ├ instr_mem (128 x 142 bit)
                                                └ data_mem  (10 banks x 32 x 32 bit)
 fpu_a/fpu_b/fpu_ops ──> fpu_type1, fpu_type2, fpu_type3 ──> fpu1_out, fpu2_out, fpu3_out
```

## The system (`media_stream_system`)

`NUM_CLUSTERS` IPs (default 8) share one AHB bus. Cluster *i* answers the
16 KB window `0x4000_0000 + i*0x4000`; the IP decodes only the low 14 bits.
`ahb_decoder` does two jobs:

- It forms the HSEL lines.
- It routes the HREADY/HRESP/HRDATA of whichever slave owns the current data phase back to the master.

An address outside every window goes to a built-in default slave, which
answers with a two-clock ERROR. The top's ports are the master side of the
bus plus one `alu_work` flag per cluster (high = idle / done).

The top also holds one instance of each stand-alone FPU macro. These have
no bus connection. They share the operand ports `fpu_a`, `fpu_b` and the
operation code `fpu_ops`, and each drives its own result port, one clock
later. `fpu_type3` always divides. A chip that uses only the macros can
drive these ports directly.

## Programming an IP

### Address map (byte addresses inside one IP)

| range | contents | word layout |
|---|---|---|
| `0x0000-0x0FFF` | instruction memory | address = `entry<<5 \| segment<<2`, segments 0..3 are bits 0-127, segment 4 holds bits 128-141 |
| `0x1000-0x17FF` | data memory | address = `0x1000 \| bank<<7 \| word<<2`, banks 0..9, words 0..31 |
| `0x1800-0x1FFF` | IRF banks | address = `0x1800 \| bank<<7 \| word<<2` |
| `0x2000-0x207F` | scratch pad (SPRF) | 32 words |
| `0x3000` | START (write only) | HWDATA[7:0] = end PC; execution begins at PC 0 |
| `0x3004` | ABORT (write only) | stops a running program |

Byte and halfword writes use little-endian lanes. Any of the following gets an ERROR response:

- an unmapped address,
- a read of START or ABORT,
- HSIZE larger than a word,
- a SEQ transfer with no burst in progress.

### Running a program

The host loads the program into instruction words 0..N-1 and writes N to
START. The program counter then steps through words 0..N-1, one per clock.
There are no branches. `alu_work` falls at once. It rises again when the
last instruction has been fetched and every unit has written its result.

While the IP works it answers every access with a two-clock RETRY, except
a write to ABORT. A host therefore either polls `alu_work` or simply
repeats a read until it completes. ABORT clears the end value; this stops
fetching and drops the instructions already fetched. It is the way out of
a program that should not be waited for.

## The VLIW cluster (`alu_cluster`)

### Instruction word (142 bits)

The word holds five slots, least significant first: `alu0`, `alu1`,
`mul0`, `mul1`, `div`. Each slot holds an opcode plus three fields:

```
 slot  = { dst[10:0], src_b[6:0], src_a[6:0], op }      op: 4 bits (ALU), 3 bits (MUL, DIV)
 src   = { sel[1:0], addr[4:0] }   sel: 0 IRF, 1 data memory, 2 scratch pad, 3 immediate (addr zero-extended)
 dst   = { sel[1:0], bank[3:0], addr[4:0] }   sel: 0 none, 1 IRF bank, 2 data-memory bank, 3 scratch pad
```

2 × 29 + 3 × 28 = 142 bits. The types are `instr_t` and its slot structs in
`mscp_pkg`.

Unit *u* (0 ALU0, 1 ALU1, 2 MUL0, 3 MUL1, 4 DIV) reads its operand a from
IRF bank `2u` and operand b from bank `2u+1`. The data-memory source uses the
bank with the same number. Results can be written to any IRF bank, any
data-memory bank or the scratch pad. The scratch pad is readable by every
unit input and is meant for shared coefficients.

| unit | operations |
|---|---|
| ALU | NOP, ADD, SUB, ABS, AND, OR, XOR, NOT, SLL, SRL, SRA (shift by b mod 32), LT, GT, EQ (signed, result 1/0), FADD, FSUB |
| MUL | NOP, LO, HI (signed 32×32 → 64, low or high half), FMUL |
| DIV | NOP, QUO, REM (unsigned; divide by 0 gives all ones / the dividend), SQRT (integer, of a), FDIV |

### Timing: the part to get right when writing programs

Instruction *i* is fetched in clock *i* after START and decoded in *i+1*.
Its sources are read in clock *i+2*, and it executes from clock *i+3*:

| unit | execute | result written in clock | fetch-to-write-back |
|---|---|---|---|
| ALU (2-stage) | 2 clocks | i+5 | 6 clocks |
| MUL (4-stage Booth) | 4 clocks | i+7 | 8 clocks |
| DIV (iterative, not pipelined) | 16 clocks | i+19 | 20 clocks |

A value written in clock *w* can be read by an instruction whose source
stage is clock *w+1* or later. For example, an ALU result can feed an
instruction issued 4 words later, and a MUL result one issued 6 words later.

There are no interlocks or forwarding, so the schedule is the program's
responsibility. Three rules apply:

- Do not read a value before it is written.
- Do not start a division while the divider is busy: leave at least 16 instructions between DIV operations.
- Do not let two units write the same bank, or the scratch pad, in the same clock.

Simulation assertions report a busy-divider issue and a double write.

The FIR program in `tb/tb_media_stream_system.sv` shows the usual trick.
Four independent outputs are interleaved so that each running sum is read
exactly when its previous update has landed. Both multipliers and both ALUs
then work in every clock.

### Storage

| store | size | ports |
|---|---|---|
| IRF | 10 banks of 32 words | one synchronous read port and one write port, byte-enabled (`irf`) |
| scratch pad | 32 words | ten read ports, one write port (`sprf`) |
| data memory | 10 banks of 32 words | one read and one write port per bank (`data_mem`) |
| instruction memory | 128 × 142 bits | written in 32-bit segments (`instr_mem`) |

While the cluster is idle, the bus reaches all of them through
`alu_cluster_ip`. While the cluster runs, they belong to it.

## The AHB wrapper (`ahb_wrapper`, `ahb_agu`)

A six-state FSM answers the bus:

| state | meaning |
|---|---|
| IDLE | nothing in progress |
| ACCESSIBLE | zero-wait transfers |
| UNREAD_WAIT | first beat of a read: HREADY low for two clocks |
| UNWRITE_WAIT | master inserted BUSY inside a write burst |
| ALU_WORK | cluster running: RETRY to everything but ABORT |
| ERROR | two-clock ERROR response |

`ahb_agu` computes the beat addresses of INCR and WRAP4/8/16 bursts (for
example, WRAP4 from 0x34 gives 0x34, 0x38, 0x3C, 0x30). During the two wait
states of a read, the wrapper reads the first beat and starts reading the
next one. Every following SEQ read then completes in one clock, because the
word for the next beat is always already on its way. Writes have no wait
states.

`HREADY_in` is the bus-wide HREADY. A slave must see it so that it ignores
address phases while another slave is inserting wait states.

## Floating point

`fp_addsub`, `fp_mul` and `fp_div` are combinational single-precision
datapaths with round-to-nearest-even. Their simplifications are:

- Denormal inputs and results are flushed to signed zero.
- Any invalid operation returns the quiet NaN `0x7FC00000`.
- Overflow returns a signed infinity.

`fpu_type1` (ADD, SUB, MUL), `fpu_type2` (ADD, SUB, MUL, DIV) and
`fpu_type3` (DIV) register the result one clock after the operands. They
have a synchronous active-high `reset` and a 3-bit operation code `ops`
(ADD 0, SUB 1, MUL 3, DIV 7).

## Where this RTL departs from the original chip

- **Data memory.** The taped-out IP keeps its data in an external MRAM
  reached through a load/store unit selected by a 143rd instruction bit.
  Here the data memory is the on-chip banked memory of the cluster, and the
  MRAM mode is not built.
- **Floating-point latency.** FADD/FSUB and FMUL issue one per clock, like
  the integer operations. Their results are written after the integer
  pipeline's 6 and 8 clocks. The original counts one cycle per FP addition
  or multiplication in its floating-point architecture. In this design the
  stand-alone `fpu_type*` macros have that one-clock latency. The original
  says the type 1 and type 3 macros trade latency for area on the less
  critical operations, but it gives no latency numbers.
- **Own choices.** The instruction field layout, the address map, the START
  and ABORT mechanism, the memory port counts and the bus decoder are all
  this design's own. The original gives the instruction width, the unit
  mix, the memory sizes and the latencies, but not these details. The
  memories have separate read and write ports where the chip used
  single-port SRAMs.
- **Not built.** SPLIT responses, the HSPLITx/HMASTER/HMASTLOCK signals and
  an arbiter are not built; a single master is assumed.
- **No loops.** There are no branches or loops: a program is at most 128
  straight-line instructions. A 32-point split-radix FFT on one cluster
  needs more than that and would have to be loaded and run in parts.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- **Arithmetic.** The floating-point blocks and the arithmetic units are
  compared with reference models (`tb_fp_pkg` rounds the simulator's double
  results to single independently of the RTL). The unit latencies are
  checked too.
- **Cluster.** `tb_alu_cluster` runs random programs against a clock-level
  model of the pipeline. It checks every IRF, data-memory and scratch-pad
  word afterwards, and the clock in which `alu_work` rises.
- **Bus.** `tb_ahb_wrapper` and `tb_alu_cluster_ip` drive the bus with a
  cycle-level AHB master. They cover all burst types and sizes, byte lanes,
  BUSY, wait-state counts, RETRY, ABORT and ERROR.
- **System.** `tb_media_stream_system` runs the full 8-cluster system with
  default parameters:
  - a 16-tap FIR filter split over all clusters,
  - divider and floating-point operations,
  - single-instruction latency probes (6/8/20 clocks),
  - ABORT and ERROR cases,
  - random operations on the three FPU macros.

  It counts each bus mechanism and fails if one never happened.

To simulate with Verilator 5, for example the system test:

```
verilator --binary --timing --assert --top-module tb_media_stream_system -y rtl \
  rtl/mscp_pkg.sv rtl/fp_pkg.sv tb/tb_fp_pkg.sv rtl/media_stream_system.sv \
  tb/tb_media_stream_system.sv
./obj_dir/Vtb_media_stream_system
```

Other blocks work the same way: replace the top module and the last two
files. Building the 8-cluster system takes about half a minute, and
simulating it takes well under a second.
