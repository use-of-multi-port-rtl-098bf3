# A two-write-port RAM from programmable cells, and the structured datapath that needs it

High-level synthesis turns an algorithm into a datapath and a controller. On a
programmable device it helps to build that datapath from regular
*architectural blocks* (A-blocks). Each A-block is a functional unit (FU) with
its own local memory. Blocks talk to each other only over a few global buses.
Such a layout is predictable and needs little routing. It also creates a
storage problem. In one time step a block often has to store the result its
FU just produced **and** a value arriving from another block over the bus. So
the local memory needs **two write ports**. On-chip FPGA RAMs of the XC4000 /
3200DX class have several read ports but only one write port. Duplicating such
RAMs adds read ports, never write ports.

This RTL builds the remedy in two layers.

1. **The memory** (`mp_ram`, `local_mem`). A RAM with two independent write
   ports and any number of read ports. It is made of only two kinds of small
   cell, so it could be mapped onto a multiplexer-based logic fabric:
   - `mux_demux4`: one programmable cell that works either as a 4-to-1
     multiplexer or as a 1-to-4 demultiplexer. Trees of demultiplexers form
     the write-address decoders. Trees of multiplexers form the read ports.
   - `wr_cell`: one storage bit plus its write-control logic.
2. **The structured architecture that uses it** (`sa_top`). Three A-blocks, one
   global bus and a microcoded controller. They run the classic
   differential-equation benchmark ("Diffeq"). The benchmark solves
   y'' + 3xy' + 3y = 0 by stepping x by dx, and each loop iteration takes
   seven clock cycles. Two of those seven steps need two writes into one local
   memory.

## The storage bit and its write control (`wr_cell`)

Every bit of the RAM sees two things from each write port:
- the row select from that port's decoder (`s0`, `s1`);
- that port's data bit (`d0`, `d1`).

The cell stores

    next = s0·d0 + s1·d1      written when  s0 | s1

Only the port that selects the row supplies the bit. A 4-to-1 multiplexer
forms `next`. It is a `mux_demux4` in multiplexer mode:

| select `{d1&s1, s0}` | 00 | 01 | 10 | 11 |
|----------------------|----|----|----|----|
| input                | 0  | d0 | 1  | 1  |

An OR of the two selects enables the flip-flop. Here the flip-flop is an
edge-triggered register on the common clock with a synchronous enable, and it
has an asynchronous active-low reset to 0.

If both ports select the same row, the row stores `d0 | d1`. That is how the
cell behaves, but it is not a supported use: the two ports must never write
the same row in the same cycle. `mp_ram` carries an assertion
(`a_no_row_collision`) that reports it.

## Decoders and read ports (`wr_decoder`, `rd_mux`)

**Write decoders.** A decoder is a tree of demultiplexers, two address bits per
level:
- The root cell decodes the top bits. The address is zero-padded to an even
  width.
- The root's CS/EN input is the port's write enable. With the enable low,
  every row select is 0.
- Every leaf output drives exactly one row of one bit slice, so exactly one
  cell.
- Tree branches that no row uses are not built. For example, 5 rows or 32 rows
  give partly used trees.

**Read ports.** Each bit of a read port is a tree of multiplexers over the
stored bits of that bit position. The leaves decode the low address bits.
Reads are combinational. For more read ports you add more trees on the same
cells; the storage is not duplicated.

The demultiplexer cell drives its unselected outputs to 0. In silicon the cell
is a pass-transistor tree, so the same wires carry signals in both directions.
The RTL model cannot share wires like that. It therefore has a separate
`mux_in`/`mux_out` pair and a `demux_in`/`demux_out` pair. The `demux`
configuration input chooses which pair is live, and the outputs of the other
pair are held at 0.

## The RAM and the A-block's four access ports (`mp_ram`, `local_mem`)

`mp_ram #(DEPTH=8, WIDTH=16, NREAD=3)` has:
- a `DEPTH`×`WIDTH` array of `wr_cell`s;
- in every one-bit slice (column), two `wr_decoder`s, one per write port. A
  decoder output therefore drives a single cell, at the cost of WIDTH copies
  of each decoder;
- `NREAD` `rd_mux` trees.

A write lands at the rising edge. A read sees the new value from the next
cycle; there is no write-to-read bypass.

An operation `x = y op z` needs two reads and one write. A bus transfer at the
same time needs one more read or write. `local_mem` turns `mp_ram` into the
four ports an A-block uses:

| port | use | built from |
|------|-----|-----------|
| `ra0/rd0`, `ra1/rd1` | FU operands | read trees 0, 1 |
| `we/wa/wd` | FU result | write port 0 |
| `rw_*` | bus transfer, either direction | write port 1 **and** read tree 2, one shared address |

So a block can do three reads and two writes in a step, but never more than
four accesses in total.

## The structured architecture (`sa_top`)

```
            +--------------------- controller (microcode, 7 steps) ---------------------+
            | ctl[0]                  | ctl[1]                 | ctl[2]        bus_ctl  |
        +---v-----------+        +----v----------+        +----v----------+            |
        | A-block 0     |        | A-block 1     |        | A-block 2     |            |
        | FU: *         |        | FU: *, +      |        | FU: +, -, <   |            |
        | local_mem 8x16|        | local_mem 8x16|        | local_mem 8x16|            |
        +--+--------^---+        +--+--------^---+        +--+--------^---+            |
   bus_out |        | bus_in        |        |               |        |               |
        ===v========+===============v========+===============v========+=== global bus <+
                                       ^ ext_wdata (external source)
```

### What an A-block can do in one step

`ablock` carries out one control word (`blk_ctl_t` in `sa_pkg`) per clock
cycle:
- **FU operands.** Operand a comes from read port 0. Operand b comes from read
  port 1 or straight off the bus, so a value can be used in the step it
  arrives.
- **FU result.** The result can be stored through the write port.
- **Read/write port.** It either stores the bus value or reads a variable. The
  value read is what the block offers on `bus_out`.
- **Bus output.** `bus_out` can instead carry a product that finishes in this
  step. The result then leaves the block in the step it is produced, without
  being stored first.

`bus_out` only ever carries the memory read or the multiplier output. The
multiplier output comes from registered operands. So there is no combinational
path from the bus back to itself, even though operand b can come from the bus.

### The functional unit

The FU (`fu`) works on signed fixed-point numbers: 16 bits, 8 of them
fraction bits.
- **Add, subtract and less-than** finish in the same step.
- **Multiply** takes two steps:
  - `OP_MUL1` registers the operands.
  - `OP_MUL2` delivers `(a*b) >>> 8`, truncated to 16 bits. The shift rounds
    toward minus infinity.

The `OPS` parameter lists the operations a unit has. Hardware for the other
operations is not built, and issuing one is an assertion error. Each A-block
gets only the operations the schedule binds to it.

### The Diffeq schedule

One loop iteration computes:

    v0=dx*u  v1=3*x  x=dx+x  v2=v0*v1  v3=3*y  c = x<a
    v4=u-v2  v5=dx*v3  v6=u*dx  u=v4-v5  y=y+v6        repeat while c

The microcode (`diffeq_ctl`, `diffeq_bus` in `sa_pkg`) runs it on the three
blocks as follows. A1 → A0 means "from block 1 to block 0".

| step | A-block 0 | A-block 1 | A-block 2 | bus |
|------|-----------|-----------|-----------|-----|
| 0 | start v0=dx·u, u taken off the bus and stored | start v1=3·x | read u | u: A2 → A0 |
| 1 | store v0 (FU) **and** v1 (bus) | v1 finishes onto bus | – | v1: A1 → A0 |
| 2 | start v2=v0·v1 | start v3=3·y; read x (3 reads) | x=dx+x, x taken off the bus | x: A1 → A2 |
| 3 | v2 finishes onto bus | store v3 | store v2; x<a latched | v2: A0 → A2 |
| 4 | start v6=u·dx | start v5=dx·v3; store x from bus | read x | x: A2 → A1 |
| 5 | store v6 | v5 finishes onto bus | v4=u−v2 stored **and** v5 stored from bus (4 accesses) | v5: A1 → A2 |
| 6 | read v6 | y=y+v6, v6 taken off the bus | u=v4−v5 | v6: A0 → A1 |

Steps 1 and 5 are the reason for the two write ports. With a single write
port, each of those steps would have to be split in two.

The controller works as follows:
- In step 3 it latches the comparison result of A-block 2.
- After step 6 it starts another iteration if that result is 1. Otherwise it
  returns to idle and pulses `done` for one cycle.
- `busy` is high for exactly 7 cycles per iteration.
- `iter` counts the iterations of the last run.

Variable addresses inside each local memory are the `A0_*`, `A1_*` and `A2_*`
constants in `sa_pkg`. Local memory use is 5, 5 and 7 words of 8.

### Loading and reading variables

There is no global memory in this build. In its place, an external source on
the bus lets you load and read the local memories while the controller is
idle:
- **Write a word.** Set `ext_we`, `ext_blk`, `ext_addr` and `ext_wdata` for one
  cycle. The word is stored through the block's read/write port.
- **Read a word.** Set `ext_re`, `ext_blk` and `ext_addr`. The word appears on
  `bus` in the same cycle.

A typical run goes:
1. Load the initial values:
   - block 0: `dx`;
   - block 1: `dx`, `x`, `y` and the constant 3.0 (`16'h0300`);
   - block 2: `dx`, `u` and `a`.
2. Pulse `start`.
3. Wait for `done`.
4. Read the results: `x` and `y` from block 1, `u` from block 2.

## Parameters and their origin

| item | value | origin |
|------|-------|--------|
| words per local memory (`DEPTH`) | 8 | the eight-cell write circuit of the proposal |
| read ports of `mp_ram` in an A-block | 3 | three reads per step are needed; at most four accesses |
| A-blocks, steps per iteration, multiply latency | 3, 7, 2 | the published Diffeq schedule |
| bus count | 1 | the schedule needs one transfer per step (`global_bus` takes `NBUS`) |
| word width, fraction bits | 16, 8 | this design's choice |
| reset | asynchronous, active low, memories cleared | this design's choice |

## How far to trust it, and where it departs

**Follows the source.** These parts follow the published proposal:
- the write-control function and its multiplexer-plus-OR structure;
- decoders built as cascaded demultiplexers, with grounded unselected
  outputs and CS/EN;
- read ports made by adding multiplexers;
- the four-access port set of the local memory;
- the block, bus and controller organisation;
- the Diffeq schedule, including its one-transfer-per-step bus use, its
  two-step multiplies and which block does what.

**This design's own choices.**
- **Write enable.** The write enable of a cell is `s0 | s1`. This matches the
  cell's "select out" and the rule that a cell is written when either port
  selects it. Reading it as `s0 | d0` would write on port 0's data alone.
- **Flip-flop type.** Storage uses edge-triggered flip-flops, not latches.
- **Port split.** The bidirectional cell is modelled as two one-way port sets
  with a configuration input.
- **Number format.** Fixed-point format and rounding.
- **Control-word layout** and the placement of variables in memory.
- **Loop form.** The loop is a do-while: the body always runs once.
- **Operand forwarding.** The bus value is forwarded into the FU in the step
  it arrives, and a finishing product is sent straight to the bus. The
  published schedule only works with both.
- **External port.** The external load/read port stands in for the global
  memory.

**Not built.**
- The global memory. Its size and protocol are not specified.
- Microcode for the other benchmarks sometimes used with this architecture
  (elliptic wave filter, DCT). Their schedules are not available.
- Delay: nothing here models delay. Published estimates for a
  3200DX-class fabric put a write through this memory at about 6.7 ns.

**Verification.** Every module has a self-checking testbench in `tb/`, and each
compares against an independent reference model. `tb_sa_top` runs seven Diffeq
cases at the default parameters, from 1 to several dozen iterations each. For every
case it checks:
- x, y and u against a fixed-point reference;
- the iteration count;
- exactly 7 busy cycles per iteration.

It also checks that each mechanism of the schedule actually happened:
- two writes in a step;
- a bus operand used on arrival;
- a product sent to the bus;
- three reads in a step;
- four accesses in a step;
- a loop repeat and a loop exit.

## Files

| file | contents |
|------|----------|
| `rtl/sa_pkg.sv` | word format, control-word types, variable addresses, Diffeq microcode |
| `rtl/mux_demux4.sv` | programmable 4-to-1 mux / 1-to-4 demux cell |
| `rtl/wr_cell.sv` | storage bit with two-port write control |
| `rtl/wr_decoder.sv` | write-address decoder (demux tree) |
| `rtl/rd_mux.sv` | read port (mux tree per bit) |
| `rtl/mp_ram.sv` | two-write-port RAM |
| `rtl/local_mem.sv` | A-block memory: 2 read, 1 write, 1 read/write port |
| `rtl/fu.sv` | functional unit |
| `rtl/ablock.sv` | A-block: FU + local memory + bus connections |
| `rtl/global_bus.sv` | multiplexed global buses |
| `rtl/controller.sv` | microcoded sequencer and external-access control |
| `rtl/sa_top.sv` | three A-blocks, bus and controller |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the end-to-end run:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/sa_pkg.sv tb/tb_sa_top.sv --top-module tb_sa_top -Mdir obj -o sim
./obj/sim
```

For another testbench, swap in its name, for example `tb_mp_ram`. The package
must come first on the command line. `-y rtl` lets verilator find the other
modules by name.

**Adding an algorithm.** To run a different algorithm:
1. Write new `diffeq_ctl` / `diffeq_bus` style functions in `sa_pkg`.
2. Adjust `NSTEP`, `NBLK` and `BLK_OPS`.
3. Make sure no step writes one address through both ports.

**Memory size.** The size of a local memory is `DEPTH` in `sa_pkg`. On its
own, `mp_ram` takes any `DEPTH`, `WIDTH` and `NREAD`.
