# Nanoprocessor array: a data-driven chip for prototyping high-throughput DSP

This RTL models a chip that runs a DSP algorithm by executing its data-flow
graph directly. Each node of the graph, or a small group of nodes, is placed on
its own *nanoprocessor*, a very small 16-bit processor. Each arc of the graph
becomes a static channel through a configurable network. Nothing is scheduled
globally. A nanoprocessor executes an instruction when the tokens it needs have
arrived and its output channels can accept results. When that is not the case,
it stalls. The channels' send/busy handshakes are the only synchronisation.

One chip holds:

| part | count | module |
|---|---|---|
| nanoprocessors (16-bit ALU, 8 x 50-bit program, three 4-word data buffers, two control queues) | 64, as 16 clusters of 4 in two banks | `nanoprocessor`, `nano_cluster` |
| level-1 data and control switches, one set per cluster | 16 | `l1_network` |
| level-2 semi-crossbar: 32 switchable 16-bit buses and 8 one-bit control buses | 1 | `l2_network` |
| memory banks, 128 x 16 bit, acting as data-flow memory nodes | 4 | `mem_bank` |
| I/O processors, each with a 16-bit off-chip port | 8 | `iop` |
| serial configuration port | 1 | `serial_port` |

At the intended 50 MHz, one operation per processor per cycle gives 3.2 GOPS.
The four banks give 400 MB/s of memory bandwidth and the eight ports give
800 MB/s of I/O. The RTL runs at that rate per cycle. No clock frequency is
claimed for it.

## Tokens, channels and the handshake

All communication uses tokens. A data token is 16 bits. A control token is
1 bit, read as T or F. Every channel has three wires: `send`, `data` and
`busy`.

* `busy` comes from the receiver. It depends only on registered state (a
  buffer is full), never on what else happens in the same cycle.
* A producer raises `send` only in a cycle where `busy` is low. Every receiver
  takes the token in each cycle where `send` is high.
* **Broadcast.** A source may feed several receivers. Its `busy` is then the OR
  of all their `busy` lines, standing in for a wired-OR line. The token
  therefore leaves only when every receiver has room, and all of them take it
  in the same cycle.
* A source that nobody listens to sees `busy = 0`, and its tokens are dropped.

One consequence of the registered `busy` matters when mapping a graph. A buffer
that is full reports busy even in a cycle where it also pops. A receiver whose
buffer runs full every time (for example one preloaded with initial tokens
that also waits on a slower operand) therefore costs its whole broadcast
group throughput. Delays built from initial tokens belong where the buffer is
drained in the same cycle it is filled. `tb_sort_filter` shows this.

Because `busy` is registered and `send` already includes `!busy`, a channel
can have combinational paths from one processor's buffers through the ALU and
the switches into another processor's buffer. It never has a combinational
loop. Queues at least 2 deep let a stream move one token per cycle.

## The nanoprocessor

```
 level-1 in0 ─► DQ0 ─┐                      ┌─► out0 ─► level-1
 level-1 in1 ─► DQ1 ─┼─► ALU ─► shifter ─► y ┼─► out1 ─► level-1
 neighbour   ─► DQ2 ─┘   (+ Booth MBR)      └─► neighbour out ─► next processor
 ctrl in0 ─► CQ0 ─┐                             └─► write-back to DQ0..2
 ctrl in1 ─► CQ1 ─┴─► controller (PC, NPC, stall) ─► ctrl out
```

* **Data buffers (`data_buffer`).** Each buffer holds four 16-bit words and
  works in one of two modes, set at configuration time:
  * *Queue mode.* The buffer is filled from its input channel. An instruction
    reads the head and either pops it or keeps it for reuse.
  * *Register-file mode.* The input channel is closed. The instruction names
    the word it reads, and it may write the ALU result back. Constants such as
    filter coefficients are preloaded into these words.

  DQ2 can only be fed by the previous processor's neighbour output.
* **Control queues.** Two 4-deep queues of 1-bit tokens come from the level-1
  control network. There is one control output.
* **ALU (`np_alu`).** Operations are add, subtract, the logic operations, min,
  max, compare, absolute difference and the Booth operations. The result goes
  through a shifter that moves it by 0 to 4 positions, left or arithmetic
  right. Flags:
  * `n`: a < b, signed.
  * `z`: the shifted result is zero.
  * `c`: carry, or no-borrow.
* **Controller (`np_ctrl`).** It keeps a 3-bit PC. An instruction fires when:
  * the processor is running,
  * every buffer and control queue the instruction reads holds a token,
  * and no output channel it writes is busy.

  Otherwise the processor stalls and no state changes. On firing, the PC takes
  the instruction's 3-bit NPC field. Either of its two low bits may first be
  replaced by a flag or by the control token at a queue head. This gives a
  branch of up to four ways with no lost cycle.

### Instruction word (50 bits, `np_pkg::instr_t`)

| bits | field | meaning |
|---|---|---|
| 49:48 | rsvd | write 0 |
| 47:44 | op | ALU operation (`alu_op_e`) |
| 43:42 | a_sel | operand A: DQ0, DQ1, DQ2 or zero |
| 41:40 | b_sel | operand B: the same choices |
| 39 | sel_ctl | SELECT: A = DQ1 if CQ0's token is T, else DQ0. Only the chosen buffer and CQ0 are consumed |
| 38:34, 33:29, 28:24 | dq2, dq1, dq0 | per buffer: `rd` (needed, stall if empty), `pop` (consume), `addr[1:0]` (register read address), `wb` (write result back) |
| 23:22 | waddr | write-back register address |
| 21 | sh_right | shift direction |
| 20:18 | sh_amt | shift distance, 0 to 4 |
| 17:15 | out_en | {neighbour, out1, out0} |
| 14 | sw_ctl | SWITCH: the result goes to out1 if CQ0's token is T, else to out0 |
| 13:12 | cq_rd | control tokens needed |
| 11:10 | cq_pop | control tokens consumed |
| 9 | cout_en | send a control token |
| 8:7 | cout_src | what the control token carries: n, z, c or the CQ0 token |
| 6:4 | npc | next PC |
| 3:2 | br1 | NPC bit 1 from: keep, CQ1 token, c or CQ0 token |
| 1:0 | br0 | NPC bit 0 from: keep, n, z or CQ0 token |

The data-flow operators map onto this word as follows:

* An ordinary node is one instruction that reads its operand queues and pops
  them.
* SELECT and SWITCH are one instruction each, using `sel_ctl` and `sw_ctl`.
* A node with internal state keeps that state in register-file words.
* Several nodes share one processor by taking turns through the 8-word
  program.

### Multiplication with Booth steps

No single-cycle multiplier exists. `OP_BOOTH` performs one radix-4 modified
Booth step:

* It forms a digit d in {-2, -1, 0, 1, 2} from the low three bits of a 17-bit
  multiplier register (MBR).
* It returns `(a + d*b) >>> 2`.
* It shifts MBR right by two.

`OP_MBLD` loads the multiplier into MBR. Starting from a = 0, 8 steps give
exactly the upper 16 bits of the signed 16 x 16 product. 4 steps on a
multiplier that fits in 8 bits give `(m*b) >>> 8`, the case of 8-bit pixels
times 16-bit coefficients.

An 8-word program cannot hold 9 instructions, so a full 16 x 16 product is
spread along the neighbour chain. One processor does some of the steps and
passes the partial sum, and the remaining multiplier bits through `OP_MBRD`.
The next processor takes the multiplier back with `OP_MBLDC` and continues.
Four processors of a cluster form a pipelined multiplier in this way.

## Networks

* **Level 1 (`l1_network`, inside each cluster).** Each input channel has a
  register naming the output channel it listens to. It can listen to any of
  the eight processor outputs or to four channels arriving from level 2. The
  control network does the same for 1-bit tokens. It has four processor
  control outputs plus two level-2 inputs as sources, and eight control queues
  plus two level-2 outputs as sinks.
* **Neighbour channel.** This is a direct path, not switched. Processor j
  feeds processor j+1. The chain continues into the next cluster of the same
  bank and stops at the ends of each bank.
* **Level 2 (`l2_network`).** It has N_BUS buses. Each bus is driven by one
  statically chosen source, and each sink listens to one bus. The sources and
  sinks are the cluster ports, the memory banks and the I/O ports.
* **Pipeline registers.** Every channel that crosses between level 1 and
  level 2 passes a 2-deep buffer on each side of the cluster boundary. A
  level-2 hop therefore costs two cycles more than a level-1 hop.

Index maps for both levels are listed in the header comments of
`nano_cluster.sv` and `np_chip.sv`.

## Memory banks as data-flow nodes

A bank (`mem_bank`) has three input channels and one output channel: address,
write data, a R/W control token, and read data. It fires when both an address
token and a R/W token are present.

* **T (write).** The bank also waits for a data token and stores it.
* **F (read).** The bank returns the addressed word on the read-data channel.

The array is read synchronously, as an SRAM would be. A 3-deep output buffer
keeps reads flowing at one per cycle. Structures such as transpose buffers or
swapped frame banks are built in the program, from banks plus SWITCH/SELECT
processors and an address-generating processor.

## I/O ports

Each `iop` is set at configuration time to input or output. It buffers tokens
between level 2 and the pins. The pins use the same send/busy handshake, and
`pad_oe` marks an output port. Ports 2k and 2k+1 can be linked into a 32-bit
port, in which case both halves always move in the same cycle.

## Configuration

Nothing runs until it is configured. After reset all switches are open, all
buffers are empty and every processor is stopped.

The serial port takes one bit per clock while `ser_en` is high, most
significant bit first. Each 67-bit frame is `{target[6:0], address[9:0],
data[49:0]}`. Dropping `ser_en` mid-frame discards the frame.

| target | what | addresses |
|---|---|---|
| 0..63 | nanoprocessor 4c+j | 0-7 instruction words; 8+4i+w word w of buffer i; 20 mode {run, rf2, rf1, rf0}; 24+i push an initial data token into DQi; 28+i push an initial control token into CQi |
| 64+c | level-1 switches of cluster c | sink k: source index; 256+k: control sink k |
| 80 / 81 | level-2 data / control buses | b: source driving bus b; 512+k: bus heard by sink k |
| 82+i | I/O port i | 0: {linked, output} |

Writing a source or bus index at or above the count disconnects the sink.
`tb/tb_np_chip.sv` contains a complete worked configuration.

## Simulating

Every module is in its own file, and the package `rtl/np_pkg.sv` must be read
first. For example, to run the full-chip test with Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/np_pkg.sv tb/np_tb_pkg.sv rtl/*.sv \
          tb/tb_np_chip.sv --top-module tb_np_chip -o sim && ./obj_dir/sim
```

`rtl/np_pkg.sv` appears twice on that command line, which Verilator only warns
about. Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. Testbenches:

| testbench | what it checks |
|---|---|
| `tb_token_fifo` | random pushes and pops against a queue model |
| `tb_data_buffer` | queue order, hold, full/busy, initial tokens; register-file read, write-back and closed input |
| `tb_np_alu` | every operation and shift against a model; 16 x 16 Booth products, also with a hand-over mid-way |
| `tb_ctrl_store` | write and read back |
| `tb_np_ctrl` | firing rule, SELECT/SWITCH steering, four-way branches |
| `tb_nanoprocessor` | programs loaded over the configuration bus: adder at one result per cycle, Booth multiply, SWITCH, SELECT, compare to control token, branch on a token; random gaps and back-pressure throughout |
| `tb_l1_network`, `tb_l2_network` | random settings incl. broadcast: data follows the selected source, busy is the OR of the listeners |
| `tb_nano_cluster` | a four-processor pipeline using the neighbour channel, a level-1 broadcast and both level-2 output kinds |
| `tb_mem_bank` | writes, reads at one per cycle, mixed traffic under back-pressure, a write waiting for its data |
| `tb_iop` | input and output ports, linked 32-bit transfer |
| `tb_serial_port` | frames, pauses, an aborted frame |
| `tb_np_chip` | the full chip at its default size, configured serially |
| `tb_addr_gen` | application kernel: a 2-D raster address generator on two processors (counter with zero-flag branch, SELECT adder), addresses and one per cycle |
| `tb_sort_filter` | application kernel: a running median-of-three on one cluster (MIN/MAX, delays made from initial tokens), values and one result per cycle |

`tb_np_chip` runs the following program:

* Samples enter on port 0 and are broadcast to cluster 0 and echoed on port 3.
* One processor multiplies each sample by a coefficient with Booth steps.
* The next processor compares the product with a threshold.
* A SWITCH sends low values to port 2 and writes the others into memory bank 0.
* A processor in the other bank generates the write and read addresses.
* The values read back leave on port 1.

The test checks all three output streams. It also counts stalls, memory
writes and reads, level-2 transfers, Booth steps and the two SWITCH directions,
and each must occur at least once.

## How far to trust it, and where it is this design's own

The following come from the published architecture: the overall organisation,
all the sizes in the first table except the bus counts, the one-cycle
instructions, the stall rule, the 3-bit PC with a modifiable NPC field, the
Booth step, the 4-bit shifter, the buffer modes, the neighbour-only third
input, the two level-1 outputs, the wired-OR broadcast, the bus-based level 2,
the pipeline registers between levels, the memory-node semantics, the 32-bit
port linking and serial loading.

The architecture leaves open the following, and this RTL fills them in with
its own choices:

* the instruction encoding and the ALU operation list;
* which flags and tokens may replace which NPC bits;
* the token width (1 bit) and control-queue depth (4);
* the topology inside a cluster, modelled as a full static crossbar;
* the number of level-2 buses (32 + 8) and of level-2 ports per cluster
  (4 data + 2 control);
* the flat, unsegmented level-2 buses;
* the memory read latency and the T = write encoding;
* the configuration frame and address map;
* the neighbour chain ending at bank boundaries;
* handing a multiplier on through MBRD/MBLDC.

Known gaps:

* The I/O processor is only a buffered, direction-configurable port. Any
  programmability beyond that, such as address generation for external memory
  chips, is not modelled.
* Internal scan chains and boundary scan are not modelled.
* Scannable buffer registers are written over the configuration bus instead
  of being shifted.
* The memory banks cannot be preloaded through the serial port. They are
  filled through the network.
* Of the published benchmark programs, only two kernels are included:
  * the 2-D address generator (`tb_addr_gen`);
  * the compare-and-select core of the sorting filter (`tb_sort_filter`).

  The IIR filters, DCT, Viterbi units, motion estimation and the full 3x3
  sorting filter are not included, because their programs are not available
  at instruction level. By processor and memory counts, all of them except the
  non-multiplexed DCT (82 processors) and motion estimation (4 chips) fit on
  one chip.
