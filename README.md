# SNA — a multithreaded accelerator for siamese networks

A siamese network runs two copies of the same DNN, with shared weights, on two
inputs and then compares their outputs. Each copy is often built from hybrid
blocks, such as inception modules, whose branches are independent of each other.
That gives two levels of parallelism a single-path systolic accelerator cannot use:

* **coarse-grained**: the two sub-networks can run at the same time;
* **fine-grained**: the branches of one hybrid block can run at the same time.

SNA handles both the way a simultaneous-multithreading (SMT) processor would. The
hardware runs two **main threads**, one per sub-network. Each main thread can be
split into up to four **sub-threads**, one per branch. All threads share one array
of processing units (PUs) and one global buffer. Instructions decide, at run time,
which PUs belong to which thread and which buffer banks hold what. This RTL
implements that architecture in synthesizable SystemVerilog. It uses the main
configuration by default: 64 PUs of 8 compute lanes (512 MACs), a 5 KB weight
buffer and a 10 KB input/output buffer per PU, and a 16-bank, 800 KB global buffer.

```
 off-chip side (ext_*)                  +-------------------- sna_top ---------------------+
 -------------------->  sna_fbmu  <---> sna_gbuf (16 banks)                               |
                        (bank table,  <--- mover thread 0 (sna_dma) ---+                  |
                         arbiter)     <--- mover thread 1 (sna_dma) ---+--> PU buffers     |
 host program load --> sna_cp (2 instruction streams) --> sna_smtc (PU -> TID/STID)        |
                                              |                 | start/swap per group     |
                                              v                 v                          |
                   PU63 -> PU62 -> ... -> PU1 -> PU0   (forward links, one-way)            |
                   \_______ thread 1 ______/\___ thread 0 __/   (reset split)              |
```

## How a thread gets its resources

**PUs: the SMT controller (`sna_smtc`).** A table gives each PU an owner: a main
thread (TID 0/1) and a sub-thread (STID 0..3). At reset the lower half of the
array belongs to thread 0 and the upper half to thread 1, all in STID 0. A `CFGPU`
instruction assigns a range of PUs to the issuing thread and a chosen STID. Work is
sent to a whole group (TID, STID) at once, and the SMTC fans it out as start or swap
pulses to exactly those PUs. The same table tells the control processor whether a
group, or a whole thread, is still busy. An inception module with four branches
can thus be given, for example, 4, 12, 10 and 6 PUs, as a compiler's resource
search decides.

**Global buffer banks: the buffer management unit (`sna_fbmu`).** A second table
maps each of the 16 banks to a logical buffer: `IN0`/`OUT0` (sub-network 0),
`IN1`/`OUT1` (sub-network 1), or the weight buffers `W0..W3`. The reset layout is
the siamese one:

| banks | 0-1 | 2-5 | 6-9 | 10-11 | 12-15 |
|---|---|---|---|---|---|
| logical buffer | IN0 | OUT0 | W0 (shared weights) | IN1 | OUT1 |

Both sub-networks read the same `W0` banks, so the weights are stored once. For an
inception module, `CFGBANK` instructions split the weight banks: for example 6→W0,
7→W1, 8→W2, 9→W3, one weight buffer per branch. Any other mapping works too.

A thread addresses the global buffer logically, as `{rank, offset}`. The rank says
which bank of that logical buffer is meant (0 = the lowest-numbered bank mapped to
it), and the offset is the word within that bank (15 bits). Because the address
carries a rank rather than a flat word address, translation needs no divider for
the 25,600-word bank. An access that falls in no mapped bank is granted, reads
zero and sets the sticky `fbmu_err`.

Every bank has its own round-robin arbiter over three requesters: the data mover of
thread 0, the data mover of thread 1 and the off-chip port. Requests to different
banks are served in the same cycle. A request that loses simply waits, which is
where the two sub-networks slow each other down when they fetch the shared weights
together.

## Inside a processing unit (`sna_pu`)

A PU has eight compute lanes (`sna_lane`). Each lane is a multiplier-accumulator
feeding a 32-bit accumulator (CACC) and a 16-entry forward output buffer (FOB). All
lanes share one weight buffer (`sna_wbuf`) and one private input/output buffer
(`sna_iobuf`). There are no per-lane register files for inputs. Every cycle one
weight is read and broadcast to all lanes, and each lane receives its own IFmap
word. A lane therefore computes one output pixel, and the eight lanes compute eight
neighbouring pixels with the same filter.

A run (`RUN` instruction) computes, for each lane `l`:

```
acc[l]  = (ACC ? FOB[slot] : 0) + sum_{k<K} W[wbase+k] * X[l][k]
X[l][k] = input-half lane bank l, word ibase+k        (normal)
        = lane l of the k-th vector from PU i+1       (SRCF)
FOB[slot] <= acc[l]
unless PSUM:  out = ReLU?( maxpool_{2^p lanes}( sat(acc >> 8) ) )  -> output half, word obase
              and with FWD also sent to PU i-1
```

* **Partial sums.** `PSUM` keeps the result only in the FOB. A later run with `ACC`
  continues from it, so a reduction longer than the buffers can be split. When the
  FOB slots are needed for other work, `STP` copies partial sums to the global
  buffer and `LDP` brings them back. This is the partial-sum bus between the
  global buffer and the PU array. A 32-bit FOB slot `s` travels as two words: local
  address `2s` is the low half and `2s+1` the high half.
* **Pooling and activation.** The pooling unit (`sna_pool`) takes the maximum over
  windows of 1, 2, 4 or 8 neighbouring lanes. The activation unit (`sna_act`) is
  ReLU. Pooled outputs land in the low lane banks.
* **Input/output role swap.** The 10 KB buffer has two halves, each with one 320-word
  bank per lane. One half is the input buffer and the other the output buffer. `SWAP`
  exchanges the roles, so the outputs of layer i-1 become the inputs of layer i
  without moving a word.
* **Forward link.** Each PU has a one-way link to its lower neighbour (PU i → PU
  i-1), one 8-word vector wide. The link also runs across the boundary between the
  two main threads, so the two sub-networks can pass results on chip instead of
  through DRAM. The receiving PU keeps one vector in a holding register, which fills
  whenever it is empty, even while that PU is idle. A run with `SRCF` takes its IFmaps
  from the link, one vector per MAC step, and waits (stalls) when none is there. A
  sending PU holds its vector (stalls) until the neighbour's register is free.
  Because of this valid/ready handshake, producer and consumer may be started in
  either order.

**Timing.** A run from the input buffer takes K+2 cycles (busy from the cycle after
start): K MAC cycles, one cycle of buffer read latency and one write-back cycle.
Sending on the forward link adds at least one cycle. Each lane performs one MAC per
cycle, so the array peaks at 512 MACs per cycle.

Numbers are 16-bit Q8.8 fixed point. Products are accumulated in 32 bits. Results
are shifted right by 8 and saturated to 16 bits.

## Program model (`sna_cp`, `sna_dma`)

The host writes two programs, one per main thread, into the control processor's
instruction memories (256 entries each). It then pulses `start` and waits for
`done`. Every cycle the control processor looks at the next instruction of each
running thread and issues one that can go, alternating between the threads when
both can. A thread whose instruction has to wait stalls; the other thread keeps
issuing.

| op | fields | effect | issues when |
|---|---|---|---|
| `CFGBANK` | b=bank, lbuf | bank → logical buffer | always |
| `CFGPU` | b=first PU, len=count, stid | PUs → (this thread, stid) | always |
| `LDW` | stid, lbuf, a, stride, b, len | global → weight buffers of the group | thread's mover idle |
| `LDI` | … + lane | global → input half, lane bank `lane` | thread's mover idle |
| `STO` | … + lane | output half, lane bank `lane` → global | mover idle and group idle |
| `LDP` | … + lane | global → FOB halves of lane `lane` | thread's mover idle |
| `STP` | … + lane | FOB halves of lane `lane` → global | mover idle and group idle |
| `RUN` | stid, b=wbase, c=ibase, a=obase, len=K, lane=FOB slot, flags | compute on the group | mover idle and group idle |
| `SWAP` | stid | swap buffer roles of the group | mover idle and group idle |
| `SYNC` | | wait | mover idle and all of the thread's PUs idle |
| `HALT` | | thread stops | always |

RUN flags (`sna_pkg`): bit 0 `ACC`, bit 1 `PSUM`, bit 2 `RELU`, bit 3 `FWD`,
bit 4 `SRCF`, bits 6:5 log2 of the pooling window.

Each main thread has its own data mover. It walks the PUs of the target group in
increasing PU order. For the m-th PU of the group it moves `len` words between
global address `a + m*stride + i` and local address `b + i`. A stride of 0
broadcasts the same weights to every PU of a branch. A non-zero stride hands each
PU its own tile of the IFmaps. A load word takes two cycles when its bank is free;
a store word takes three. A transfer must stay inside one bank.

Nothing in the hardware orders the two threads against each other. Which PUs and
banks a thread touches is the program's responsibility, as in a statically
scheduled design. The forward-link handshake is the only synchronisation between
PUs.

## Where this RTL departs from, or adds to, the architecture as published

The block structure is as published: lanes with MAC, CACC and FOB; a shared weight
buffer and a swappable input/output buffer per PU; pooling and ReLU units; a
one-way link to the neighbouring PU; weight, IFmap, partial-sum and OFmap paths
between the PUs and a 16-bank global buffer with a table-driven management unit; an SMT controller with a TID/STID table; and a control processor.
So are the sizes and the siamese and inception bank layouts. The following are this
design's own choices, because the published description does not give them:

* the word width and number format (16-bit Q8.8, 32-bit accumulator, saturation);
* the instruction set, its encoding and the issue rules of the control processor,
  including round-robin choice between the threads;
* the data movers, which carry one word at a time with a per-PU stride, and
  move partial sums as two 16-bit halves per FOB slot;
* the logical address format `{rank, offset}` and the round-robin bank arbiter;
* FOB depth (16), pooling across neighbouring lanes with power-of-two windows, and
  the run pipeline;
* the valid/ready handshake and one-vector holding register on the forward link;
* the forward link runs one way only (PU i → PU i-1). The published overview drawing
  shows the neighbour connections with heads at both ends, but the description calls
  the link unidirectional, and the PU drawing has a single forward input and output;
* the reset partitions of both tables, and the external off-chip port (the DRAM
  and its controller are outside this design).

Not built: the off-chip DRAM, and the compiler (parser, resource search,
instruction generator). Programs are written by hand. No block computes the final
distance between the two sub-networks' outputs; the architecture does not describe
one.

## Fit of the evaluated networks

Sizes of the largest layer's weights, as published for three siamese networks.
They are compared with the 200 KB of weight banks in the reset layout and with
the 800 KB global buffer:

| network | largest layer weights | on chip at once? |
|---|---|---|
| Siamese (6 layers/branch, 8.95 M MACs) | 400 KB | yes, after remapping 8 banks to weights (8 × 50 KB) |
| MSP-CNN (7 layers, 1.98 G MACs) | 276.5 KB | yes, after remapping 6 banks to weights |
| SiamRPN++ (16 layers, 2.72 G MACs) | 0.98 MB | no: larger than the whole global buffer. The weights must be streamed in tiles through the off-chip port |

At 512 MACs per cycle the MAC counts correspond to at least about 17.5 k,
3.9 M and 5.3 M cycles. These are lower bounds. None of these networks was
simulated whole. `tb_sna_wl_siamese` runs one small convolution layer of each
sub-network on the full array, and `tb_sna_wl_inception` one small
inception-style layer of the MSP-CNN kind.

## Files

| file | block |
|---|---|
| `rtl/sna_pkg.sv` | sizes, types, instruction format |
| `rtl/sna_top.sv` | the accelerator |
| `rtl/sna_cp.sv` | control processor, two instruction streams |
| `rtl/sna_smtc.sv` | SMT controller: PU → (TID, STID) |
| `rtl/sna_dma.sv` | per-thread data mover |
| `rtl/sna_fbmu.sv` | buffer management unit: bank table, translation, arbiter |
| `rtl/sna_gbuf.sv` | 16-bank global buffer |
| `rtl/sna_pu.sv` | processing unit |
| `rtl/sna_lane.sv` | compute lane (MAC, CACC, FOB) |
| `rtl/sna_wbuf.sv` | PU weight buffer |
| `rtl/sna_iobuf.sv` | PU input/output buffer with role swap |
| `rtl/sna_pool.sv` | max-pooling unit |
| `rtl/sna_act.sv` | ReLU unit |

Every module has a self-checking testbench `tb/tb_<module>.sv`. `tb/tb_sna_top.sv`
runs a complete siamese scenario on an 8-PU array. Both sub-networks compute a
layer with shared weights, and sub-network 0 runs two branches at once after
splitting the weight banks. A PU of sub-network 1 then forwards two vectors to a PU
of sub-network 0, and sub-network 0 swaps its buffers and computes a next layer
from the previous outputs. Finally sub-network 1 splits a reduction in two and parks
the partial sums in the global buffer between the halves. The testbench checks every
result word. It also counts, and requires, bank conflicts, thread stalls, concurrent
branches and threads, forward-link waits and transfers, the swap, the bank split,
pooling, ReLU, and partial-sum stores and loads.
`tb/tb_sna_top_full.sv` runs the same scenario on the accelerator at its default
sizes (64 PUs, 800 KB). Both scenarios share `tb/tb_sna_top_body.sv`.

`tb/tb_sna_wl_inception.sv` is a workload test on a 16-PU array. Both sub-networks
run the same inception-style layer at once: four 1x1-convolution branches with
2, 3, 2 and 1 output channels over 8 input channels and 16 pixels, concatenated
into one 8-channel map. Each branch is a sub-thread on two PUs, and the weight
banks are split four ways (W0..W3). The test checks every output word and requires
all four branches of each sub-network to have computed at the same time.

`tb/tb_sna_wl_siamese.sv` runs at the default sizes. Each sub-network applies the
same 3x3 filter, ReLU and 2-wide pooling to its own 16x16 image, on 32 PUs each
(one pixel per lane). The host lays out each pixel's zero-padded neighbourhood as
9 consecutive words. The test checks every output and that a 9-MAC run keeps a PU
busy for 11 cycles. It also checks that all 512 lanes perform a MAC in the same
cycle while the two threads' runs overlap.

## Simulating

With Verilator 5 (two-state simulation, so every testbench resets or writes what it
later reads):

```
verilator --binary --timing --assert rtl/sna_pkg.sv $(ls rtl/*.sv | grep -v sna_pkg) \
          tb/tb_sna_top_body.sv tb/tb_sna_top_full.sv --top-module tb_sna_top_full
./obj_dir/Vtb_sna_top_full
```

The package must come first, and each RTL file only once. Replace the testbench
files and the top module name to run any other test. `tb_sna_top` also needs
`tb_sna_top_body.sv`, and `tb_sna_wl_lanes` needs `tb_sna_wl_lanes_body.sv`.
Each test prints one line, `TB_RESULT checks=N failures=M`. The full-size build
compiles in well under a minute, and the scenario runs in about 1,900 cycles.

## Changing the configuration

`sna_top` takes the array and buffer sizes as parameters: `NPU`, `NL` (lanes, a
power of two up to 16), `WWORDS`, `IWORDS` (words per lane bank per half), `NB`
(banks, up to 16), `BWORDS` (words per bank, up to 32768) and `IMEM_D`. The field
widths of the instruction format are in `sna_pkg`. A local address is 12 bits. A
pooling window is at most 8 lanes. `tb/tb_sna_wl_lanes.sv` builds 8-PU arrays with
2, 4, 8 and 16 lanes (using `tb/tb_sna_wl_lanes_body.sv`) and runs one layer on
each. The full 64-PU array has been simulated with 8 lanes only.
