# Elastic streaming SpMV accelerator for HBM FPGAs

This is synthesizable SystemVerilog for a sparse matrix-vector multiply engine,
y = A·x in single-precision floating point (FP32). It follows the architecture
published as *Modular and Lean Architecture with Elasticity for Sparse Matrix
Vector Multiplication on FPGAs* (Jain et al.). The design is built for FPGAs
with High Bandwidth Memory. Each kernel takes the non-zeros of A from two HBM
pseudo-channels at up to eight per clock. It keeps x and y on chip in eight
banks each. Sixteen kernels side by side use the 32 pseudo-channels of a
U280-class device.

The main idea is to build the kernel from small, separately verified blocks
that talk only through ready/valid streams. These are elastic links: any block
may stall its neighbour for any number of cycles without losing or repeating
data. Three mechanisms keep the stream moving:

* **Switch networks instead of crossbars.** Two 8×8 networks of buffered 2×2
  switches route each non-zero to the bank that holds its x entry, and then
  route each product to the bank that holds its y total.
* **Hazard-resolving back-pressure (HRB).** A small unit in front of each
  pipelined accumulator holds back only the products that would read a total
  still being updated. Every other product goes through, one per cycle.
* **Random non-zero order.** The host shuffles the COO list. This spreads the
  work over the banks and keeps bank conflicts and hazards rare.

## Dataflow of one kernel

```
 HBM ch0 ──┐                         ┌──────────── y beats ─────────────┐
 HBM ch1 ──┤                         │                                  │
           ▼                         │                                  │
         ┌─────┐ x beats  ┌─────┐ 8 × (addr, x)                         │
         │ lsa │────────► │ b_x │───────────────┐                       │
         │     │          └─────┘               ▼                       │
         │     │ A beats  ┌──────┐ 4 nz  ┌───────┐ 8 nz  ┌─────────┐    │
         │     │────────► │ b_A0 │──────►│       │──────►│ bvb_mul │×8  │
         │     │────────► │ b_A1 │──────►│ noc_0 │       │ x[c]·a  │    │
         │     │          └──────┘       └───────┘       └────┬────┘    │
         │     │                      route by col[2:0]       │ (row, p)│
         │     │                                          ┌───▼───┐     │
         │     │                                          │ noc_1 │ route by row[2:0]
         │     │                                          └───┬───┘     │
         │     │      ┌─────────┐  fire ×8  ┌─────┐      ┌────▼───┐     │
         │     │◄─────│ monitor │◄──────────│ acc │◄─────│  hrb   │ ×8  │
         │     │ done └─────────┘           │ y+= │      └────────┘     │
         │     │ drain_start ──────────────►│     │── 8 totals ──► concat ┘
         └─────┘                            └─────┘
```

Non-zero *i* with column *c* goes to input bank `c mod 8`, at entry `c >> 3`.
Its product goes to output bank `r mod 8`, at entry `r >> 3`, where *r* is its
row. With 16-bit indices and 8K entries per bank, one kernel holds vectors of
up to 65,536 entries.

## Data formats

| Item | Layout |
|---|---|
| non-zero (`nz_t`, 64 bits) | `[63:48]` row, `[47:32]` column, `[31:0]` FP32 value |
| A beat (256 bits) | four non-zeros; non-zero *q* sits in bits `[64q+63:64q]` |
| x or y beat (256 bits) | eight FP32 entries; beat *a* holds entries 8a … 8a+7, entry 8a+k in bits `[32k+31:32k]` |
| product (`prod_t`, 48 bits) | `[47:32]` row, `[31:0]` FP32 value |

The non-zeros of a job are split over the two channels. Beat *b* of channel 0
holds non-zeros 8b…8b+3, and beat *b* of channel 1 holds 8b+4…8b+7. When the
count is not a multiple of 8, the host pads the list with (row 0, column 0,
value 0) entries, which add zero to y[0].

## Running a job

A kernel is started with a one-cycle `start` pulse and a `job_t` descriptor.
Every field of the descriptor is counted in 256-bit beats:

| Field | Meaning |
|---|---|
| `x_base`, `x_beats` | where x is on channel 0, and its length |
| `a0_base`, `a1_base`, `a_beats` | where the non-zeros are on each channel; both channels carry `a_beats` beats |
| `y_base`, `y_beats` | where y is written on channel 0, and its length |

The load-store adaptor (`lsa`) then runs four phases:

1. **Load x.** Read `x_beats` beats from channel 0. Each beat is cut by `b_x`
   into eight (entry address, value) pairs, one for each input bank.
2. **Stream A.** Read `a_beats` beats from both channels in parallel. `b_A0`
   and `b_A1` cut each beat into four non-zeros, which feed inputs 0–3 and
   4–7 of `noc_0`. The monitor is armed with `8·a_beats` expected non-zeros.
3. **Wait.** The monitor counts the products that the accumulators take. When
   the count reaches the expected total, the adaptor pulses `drain_start`.
4. **Drain.** Each accumulator first lets its adder pipeline empty. It then
   offers its first `y_beats` totals in order, writing zero behind each one.
   `concat` joins the eight banks into one beat, which is written to
   `y_base + a`. `done` pulses after the last write.

After reset, every accumulator bank clears itself. This takes 8,192 cycles,
during which `in_ready` is low. Because draining also zeroes the bank, every
job starts from y = 0.

### Memory channel interface

This is a simplified stand-in for AXI. Each channel has:

* a request stream (`req_valid`/`req_ready`, `mem_req_t`) that carries either
  a one-beat read or a one-beat posted write;
* a read-data stream (`rsp_valid`/`rsp_ready`/`rsp_data`) that returns data in
  request order.

The adaptor buffers read data in a 32-beat FIFO per channel. It issues a read
only when the FIFO has room for everything still outstanding. So the adaptor
never stalls the memory's data stream, and with 32 credits a read latency of
up to about 30 cycles can be hidden at full rate.

To connect the kernel to real HBM, put an AXI master in front of these ports.
It must turn the requests into bursts and return read data in order.

## The accumulator and its hazard window

This is the part that needs the most care.

`acc` is a read-modify-write pipeline on one bank. For a product taken at
clock edge *t*:

| edge | action |
|---|---|
| t | bank read of `row>>3` is registered; product value registered |
| t+1 … t+ADD_LAT | FP32 add (`fp32_add_pipe`, ADD_LAT = 4) |
| t+ADD_LAT+1 | sum written back |

A read at edge *t'* sees the new total only if t' ≥ t + ADD_LAT + 2. So a
product of the same row must not be accepted at any of the ADD_LAT+1 = 5 edges
that follow *t*. This is `spmv_pkg::ACC_WINDOW`.

`hrb` keeps a 5-slot shift register that moves every cycle. It holds the row
passed in each of the last 5 cycles, or an empty slot if nothing passed. An
incoming product is compared with all slots:

* On a match, `in_ready` drops and the product waits. Only this lane is
  stalled. Back-pressure travels up through `noc_1`, whose buffers let the
  other lanes keep moving.
* With no match, the product goes to the accumulator in the same cycle.

So the accumulator accepts one product per cycle (II = 1). Only a real
read-after-write dependency costs cycles, and then at most five. A stream that
hits one row back to back gets one product through every six cycles. This is
why row-sorted input runs slowest.

The accumulator trusts the HRB completely. It does not check for hazards
itself. If you change `ADD_LAT`, `ACC_WINDOW` follows automatically. If you
change the accumulator pipeline in any other way, recompute the window.
`tb_acc` checks that the spacing of ACC_WINDOW+1 cycles is exact.

## The switch networks

Each `noc` has three stages of four `switch2x2`, 12 switches in all. Each
switch contains:

* an `elastic_buffer` on each input;
* a `split2` per input that steers the packet by one index bit;
* a round-robin `merge2` per output;
* an `elastic_buffer` on each output.

The stages are wired as a butterfly. Stage *s* pairs the ports that differ in
bit 2−s and sets that bit of the packet's position to the matching index bit.
After three stages, a packet's port equals its three routing bits, whichever
input it entered on.

The network is blocking. Two packets that want the same switch output wait in
the 2-slot buffers. Packets from one source to one destination stay in order.
Packets from different sources may overtake each other, which is harmless:
floating-point sums are then formed in a data-dependent order, as in any such
design.

The `elastic_buffer` registers `in_ready`, so no combinational ready path
crosses a switch. Its two slots let it pass one packet per cycle with no
bubbles. `merge2` keeps offering a packet it has offered but not yet handed
over, so its output follows the ready/valid rule even while it arbitrates.
`elastic_buffer` carries an assertion for that rule.

An idle network has a latency of 6 cycles. A conflict-free pattern, such as
input *i* to output *i*, runs at 8 packets per cycle.

## Measured behaviour

The numbers come from `tb_spmv_kernel`: one kernel, a 2048 × 2048 matrix with
4,000 non-zeros, and a 20-cycle memory. The rate is non-zeros per cycle during
the stream phase; 8 is the maximum.

| order of non-zeros | rate |
|---|---|
| random | ≈3.7 |
| column-major | ≈3.8 |
| row-major | ≈2.4 (hazard stalls) |
| random, both channels refusing 40 % of requests | ≈3.8 |

`tb_spmv_top` runs all 16 kernels at once, each with 1,000 non-zeros. Half of
the kernels get their non-zeros in row-major order, and four kernels have busy
memories. All kernels finish in about 850 cycles, including loading x and
draining y.

In the published measurements, a set of benchmark matrices used 38–74 % of the
peak bandwidth, and random order reached up to 90 % on other matrices, ahead of
column-major and then row-major. Under uniformly random traffic this RTL
reaches about 46 %, inside the benchmark range but well short of the best
case, and column-major order is about level with random. The
likely limit is head-of-line blocking in the butterfly: a packet waiting for a
busy switch output holds up the packets behind it, and two-slot buffers absorb
little of that. The stream splitters add to it, since a beat is released only
when all of its lanes have left. The publication does not describe its network
in enough detail to say how it avoids this. Deeper buffers at the network
inputs would be the first thing to try.

## What follows the publication and what is this design's own

The publication gives:

* the block structure and the names of the blocks;
* eight banks of 8K FP32 entries, with 16-bit indices split into bits [15:3]
  for the entry and [2:0] for routing;
* two 256-bit channels carrying 4 non-zeros each;
* the network of 12 buffered 2×2 switches built from 2 splits, 2 merges and
  4 two-slot elastic buffers;
* the HRB mechanism;
* the monitor's role;
* 16 kernels on 32 pseudo-channels.

This design chooses:

* FP32 operators that round to nearest-even and flush subnormals to zero, with
  a latency of 4 cycles each. The publication quotes 4–8 cycles for FPGA
  adders. Each operator is computed in one stage and followed by registers
  meant to be retimed.
* The butterfly wiring order.
* Round-robin merging.
* Eager-fork stream splitters.
* The memory channel protocol, the read credits, the job descriptor and the
  padding rule.
* Clearing the banks at reset and on drain, and draining at one total every
  two cycles.
* Asynchronous active-low reset.

The original adaptor and vector buffers were HLS blocks. Here they are plain
RTL.

Left out:

* the HBM memory subsystem and the HBM itself. The top brings every kernel's
  channel ports out instead, and testbenches use a behavioural memory model;
* host-side work: partitioning, shuffling and padding;
* floorplanning and tool settings, which have no RTL form.

## Files

| File | Contents |
|---|---|
| `rtl/spmv_pkg.sv` | sizes, latencies, packet and job types |
| `rtl/fp32_pkg.sv` | FP32 multiply and add functions |
| `rtl/fp32_mul_pipe.sv`, `rtl/fp32_add_pipe.sv` | pipelined operators |
| `rtl/elastic_buffer.sv`, `rtl/split2.sv`, `rtl/merge2.sv` | elastic dataflow units |
| `rtl/switch2x2.sv`, `rtl/noc.sv` | switch and 8×8 network |
| `rtl/stream_splitter.sv`, `rtl/concat.sv` | wide↔narrow stream conversion |
| `rtl/bvb_mul.sv` | x bank and multiplier |
| `rtl/hrb.sv` | hazard-resolving back-pressure |
| `rtl/acc.sv` | y bank and accumulator |
| `rtl/monitor.sv` | processed-non-zero counter |
| `rtl/sync_fifo.sv`, `rtl/lsa.sv` | load-store adaptor and its FIFOs |
| `rtl/spmv_kernel.sv` | one kernel |
| `rtl/spmv_top.sv` | 16 kernels (top) |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/tb_fp_pkg.sv` | reference FP32 arithmetic for the testbenches |
| `tb/hbm_model.sv` | behavioural memory channel |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/spmv_pkg.sv rtl/fp32_pkg.sv tb/tb_fp_pkg.sv tb/tb_spmv_kernel.sv \
  --top-module tb_spmv_kernel -o sim
./obj_dir/sim
```

Replace `tb_spmv_kernel` with any other testbench. `tb_spmv_top` builds the
full 16-kernel design at its default parameters. It takes about a minute to
compile and seconds to run.

The testbenches check results as follows:

* **Datapath blocks.** Results are compared with values worked out
  independently. FP32 results come from double-precision arithmetic rounded
  once.
* **End-to-end tests.** These use small integer matrix and vector values, so
  every y entry is exact whatever the order of accumulation.
* **Mechanisms.** The end-to-end tests also count hazard stalls, network
  conflict stalls, memory back-pressure and drains, and fail if any of them
  never happened.

## Changing the design

* **Bank size.** Set `BANK_DEPTH_P` on `spmv_kernel` (or `DEPTH` on `bvb_mul`
  and `acc`). Index widths stay at 16 bits; for larger banks, change `IDX_W`
  and the `nz_t` layout together.
* **Operator latency.** Change `MUL_LAT`/`ADD_LAT` in `spmv_pkg`. The hazard
  window follows.
* **Kernel count.** Set `NUM_KERNELS` on `spmv_top`.
* **Buffering.** To trade area for throughput, put `sync_fifo`s between the
  splitters and `noc_0`, or between `noc_1` and the `hrb`s. Every link is
  elastic, so no other block needs to change.
