# A domain-specific back end for wearable processors

Wearable devices run a small, fixed set of kernels: convolution, histograms,
dynamic time warping, Haar transforms, ECG authentication, A* path finding,
AES and multiply-accumulate. These kernels share three traits:

- their loops are mostly data-parallel;
- they read far more than they write;
- the few that are not vectorisable (graph search) touch memory in a predictable, node-by-node pattern.

This RTL builds a single processor core around those traits. It follows the
architecture proposed in *Exploring Domain-Specific Architectures for
Energy-Efficient Wearable Computing*, in its energy-oriented configuration.
The core adds four things to an ordinary in-order pipeline:

- **A SIMD ALU** that computes eight 16-bit results per clock with only four physical 16-bit ALUs. Each ALU is used twice per cycle, once in each clock phase.
- **Relaxed-retention STT-RAM L1 caches** (32 KB, 4-way, 64 B lines).
  - Their cells keep data for only 75 µs, which makes them cheaper to write.
  - They are never refreshed. A 2-bit counter per line declares the line dead before its data can fade.
- **A 16 KB STT-RAM sample buffer** beside the data cache.
  - Sensors, main memory or the prefetcher fill it.
  - The CPU may only load from it.
  - A whole 7,500-sample ECG recording fits in it.
- **A graph prefetcher.** Given a node's address, it collects chosen fields of all of the node's successors into contiguous arrays in the buffer, so A*-style code can process them as vectors.

Power control switches off the SIMD unit, the buffer and the prefetcher when
the running program does not use them. An operation that needs a switched-off
unit wakes it up and waits for it to settle.

## Block structure

```
            micro-ops                    fetch
               |                           |
        +------v-------------------+   +---v------+
        | dsa_datapath             |   | stt_cache|---- I-side memory port (im_*)
        |  ID: regfiles (32b,128b) |   |  (I$)    |
        |  EX: dsa_alu | simd_alu  |   +----------+
        |  MEM: Sel --+--+--+      |
        +-------------|--|--|------+
              cache   |  |  | prefetch cmds
        +-------------v+ |  +-----------------+
        | stt_cache D$ | | buffer loads (CS)  |
        | + retention  | |                    v
        |   monitor    | |             +------------+
        +------+-------+ |             | prefetcher |--- word reads (pm_*)
               |         v             +-----+------+
   dm_* <------+   +------------+            | gathered samples
                   | stt_buffer |<--+--------+
                   +------------+   |  sensor_demux (SS, write arbiter)
                                    +---- sensors / memory fill / prefetcher
        power_ctrl: pwr_en, ready, wake for SIMD, buffer, prefetcher
```

| Module | What it is |
|---|---|
| `dsa_top` | Wires everything together. The host front end, main memory, sensors and power switches are ports. |
| `dsa_datapath` | Three-stage pipeline with interlocks, wake-up stalls and prefetch stalls. |
| `dsa_alu` | The ALU operation set, parameterised width: 32-bit scalar, 16-bit lane. |
| `simd_alu` | Four lanes used in two phases, with selectors S1 and S2. |
| `dsa_regfile` | Register file: 3 read ports, 1 write port. |
| `stt_cache` | STT-RAM L1 cache, used for both the I-cache and the D-cache. |
| `retention_monitor` | 2-bit expiry counters, one per cache line. |
| `stt_buffer` | 16 KB sample buffer: 1024 rows of 8 × 16-bit samples. |
| `sensor_demux` | SS demultiplexer and the buffer's write-port arbiter. |
| `prefetcher` | Prefetch registers, address generator and gather logic. |
| `power_ctrl` | Power gating and wake-up timing. |
| `dsa_pkg` | Shared types: ALU operations, micro-operation format, widths. |

## Driving the core: micro-operations

The instruction set of the host core is not part of this design. The core
instead accepts decoded micro-operations (`uop_t` in `dsa_pkg`) through a
valid/ready handshake. Each micro-operation has these fields:

- `kind`: what it does (see the table below).
- `op`: the ALU operation.
- `vec`: scalar or vector.
- `tgt`: cache or buffer. This field is the select **CS**.
- `use_imm`: whether the second operand is the immediate.
- Four register numbers: `rd`, `rs1`, `rs2`, `rs3`.
- A 32-bit immediate, `imm`.

| kind | effect |
|---|---|
| `U_SALU` | `s[rd] = s[rs1] op (imm or s[rs2])`; `s[rs3]` is the addend for multiply-add |
| `U_VALU` | `v[rd] = v[rs1] op v[rs2]` on each of the eight 16-bit elements; `v[rs3]` is the addend |
| `U_LOAD` | address `s[rs1] + imm`. From the cache: a 32-bit word or an aligned 16-byte vector. From the buffer (`tgt = T_BUFFER`): a sign-extended 16-bit sample or an aligned row of eight samples |
| `U_STORE` | stores `s[rs2]` or `v[rs2]` through the cache (write-through). There is no store to the buffer |
| `U_PF_CFG` | writes prefetch register `imm[3:0]` with `s[rs2]` (the *prefetch init* step) |
| `U_PF_GO` | gathers the successors of node `s[rs1] + imm` (the *prefetch successors* step) |
| `U_CFG` | writes the control register: bit 0 SIMD on, bit 1 buffer on, bit 2 prefetcher on, bit 3 SS |

The ALU operations are:

- add, subtract, multiply, divide;
- xor, shifts, rotates;
- greater-than, less-than, equal, greater-than-zero, less-than-zero;
- multiply-add;
- AND and OR (which the DTW kernel needs);
- a move, used to load immediates.

All arithmetic is signed. Compares return all ones or zero, so their results
can serve as masks. Division by zero returns all ones.

## The SIMD ALU: eight results from four ALUs

A 16-bit lane needs well under half the clock period that the 32-bit scalar
ALU sets. `simd_alu` exploits this as follows:

- **First half of the clock (high phase).** Input selector S1 sends elements 0–3 to the four lanes.
- **Second half (low phase).** S1 sends elements 4–7.
- **Negative edge.** Output selector S2, a bank of negative-edge flip-flops, captures the four first-half results.
- **Next rising edge.** The pipeline register samples the second-half results straight from the lanes.

So the unit has the same one-cycle latency as the scalar ALU.

The phase signal is made from flip-flops, not taken from the clock net:

- `p` toggles at every rising edge.
- `n` copies `p` at every falling edge.
- `p ^ n` is 1 during the high phase.

Timing consequence: each lane must settle within half a cycle. The design
point puts the lane at 42% of the scalar ALU's path, and the selectors add a
little on top, reaching 48%. Synthesis must therefore constrain the lane paths
to half a period. A stalled operation is simply recomputed, because the
operands stay in the pipeline register.

## Caches that forget: relaxed retention

Both L1 caches are 32 KB, 4-way, with 64-byte lines. At the 1 GHz design
clock the STT-RAM hit time (0.445 ns) and write time (0.981 ns) each fit in
one cycle, so:

- a hit answers one cycle after the request is accepted;
- a store hit takes one array write.

Cell retention is 75 µs, which is 75,000 cycles (`RET_CYCLES`). Lines are
never refreshed. Instead, `retention_monitor` works like this:

- It keeps a 2-bit counter per line.
- Writing a line clears its counter.
- A global tick every `RET_CYCLES/4` advances all counters.
- A line whose counter reaches 3 is *stale* and behaves as invalid. This happens 1/2 to 3/4 of the retention time after the line was written.

Dropping a line silently is safe because the cache is write-through with no
write allocation. Main memory always holds a current copy.

Replacement works like this:

- an invalid or stale way is chosen first;
- otherwise a round-robin pointer per set picks the victim;
- one miss is outstanding at a time.

Each way is a separate one-dimensional array: data lines and tags, read
synchronously.

## The sample buffer and the two selects, CS and SS

The buffer sits beside the data cache, with a one-cycle, miss-free read. Two
selects control it:

- **CS** (the `tgt` field of a load) chooses whether a load reads the cache or the buffer.
- **SS** (control register bit 3) decides where each sensor sample goes: into the buffer (`sensor_demux` writes it at a ring pointer that wraps at 8,192 samples, visible as `sensor_wr_ptr`) or on to main memory (`smem_*`).

Main memory can also copy samples into the buffer through `fill_*`. This is
the hardware side of software calls that would allocate, fill and free buffer
space.

The buffer has one write port shared by three writers. Priority is fixed:

1. sensors;
2. memory transfers;
3. the prefetcher.

The CPU never writes the buffer, so it never holds data that is out of date
with respect to memory. The buffer has no retention monitor; software treats
its contents as short-lived.

## The graph prefetcher

Graph kernels lay out their nodes at fixed offsets from each node's base
address. Software describes that layout once, in the prefetch registers
(`U_PF_CFG`):

| register | meaning |
|---|---|
| 0 | byte offset of the 32-bit successor count |
| 1 | byte offset of the array of 32-bit successor addresses |
| 2 | number of parameters to gather (up to `MAX_PARAMS` = 4) |
| 4 + 2p | byte offset of parameter *p* inside a node |
| 5 + 2p | bits 17:16: size of parameter *p* in 16-bit samples (1 or 2); bits 15:0: first buffer sample of its array |

After a `U_PF_GO`, the address generator does the following:

1. It reads the successor count. This is the "node size", clamped to `MAX_SUCC` = 8, one SIMD vector's worth.
2. It reads the successor addresses.
3. For every parameter and every successor, it reads the word at *successor + offset*.

The gather logic then writes sample *k* of successor *i* of parameter *p* to
buffer sample *dest[p] + i·size[p] + k*. A one-sample parameter takes the
16-bit half selected by address bit 1.

The unit reads main memory directly, one word at a time, bypassing the cache.
While it is busy, the pipeline holds back buffer loads and further prefetcher
commands, so code can issue `U_PF_GO` followed at once by vector loads of the
arrays.

## Power gating and stalls

`power_ctrl` keeps one "on" bit per optional unit and one ready flag per unit:

- A unit becomes ready `WAKE_CYCLES` = 4 edges after it is switched on.
- Switching a unit off drops its ready flag at once.
- `pwr_en` drives the external power switches.
- While the SIMD unit is not ready, its inputs are held at zero (isolation).

The pipeline issues at most one micro-operation per cycle. An ALU result is
written back two cycles after issue. A micro-operation is held at issue in
these cases:

- **Hazard:** an older operation in EX or MEM still has to write a register it reads. There is no forwarding.
- **Memory:** the memory stage waits for the cache or buffer to answer.
- **Wake:** it needs a unit that is off. The unit is switched on by hardware.
- **Prefetch:** a buffer load or prefetcher command waits while a prefetch is running.
- **Control write:** `U_CFG` waits for an empty pipeline.

`ev` gives one pulse per event:

- retire;
- each of the four stall kinds;
- SIMD operation;
- D-cache hit, miss and expired line;
- unit wake-up.

## Sizes against the evaluated kernels

- **ECG (7,500 samples × 2 B = 15,000 B):** fits the 16,384 B buffer whole.
- **300 × 300 image and matrix kernels (180,000 B at 16 bits):** stay in main memory and stream through the 32 KB data cache.
- **AES (20-byte blocks):** fits in two vector registers.
- **A\* (3,770 nodes):** stays in main memory. The prefetcher handles up to eight successors per node. Nodes with more are truncated.

## How far this follows the published architecture

These parts follow the architecture:

- the four-lane, two-phase SIMD ALU with selectors S1 and S2;
- the 16-bit elements in 128-bit registers beside a 32-bit scalar ALU;
- the ALU operation set;
- the cache geometry, the STT-RAM latencies and the 75 µs retention;
- the 2-bit expiry counters with no refresh;
- the 16 KB load-only buffer with selects CS and SS;
- the prefetcher's three parts (registers, address generator with node-size computation, gather logic into contiguous buffer arrays);
- gating of the units a program does not use.

These are this design's own choices, because the architecture leaves them open:

- the micro-operation format;
- the three-stage pipeline and its interlocks;
- the write-through policy and the replacement order;
- the monitor tick of a quarter retention time;
- the ring-buffer sensor writes and the write priorities;
- the prefetch register layout, the eight-successor and four-parameter limits, and one- or two-sample parameters;
- the control register layout, wake-on-demand and the four-cycle wake time;
- all handshakes and bus widths towards memory.

Not included:

- the host core's fetch and decode;
- main memory;
- the sensors and the power switches themselves;
- the dual-core variant, which the architecture only explores as an alternative.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The two system-level
testbenches share a reference model, `tb/dsa_ref_pkg.sv`. It executes
micro-operations in program order, and every register write-back is compared
against it.

- **`tb_dsa_datapath`** runs the pipeline against simple models of memory, buffer, prefetcher and power control.
- **`tb_dsa_top`** runs the whole core at its full default sizes. It includes:
  - SIMD kernels;
  - random scalar and vector code with cache traffic;
  - ECG-style sensor streaming with SS = 1 and SS = 0;
  - memory-to-buffer copies;
  - graph prefetches read back as vectors;
  - instruction fetches;
  - a 75,000-cycle idle period after which a cached line must have expired.

  It counts every stall kind, hits, misses, expiries, wake-ups, sensor paths, fills, prefetches and fetches. It fails if any of them never occurs.

**`tb_dsa_workloads`** runs seven of the evaluated kernels on the full core,
at their evaluation sizes. Every register write-back is checked against the
reference model. Its measured cycle counts:

| Kernel | What runs | Cycles |
|---|---|---|
| ECG | 7,500 samples streamed from the sensor into the buffer, then a SIMD pass over the whole recording | about 20,700 |
| Multiply-accumulate | 300 × 300 16-bit elements through the data cache | about 120,000 |
| 2D convolution | the three vertical taps of a 3×3 kernel over a 300 × 300 image (298 output rows, eight columns per operation) | about 229,000 |
| AES-style rounds | ten rounds of xor, rotate and shift on a 20-byte block held in two vector registers | not timed separately |
| Haar transform | the vertical step: sums and differences of row pairs of the 300 × 300 image | about 110,000 |
| Histogram | 256 bins of the low bytes of the 300 × 300 image's pixels, in scalar code (load, bin address, load count, increment, store) | about 2,080,000 |
| A\* | 400 node expansions on a 3,770-node graph, with the successors' distances and costs gathered by the prefetcher | about 30,500 |

The memory latencies of the models are random, 1–8 cycles, so these numbers
show relative cost only. The SIMD unit has no operations that move data
between elements. The horizontal taps of the convolution and the horizontal
Haar step would therefore need shifted copies of the image, and they are not
simulated. Dynamic time warping is not simulated either: each cell depends on
its left neighbour, so a row cannot be computed eight cells at a time. The
histogram is dominated by interlock stalls, because each increment waits for
the load of its bin.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_dsa_top \
  rtl/dsa_pkg.sv rtl/*.sv tb/dsa_ref_pkg.sv tb/tb_dsa_top.sv -Mdir obj
./obj/Vtb_dsa_top
```

Replace the top module and testbench file to run another testbench. The unit
testbenches need only `rtl/` and their own file. `tb_dsa_top` finishes in
about a second of simulation time.

To change sizes, set the parameters of `dsa_top`:

- `CACHE_BYTES`, `CACHE_WAYS`, `LINE_BYTES`, `RET_CYCLES`
- `BUF_BYTES`
- `MAX_SUCC`, `MAX_PARAMS`
- `WAKE_CYCLES`

The element width, lane count and register counts are constants in `dsa_pkg`.
