# Per-lane software-managed memories for a VLIW data memory

A wide VLIW core can issue many loads and stores per cycle, but a data cache
with many ports is expensive: area grows roughly with the square of the port
count. This design gets the bandwidth some other way. Every issue lane gets a
small, single-ported **software-managed memory (SMM)** of its own. Lane 0 also
keeps the one port of an ordinary L1 data cache. Each SMM is a private address
space: lane *l* can reach only SMM *l*, and address 0 of one SMM has nothing to
do with address 0 of another or with main memory. No tag arrays, comparators or
crossbars are needed. The compiler knows which lane holds which data, so it can
schedule up to one SMM access per lane per cycle, eight in parallel on an
8-issue machine, and never hits a port conflict.

The RTL implements the architecture described in *An Energy-Efficient Memory
Hierarchy for Multi-Issue Processors* in its evaluated configuration:

| parameter     | default | meaning                                  |
|---------------|---------|------------------------------------------|
| `LANES`       | 8       | issue lanes, each with one SMM            |
| `SMM_BYTES`   | 2048    | size of each SMM (16 KB in all)           |
| `CACHE_BYTES` | 16384   | L1 data cache behind Lane 0               |
| `LINE_BYTES`  | 32      | cache line (this design's choice)         |

In the published configuration, the SMMs take the place of half of a 32 KB
baseline cache, so the total amount of data storage stays the same.

## What a lane sees

Each lane hands the memory system one `lane_req_t` per bundle (see
`rtl/smma_pkg.sv`):

| field   | meaning                                                        |
|---------|----------------------------------------------------------------|
| `op`    | `OP_NOP`, `OP_LOAD` or `OP_STORE`                               |
| `tgt`   | Lane 0 only: `TGT_SMM` or `TGT_CACHE`; other lanes must use `TGT_SMM` |
| `base`  | base register value                                            |
| `imm`   | immediate offset, already sign-extended                        |
| `wdata` | value to store                                                 |

An SMM instruction is addressed the same way as an ordinary load or store:
`base + imm` is a byte address. Because a lane has only one SMM, the instruction
never names a memory. The SMM uses word address bits `[10:2]` (for 2 KB). Higher
bits are ignored, so the space wraps, and accesses are whole 32-bit words. An
assertion in `smma_mem_arch` reports any lane other than 0 that addresses the
cache.

## Bundle timing and the stall

This is the one part of the design that takes some care. The SMMs always answer
in one cycle. The cache answers in one cycle on a hit, and on a miss it needs
tens of cycles. A VLIW bundle has to complete as a unit, so the memory system
has one `stall` output for the whole bundle:

* A bundle is **accepted** on a clock edge where `stall` is low. The SMM
  accesses and any cache hit happen at that edge.
* Its load results appear on `rdata[l]` with `rvalid[l]` high in the **first
  cycle after acceptance in which `stall` is low**. Without a miss, that is the
  next cycle, so a new bundle can be issued every cycle.
* If Lane 0's cache access misses, `stall` rises in the next cycle and stays
  high while the line is written back (if dirty) and refilled. During that time
  the core must hold its next bundle. The memory system ignores every request,
  and each SMM keeps its read result on its output. When `stall` falls, all
  eight lanes present the bundle's results together.

```
cycle     t          t+1       ...   t+k       t+k+1
inputs    B0         B1 (held) ...   B1 (held) B1
stall     0          1         ...   1         0
accepted  B0         -         ...   -         B1
rvalid    -          0         ...   0         1  (results of B0, all lanes)
```
(B0 is a bundle whose Lane 0 cache load misses; without the miss its results
would appear in cycle t+1.)

Lane 0's output multiplexer remembers whether its last accepted operation went
to the SMM or to the cache. That choice is updated only on unstalled cycles.

## The L1 data cache (Lane 0 only)

The architecture fixes only the cache's size and its place behind Lane 0. The
rest is the simplest design that works:

* direct-mapped, 512 lines of 32 bytes for 16 KB;
* write-back with write-allocate;
* tags, valid bits and dirty bits in a register array, compared in the cycle
  the request is accepted;
* data array one line wide, read synchronously, and written per word.

On a miss with a dirty victim, the eight victim words go out first (`S_EVICT`).
The eight words of the new line then come in (`S_REFILL`). A store that missed
is merged into the incoming line. The port to the next memory level moves one
word per transfer: a transfer completes in a cycle with `mem_req` and `mem_gnt`
both high, and read data is taken from `mem_rdata` in that cycle. With a memory
that grants after `LAT` wait cycles, a clean miss stalls for 8·(LAT+1) cycles
and a dirty miss for 16·(LAT+1).

## How software fills the SMMs

The hardware has no path from the cache to an SMM. Data moves through the
shared register file: Lane 0 loads a word from the cache, and some lane stores
it into its own SMM. The compiler inserts such a **preamble** before a loop
whose SMM variables are first read. A variable that is first written needs no
preamble. Variables are spread over the lanes so that one bundle can fetch
several elements at once. Neighbouring elements go to neighbouring lanes
("1-consecutive"). When a loop strides through an array, the elements one
iteration needs are spaced N words apart ("N-consecutive"). The matrix-multiply
testbench uses this layout for C = A·B:

* `B[k][j]` is in lane `j % 8`, at word `(j/8)·N + k`, so a row of B is eight
  parallel loads per bundle;
* `A[i][k]` sits in a lane left free by the last B bundle, at word
  `256 + (i / free_lanes)·N + k`;
* each (i,k) step takes ⌈(N+1)/8⌉ bundles, against N+1 with a single cache port.

## Files

| file                       | contents                                               |
|----------------------------|--------------------------------------------------------|
| `rtl/smma_pkg.sv`          | request type, op and target enums                      |
| `rtl/smm_ram.sv`           | one single-ported SMM array                            |
| `rtl/smm_lane_unit.sv`     | per-lane address adder, SMM, stall/hold of the result  |
| `rtl/l1_dcache.sv`         | Lane 0's L1 data cache                                 |
| `rtl/smma_mem_arch.sv`     | top: all lanes, the cache, the Lane 0 multiplexer      |
| `tb/main_mem_model.sv`     | behavioural next-level memory (testbench only)         |
| `tb/tb_*.sv`               | self-checking testbenches                              |

The VLIW core itself (fetch, decoders, register file, ALUs, multipliers, branch
unit) is not part of this RTL. Its memory-side signals are the ports of
`smma_mem_arch`, and the testbenches take the core's place.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_smma_mem_arch \
  -y rtl -y tb +libext+.sv -Irtl rtl/smma_pkg.sv tb/tb_smma_mem_arch.sv
./obj_dir/Vtb_smma_mem_arch
```

| testbench             | what it checks                                                            |
|-----------------------|---------------------------------------------------------------------------|
| `tb_smm_ram`          | read latency, hold of read data, random read/write against a reference    |
| `tb_smm_lane_unit`    | base+imm addressing and wrap, nothing accepted under stall, result timing |
| `tb_l1_dcache`        | data, exact stall length of hits, clean and dirty misses, write-back counts |
| `tb_smma_mem_arch`    | the whole design at its default size: random 8-lane bundles with cache misses, then a 10×10 multiply; counts 8-wide bundles, hits, stalls, write-backs and SMM results held across a stall |
| `tb_workload_matmul`  | 10×10, 16×16 and 32×32 multiplies on this design and on a 32 KB cache-only baseline; cycles, access counts and energy |
| `tb_workload_sad`     | block matching (sum of absolute differences), SMM design against baseline |
| `tb_workload_kmp`     | KMP string search, SMM design against baseline; matches against a direct search |
| `tb_workload_dft`     | 64-point integer DFT and its inverse, SMM design against baseline; round trip |

Control registers have an asynchronous active-low reset (`rst_n`). The SMM and
cache data arrays are not reset: software fills an SMM before it reads it, and
cache data is used only under a valid tag.

## Workload results

The workload testbenches play an 8-issue core whose arithmetic always fits in
free issue slots, so they measure memory-bound execution only. Each kernel runs
twice. The first run uses this design at its defaults, with the preamble that
copies data into the SMMs counted. The second uses a cache-only baseline: the
same module with a 32 KB cache and the SMMs unused. The next memory level grants
after 2 wait cycles. Energy counts only the accesses the core issues, at these
per-access costs for 65 nm: 16 KB cache 24.51/26.05 pJ (read/write), 32 KB cache
41.97/38.10 pJ, 2 KB SMM 3.80/7.05 pJ. The sizes of SAD, KMP and the DFT are
this test suite's own choices. SAD and KMP cycle counts depend on the random
data and vary a little from one simulator seed to another.

| kernel             | cycles, baseline | cycles, SMM | speed-up | energy vs. baseline |
|--------------------|------------------|-------------|----------|---------------------|
| matmul 10×10       | 2136             | 1457        | 1.46     | 26 %                |
| matmul 16×16       | 6912             | 3905        | 1.77     | 20 %                |
| matmul 32×32       | 44032            | 17665       | 2.49     | 15 %                |
| SAD 16×16, 6 cand. | 7296             | 6017        | 1.21     | 39 %                |
| KMP, 1500 chars    | 9664             | 7125        | 1.35     | 26 %                |
| DFT + inverse, 64  | 29760            | 7009        | 4.24     | 9 %                 |

Full-processor simulations of this architecture report, relative to a
baseline with a 32 KB cache, speed-ups of 1.15, 2.28 and 1.34 for the three
matrix sizes, 1.24 for SAD, 1.00 for KMP, 1.03 for DFT and 1.08 for the
inverse transform. The energies they report are 0.21–0.57 of the baseline.
Energy falls in the same direction here. The speed-ups here are larger because
a real core also spends cycles on arithmetic, on branches and on the
dependences between them (KMP above all). Compiler choices such as loop
unrolling matter there too. A memory-only model leaves all of this out.

## Departures and limits

* Word (32-bit) accesses only; no byte or half-word loads and stores.
* The cache organisation, the line size, the next-level protocol and the stall
  protocol are choices made for this RTL, not part of the architecture.
* Lane 0 issues one memory operation per bundle, either to its SMM or to the
  cache.
* The SMM arrays and the cache arrays are plain SystemVerilog arrays. For a
  chip they would be replaced by SRAM macros with the same single-port
  behaviour.
