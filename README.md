# Cache-behaviour-aware multithreading degree control for a GPGPU

A GPGPU shader core hides memory latency by keeping many warps resident. The
warps come in thread blocks (CTAs), and the number of resident warps is the
*multithreading degree* (MD). On kernels with heavy, irregular memory traffic,
a high degree can cost more than it gains. The CTAs then compete for a small
private L1 data cache. Lines get evicted before they are re-used, DRAM reads
go up, memory latency grows, and each CTA runs longer. Past some point the
extra parallelism no longer pays for this. That point depends on the kernel.

This RTL picks the degree again at each kernel launch. It does this in
hardware and needs no offline profiling:

1. **Profile.** One shader core, the *prediction core*, runs the kernel's
   first CTA on its own. The other cores start at the default degree, which
   is the full 8-CTA buffer. While that CTA runs, the core counts its L1
   accesses, DRAM reads, warp instructions, memory latency and the number of
   distinct cache lines it touches (its working set).
2. **Predict.** When that CTA retires, the *predictor* estimates how one
   CTA would behave if n CTAs shared the cache, for n = 1 up to 8. It does
   this in three stages: DRAM reads, memory latency growth and pipeline
   slowdown. It then picks the n with the best predicted throughput.
3. **Apply.** The *MD controller* inside the central CTA scheduler sets the
   new CTA limit on every core. The scheduler uses it for the rest of the
   kernel.

The published evaluation of this scheme, on a cycle-level simulator of a
15-core Fermi-class GPU with L2 disabled, reports two results:

- about 60 % more IPC on average on memory-intensive irregular benchmarks;
- no loss on compute-bound or well-tuned benchmarks, which keep a high degree.

These numbers belong to that evaluation. They have not been reproduced with
this RTL (see *How far to trust it*).

## Block diagram

```
 launch, kernel cfg ──►┌──────────────── gpgpu_md_top ─────────────────────┐
                       │  cta_scheduler ◄── core_limit ── md_controller    │
  disp_valid/core/cta ◄┤   (resource limit, round-robin       ▲            │
  cta_done[15] ───────►│    dispatch, retirement count)       │ md_ctas    │
                       │                                      │            │
  pc_* events of ─────►│  cta_stats_collector ──stats──► md_predictor      │
  prediction core      │   (counters, line-footprint   ┌───────────────┐   │
                       │    bitmap)                    │dram_read_pred.│   │
                       │                               │latency_pred.  │   │
                       │                               │pipeline_pred. │   │
                       │                               │seq_divider    │   │
                       │                               └───────────────┘   │
                       └───────────────────────────────────────────────────┘
```

The shader cores are outside this unit. So are their warp schedulers, L1
caches, the interconnect and DRAM. The cores take CTAs from `disp_*`, pulse
`cta_done[c]` when a CTA retires, and obey `core_limit[c]`, which acts as the
core's effective CTA buffer size. The prediction core also reports its events
on the `pc_*` inputs.

## The prediction

This is the part that needs the most care. All quantities use unsigned fixed
point with 12 fraction bits (1.0 = 4096), defined in `md_pkg`. Let:

- m1 = measured miss rate = DRAM reads / L1 accesses of the profiled CTA;
- ws = working set of one CTA, in cache lines;
- C = L1 capacity in lines (`L1_LINES`, 256 for 32 KB of 128-byte lines).

**Memory-bound test.** If DRAM reads / warp instructions < 0.05, the kernel
counts as computation bound. It gets the largest degree its resources allow,
and the three stages are skipped.

**Stage 1: DRAM reads (`dram_read_predictor`).** This stage predicts the miss
rate with n resident CTAs. It uses a two-segment curve in the total working
set n·ws:

```
n·ws <= C :  m(n) = m1
n·ws >  C :  m(n) = m1 + (1 - m1) · (1 - C/(n·ws))
```

The fraction 1 − C/(n·ws) of the lines cannot stay in the cache. A line is
re-used with probability 1 − m1, the profile's hit rate. Each re-use of an
evicted line turns a hit into a DRAM read. The predicted DRAM reads per CTA
are accesses · m(n). The rate at which DRAM reads grow from one degree to the
next is dr(n)/dr(n−1) = m(n)/m(n−1).

The scheme fits a segmented curve to the miss rate, cache capacity and
working set, but the fitted curve itself is not published. **This curve is
this design's own.** It comes from the eviction and re-use argument above and
has no fitted constants. On the one published series it can be checked
against (nbf, 8 KB L1, 65-line CTAs, miss rate 0.19 alone), it predicts 0.60
at 2 CTAs and 0.90 at 8 CTAs. The measured values are about 0.62 and 0.93.
For bfs it rises too fast: it predicts 0.77 at 2 CTAs where about 0.56 was
measured.

**Stage 2: memory latency growth (`latency_predictor`).** For the step from
n−1 to n CTAs, with m = m(n) and Δm = m(n) − m(n−1):

| condition (tested in this order)              | rate  |
|-----------------------------------------------|-------|
| m < 0.15 or m > 0.85                          | 1.03  |
| m < 0.3                                       | 1.1   |
| n·ws > 5·C and Δm > 0.1                       | 1.9   |
| n·ws > 15·C and Δm > 0.04                     | 1.75  |
| otherwise                                     | 1.1   |

**Stage 3: pipeline adverse effect (`pipeline_predictor`).** When more warps
compete for the pipeline than its latencies need, each warp slows down a
little:

| condition                                     | ratio |
|-----------------------------------------------|-------|
| n·ws < C                                      | 1.05  |
| predicted DRAM reads per CTA > 5·C            | 1.2   |
| otherwise                                     | 1.1   |

**Choice (`md_predictor`).** The execution time of one CTA is predicted
relative to a lone CTA, step by step:

```
T(1) = 1,   T(n) = T(n-1) · m(n)/m(n-1) · lat(n) · pipe(n)
```

This rests on the observation that the growth of CTA run time is roughly the
product of three things: the growth of DRAM reads, the growth of latency and
a pipeline factor. The predicted throughput is n / T(n). The hardware keeps
the running product G(n) of the latency and pipeline rates and compares
candidates as n_a · m(n_b) · G(n_b) against n_b · m(n_a) · G(n_a). This
needs no division. On a tie the smaller degree wins. Candidates run from 1
up to min(8, resource limit).

The stage rules and constants are the published ones. The following are
readings of this design, because the text leaves them open:

- the working set in stage 2 is that of all n CTAs;
- combining the stages as a product and choosing by n/T(n);
- giving a computation-bound kernel the maximum degree.

The analysis part of the source words the 1.2 pipeline case differently:
"working set above 5× the cache, or DRAM reads close to the warp
instructions". This design follows the scheme description instead: "DRAM
reads per CTA above 5× the cache".

## Statistics of the profiled CTA (`cta_stats_collector`)

A kernel launch arms the collector. Counting starts when the first CTA is
dispatched to the prediction core and stops when that core retires a CTA.
The collector then pulses `stats_valid`. Because the core is held to one CTA
during this phase, every event belongs to the profiled CTA. All counters are
32-bit and saturating.

The working set is measured with a 4096-bit bitmap. Each line address is
hashed: its low 12 bits are XORed with the next 12 bits. The first touch of
a clear bit counts one line. Distinct lines that collide are counted once,
so the result is a lower bound. The bitmap is stored as 64 words, each with
a valid bit, so a launch clears it in one cycle. How the working set is
measured is this design's choice.

`pc_mem_access` should pulse for each L1 data access the miss rate is meant
to cover. In the published configuration the L1 is read-only and stores
bypass it, so these are loads.

## CTA scheduler and MD controller

At launch, `cta_scheduler` latches the kernel shape and computes the
resource limit. This is the largest k ≤ 8 for which k CTAs fit the core's
budget of 32768 registers, 1536 threads and 48 KB of shared memory.
Dispatch then proceeds as follows:

- at most one CTA per cycle;
- round robin, starting with the core after the last one served;
- only to a core whose resident count is below both its `core_limit` and the
  resource limit.

`kernel_done` pulses when every CTA has been dispatched and retired.

`md_controller` gives the limits. While profiling, the prediction core's
limit is 1 and every other core's is min(8, resource limit). After the
decision, every core's limit is min(predicted degree, resource limit). A core
above its new limit keeps its resident CTAs and gets no new ones until it
drops below the limit. A launch is ignored while a kernel is running or while
the decision for the last kernel is still being worked out (a short kernel
can end before its prediction core's CTA has been evaluated).

## Interface and timing of `gpgpu_md_top`

- `launch` + `cfg` (`kernel_cfg_t`): the launch is accepted when `busy` is
  low. `busy` covers the running kernel and any decision still pending. Dispatches can start the next cycle.
- `disp_valid`, `disp_core`, `disp_cta`: a registered, one-cycle dispatch
  strobe.
- `cta_done[c]`: retires one CTA of core c.
- `core_limit[c]`: the effective CTA buffer size of each core.
- `pc_mem_access`, `pc_mem_addr`, `pc_dram_read`, `pc_lat_valid`,
  `pc_lat_cycles`, `pc_warp_inst`: events of the prediction core, at most
  one of each per cycle.
- `md_valid` pulses once per kernel, with:
  - `md_ctas`, and `md_warps` = `md_ctas` × warps per CTA;
  - `compute_bound`;
  - the measured `miss_rate` (Q.12), `avg_latency` and `ws_lines`.
- The decision arrives about 100 + 36·(candidates) cycles after the profiled
  CTA retires. That is at most about 400 cycles. The time is spent in two
  serial dividers: 48 cycles each for the miss rate and the average latency,
  and 32 cycles per candidate inside stage 1.
- Reset is asynchronous and active low (`rst_n`).

Parameters and their defaults:

| parameter        | default | origin |
|------------------|---------|--------|
| `NUM_CORES`      | 15      | published machine |
| `MAX_CTA`        | 8       | published machine |
| `REGS_PER_CORE`  | 32768   | published machine |
| `THREADS_PER_CORE` | 1536  | published machine |
| `L1_LINES`       | 256 (32 KB) | 32 KB L1 of the motivating experiments. The evaluation sweeps 8–128 KB (64–1024 lines) |
| `SMEM_PER_CORE`  | 49152   | assumed (Fermi-class 48 KB) |
| `PRED_CORE`      | 0       | assumed |
| `FP_BITS`        | 12      | assumed, footprint bitmap of 4096 lines |

## How far to trust it

- **Published rules.** The rule tables of stages 2 and 3, the memory-bound
  threshold, the profile-then-apply flow, and the limits used during and
  after profiling are taken as published. Every block is checked against an
  independent integer model of these rules (`tb/md_ref_pkg.sv`).
- **Own parts.** Stage 1's curve, the way the stages are combined, the
  working-set measurement, the dispatch order and all timing belong to this
  design.
- **Published profiles.** `tb_inlab_profiles` feeds the predictor the
  published single-CTA profiles of bfs and nbf. These are miss rate and DRAM
  reads per CTA, with a working set of about 70 and 65 lines. The design
  picks the published degree in 1 of 4 cases:

  | profile | 8 KB (64 lines)         | 32 KB (256 lines)       |
  |---------|-------------------------|-------------------------|
  | nbf     | 1 (published 1)         | 4 (published 1)         |
  | bfs     | 7 (published 4)         | 3 (published 4)         |

  Stage 1's curve is the likely cause. The cache size of those profiles is
  not stated, so both sizes were tried. The 60 % IPC figure should therefore
  **not** be expected from this RTL as it stands. Stage 1 is the module to
  replace with a better-fitted curve, and the rest of the pipeline does not
  depend on its form.
- **Pipeline effect in the analysis.** That part of the source also argues
  that about 10 warps cover the ALU latencies. This design has no such rule,
  because the scheme description has none either.

## Not included

These parts come unchanged from the baseline GPU and are not given in enough
detail to build:

- the shader core pipeline and its CTA buffer;
- the greedy-then-oldest warp scheduler;
- the 4-way read-only L1 data cache;
- the interconnect;
- the L2 cache, which is disabled throughout the evaluation;
- the DRAM controllers.

The end-to-end testbench models the cores behaviourally. It gives each
resident CTA a countdown timer. For the profiled CTA, it models a
direct-mapped L1 with fixed hit latency and random miss latency.

## Simulating

Everything is plain SystemVerilog-2017. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/md_pkg.sv tb/md_ref_pkg.sv tb/tb_gpgpu_md_top.sv --top-module tb_gpgpu_md_top
./obj_dir/Vtb_gpgpu_md_top
```

Replace `tb_gpgpu_md_top` with any testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench                | what it exercises |
|--------------------------|-------------------|
| `tb_gpgpu_md_top`        | Whole unit at default size. Four kernels: a cache-thrashing one (degree drops), a computation-bound one (degree stays 8), a register-limited one (4 CTAs) and a short one that ends before its decision is ready. Checks the decision against the reference, the prediction core held to one CTA while profiling, every core's limit afterwards, no dispatch to a full core, each CTA dispatched once, and that a launch during a kernel or a pending decision is ignored |
| `tb_md_predictor`        | 300+ random profiles and the directed cases, against the reference |
| `tb_dram_read_predictor` | Stage 1 against the reference, 35-cycle latency |
| `tb_latency_predictor`, `tb_pipeline_predictor` | Every rule and boundary, plus random operands |
| `tb_cta_stats_collector` | Counting window, exact working set, clear on launch |
| `tb_md_controller`       | Limits in each phase |
| `tb_cta_scheduler`       | Resource limits, round robin, limit lowered mid-kernel, completion |
| `tb_inlab_profiles`      | Published benchmark profiles; prints the chosen and published degrees |

To study another cache size, override `L1_LINES` on `gpgpu_md_top`, or drive
`cache_lines` on `md_predictor` directly. To try another DRAM-read model,
replace the evaluation in `dram_read_predictor`. It must keep the
start/done handshake and its three outputs.
