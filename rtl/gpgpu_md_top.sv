// gpgpu_md_top: cache-behaviour-aware multithreading-degree control for a
// GPGPU. The CTA scheduler, with the Multithreading Degree (MD) controller
// inside it, and the Predictor of the prediction core, wired as one unit
// that sits between the kernel launch and the shader cores.
//
// Flow per kernel: launch -> the scheduler starts dispatching; the
// prediction core (PRED_CORE) may hold one CTA, all others the default
// degree (MAX_CTA CTAs). The statistics collector profiles the prediction
// core's first CTA; when that CTA retires, the predictor works out the
// degree with the best predicted throughput and the MD controller applies it
// to every core for the rest of the kernel. The next launch starts over.
// A launch is taken only while busy is low: no kernel running and no
// decision pending, so a decision always lands on the kernel it was
// measured on, even when a short kernel ends before its prediction does.
// That guard is this design's; the document does not mention it.
//
// The shader cores, their warp schedulers, L1 data caches, the
// interconnect and DRAM are outside this unit: the cores take disp_*,
// report cta_done, and the prediction core reports its memory and issue
// events on the pc_* inputs. core_limit is each core's effective CTA buffer
// size; md_warps is the chosen degree in warps (CTAs x warps per CTA).
// The default sizes are those of the document's main configuration:
// 15 cores, 8 CTAs per core, 32768 registers and 1536 threads per core,
// a 32 KB L1 data cache of 128-byte lines (256 lines). The 48 KB shared
// memory budget and the 4096-line footprint bitmap are this design's.
module gpgpu_md_top
  import md_pkg::*;
#(
  parameter int NUM_CORES        = 15,
  parameter int MAX_CTA          = 8,
  parameter int PRED_CORE        = 0,
  parameter int L1_LINES         = 256,
  parameter int REGS_PER_CORE    = 32768,
  parameter int THREADS_PER_CORE = 1536,
  parameter int SMEM_PER_CORE    = 49152,
  parameter int FP_BITS          = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // kernel launch
  input  logic        launch,
  input  kernel_cfg_t cfg,
  output logic        busy,          // kernel running or decision pending
  output logic        kernel_done,
  // CTA dispatch to and retirement from the shader cores
  output logic        disp_valid,
  output logic [$clog2(NUM_CORES)-1:0] disp_core,
  output logic [15:0] disp_cta,
  input  logic [NUM_CORES-1:0] cta_done,
  output logic [3:0]  core_limit [NUM_CORES],
  // events of the prediction core
  input  logic        pc_mem_access,
  input  logic [31:0] pc_mem_addr,
  input  logic        pc_dram_read,
  input  logic        pc_lat_valid,
  input  logic [15:0] pc_lat_cycles,
  input  logic        pc_warp_inst,
  // decision
  output logic        profiling,
  output logic        tuned,
  output logic        md_valid,
  output logic [3:0]  md_ctas,
  output logic [9:0]  md_warps,
  output logic        compute_bound,
  output frac_t       miss_rate,
  output logic [15:0] avg_latency,
  output cnt_t        ws_lines,
  output logic [3:0]  res_limit
);
  localparam int CW = $clog2(NUM_CORES);

  logic        launch_acc, sched_busy;
  kernel_cfg_t cfg_r;
  logic [3:0]  active [NUM_CORES];
  logic        stats_valid, collecting, pred_busy;
  cta_stats_t  stats;
  logic [3:0]  md_applied;

  // a launch waits until the previous kernel's decision is out, so that a
  // late decision can never be applied to the next kernel
  assign busy       = sched_busy || collecting || stats_valid || pred_busy;
  assign launch_acc = launch && !busy;

  cta_scheduler #(
    .NUM_CORES (NUM_CORES), .MAX_CTA (MAX_CTA),
    .REGS_PER_CORE (REGS_PER_CORE), .THREADS_PER_CORE (THREADS_PER_CORE),
    .SMEM_PER_CORE (SMEM_PER_CORE)
  ) u_sched (
    .clk, .rst_n,
    .launch      (launch_acc),
    .cfg         (cfg),
    .core_limit  (core_limit),
    .cta_done    (cta_done),
    .busy        (sched_busy),
    .cfg_r       (cfg_r),
    .res_limit   (res_limit),
    .disp_valid  (disp_valid),
    .disp_core   (disp_core),
    .disp_cta    (disp_cta),
    .active      (active),
    .kernel_done (kernel_done)
  );

  md_controller #(
    .NUM_CORES (NUM_CORES), .MAX_CTA (MAX_CTA), .PRED_CORE (PRED_CORE)
  ) u_mdc (
    .clk, .rst_n,
    .launch     (launch_acc),
    .res_limit  (res_limit),
    .md_valid   (md_valid),
    .md_ctas    (md_ctas),
    .core_limit (core_limit),
    .profiling  (profiling),
    .tuned      (tuned),
    .md_applied (md_applied)
  );

  cta_stats_collector #(.FP_BITS (FP_BITS)) u_stats (
    .clk, .rst_n,
    .arm         (launch_acc),
    .cta_start   (disp_valid && disp_core == CW'(PRED_CORE)),
    .cta_end     (cta_done[PRED_CORE]),
    .mem_access  (pc_mem_access),
    .mem_addr    (pc_mem_addr),
    .dram_read   (pc_dram_read),
    .lat_valid   (pc_lat_valid),
    .lat_cycles  (pc_lat_cycles),
    .warp_inst   (pc_warp_inst),
    .collecting  (collecting),
    .stats_valid (stats_valid),
    .stats       (stats)
  );

  md_predictor #(.MAX_CTA (MAX_CTA)) u_pred (
    .clk, .rst_n,
    .start         (stats_valid),
    .stats         (stats),
    .cache_lines   (16'(L1_LINES)),
    .max_md        (res_limit),
    .warps_per_cta (cfg_r.warps_per_cta),
    .busy          (pred_busy),
    .md_valid      (md_valid),
    .md_ctas       (md_ctas),
    .md_warps      (md_warps),
    .compute_bound (compute_bound),
    .miss_rate     (miss_rate),
    .avg_latency   (avg_latency)
  );

  assign ws_lines = stats.ws_lines;

  // A core never holds more CTAs than the kernel's resources allow.
  property p_within_limit;
    @(posedge clk) disable iff (!rst_n)
      disp_valid |-> active[disp_core] <= res_limit;
  endproperty
  a_within_limit: assert property (p_within_limit);
endmodule
