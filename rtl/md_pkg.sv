// md_pkg: types and constants shared by the multithreading-degree (MD)
// decision hardware.
//
// Rates and miss rates are unsigned fixed point with FRAC = 12 fraction
// bits (1.0 = 4096). The growing rates and thresholds below are the values
// the decision scheme is defined with (latency growing rates 1.03 / 1.1 /
// 1.9 / 1.75, pipeline ratios 1.05 / 1.1 / 1.2, miss-rate bounds 0.15 /
// 0.3 / 0.85, miss-rate deltas 0.1 / 0.04, memory-bound ratio 0.05),
// rounded to the nearest 1/4096. The fixed-point format itself, the counter
// widths and the struct layouts are this design's own choices.
package md_pkg;

  localparam int FRAC = 12;
  localparam int ONE  = 1 << FRAC;

  typedef logic [FRAC:0]   frac_t;   // 0.0 .. 1.0, e.g. a miss rate
  typedef logic [15:0]     rate_t;   // Q4.12 growing rate (>= 1.0)
  typedef logic [31:0]     cnt_t;    // event counter

  // memory latency growing rates (prediction stage 2)
  localparam rate_t LAT_RATE_EDGE  = 16'd4219;  // 1.03: miss < 0.15 or > 0.85
  localparam rate_t LAT_RATE_MID   = 16'd4506;  // 1.1 : 0.15 <= miss < 0.3, and default
  localparam rate_t LAT_RATE_WS5   = 16'd7782;  // 1.9 : ws > 5 x cache, dmiss > 0.1
  localparam rate_t LAT_RATE_WS15  = 16'd7168;  // 1.75: ws > 15 x cache, dmiss > 0.04

  // pipeline adverse effect ratios (prediction stage 3)
  localparam rate_t PIPE_RATE_FIT  = 16'd4301;  // 1.05: working set fits in cache
  localparam rate_t PIPE_RATE_MID  = 16'd4506;  // 1.1
  localparam rate_t PIPE_RATE_BIG  = 16'd4915;  // 1.2 : DRAM reads per CTA > 5 x cache

  // miss-rate thresholds
  localparam frac_t MISS_015 = 13'd614;
  localparam frac_t MISS_030 = 13'd1229;
  localparam frac_t MISS_085 = 13'd3482;
  localparam frac_t DMISS_010 = 13'd410;
  localparam frac_t DMISS_004 = 13'd164;

  // memory-bound test: DRAM reads / warp instructions >= 0.05 = 1/20
  localparam int MEM_BOUND_DIV = 20;

  // Kernel launch parameters, as the CTA scheduler receives them.
  typedef struct packed {
    logic [15:0] num_ctas;        // CTAs in the grid
    logic [5:0]  warps_per_cta;   // 1..48
    logic [15:0] regs_per_cta;    // registers used by one CTA
    logic [10:0] threads_per_cta; // 1..1536
    logic [16:0] smem_per_cta;    // shared memory bytes used by one CTA
  } kernel_cfg_t;

  // Statistics of the single profiled CTA.
  typedef struct packed {
    cnt_t accesses;    // L1 data cache accesses
    cnt_t dram_reads;  // L1 misses that read DRAM
    cnt_t warp_insts;  // warp instructions issued
    cnt_t ws_lines;    // distinct cache lines touched (working set)
    cnt_t lat_sum;     // sum of memory access latencies, cycles
    cnt_t lat_cnt;     // number of latency samples
  } cta_stats_t;

endpackage
