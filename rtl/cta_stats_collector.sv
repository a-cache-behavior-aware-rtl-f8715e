// cta_stats_collector: statistics of the one CTA that the prediction core
// runs alone at the start of a kernel.
//
// After arm (a kernel launch) the collector waits for the first CTA start on
// the prediction core, counts that core's events until the CTA ends, then
// presents the totals on stats with a one-cycle stats_valid pulse. Counted
// are L1 data cache accesses, DRAM reads, warp instructions and memory
// access latency (sum and number of samples, for the average), which is what
// the prediction core hands to the predictor. The working set of the CTA,
// which the prediction model also needs, is measured here as the number of
// distinct 128-byte lines touched: each line address is hashed (low bits
// XOR the next bits) into a FP_BITS-bit index of a bitmap; a clear bit is a
// line not seen before. Hash collisions make this a lower bound. The bitmap
// is held as words with a valid bit each, so arm clears it in one cycle.
// The bitmap, its size and the hash are this design's choice; the document
// names the statistics but not how they are gathered.
//
// Timing: one event of each kind per cycle; counters saturate at 2^32-1.
// stats_valid rises the cycle after cta_end.
module cta_stats_collector
  import md_pkg::*;
#(
  parameter int FP_BITS   = 12,  // footprint bitmap of 2^FP_BITS lines
  parameter int LINE_BITS = 7    // 128-byte cache lines
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,          // kernel launched: clear and wait
  input  logic        cta_start,    // a CTA was dispatched to the prediction core
  input  logic        cta_end,      // the prediction core finished a CTA
  input  logic        mem_access,   // L1 data cache access
  input  logic [31:0] mem_addr,     // its byte address
  input  logic        dram_read,    // an L1 miss read DRAM
  input  logic        lat_valid,    // a memory access completed
  input  logic [15:0] lat_cycles,   // its latency
  input  logic        warp_inst,    // a warp instruction issued
  output logic        collecting,
  output logic        stats_valid,
  output cta_stats_t  stats
);
  localparam int WORD_BITS = 6;                    // 64-bit bitmap words
  localparam int NWORDS    = 1 << (FP_BITS - WORD_BITS);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN} state_e;
  state_e state;

  logic [63:0]       fp_mem [NWORDS];
  logic [NWORDS-1:0] fp_vld;

  logic [FP_BITS-1:0] line_idx;
  logic [FP_BITS-WORD_BITS-1:0] widx;
  logic [WORD_BITS-1:0] bidx;
  logic [63:0] word_rd;
  logic        first_touch;
  logic [31:0] line_addr;

  always_comb begin
    line_addr   = mem_addr >> LINE_BITS;
    line_idx    = line_addr[FP_BITS-1:0] ^ line_addr[2*FP_BITS-1:FP_BITS];
    widx        = line_idx[FP_BITS-1:WORD_BITS];
    bidx        = line_idx[WORD_BITS-1:0];
    word_rd     = fp_vld[widx] ? fp_mem[widx] : 64'd0;
    first_touch = !word_rd[bidx];
  end

  function automatic cnt_t sat_inc(cnt_t v, logic en);
    return (en && v != '1) ? v + 1'b1 : v;
  endfunction

  function automatic cnt_t sat_add(cnt_t v, logic [15:0] a, logic en);
    logic [32:0] s;
    s = {1'b0, v} + 33'(a);
    return !en ? v : (s[32] ? '1 : s[31:0]);
  endfunction

  logic counting;
  assign counting   = (state == S_RUN);
  assign collecting = counting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      stats       <= '0;
      stats_valid <= 1'b0;
      fp_vld      <= '0;
    end else begin
      stats_valid <= 1'b0;
      if (arm) begin
        state  <= S_ARMED;
        stats  <= '0;
        fp_vld <= '0;
      end else begin
        case (state)
          S_ARMED: if (cta_start) state <= S_RUN;
          S_RUN: begin
            stats.accesses   <= sat_inc(stats.accesses, mem_access);
            stats.dram_reads <= sat_inc(stats.dram_reads, dram_read);
            stats.warp_insts <= sat_inc(stats.warp_insts, warp_inst);
            stats.lat_cnt    <= sat_inc(stats.lat_cnt, lat_valid);
            stats.lat_sum    <= sat_add(stats.lat_sum, lat_cycles, lat_valid);
            stats.ws_lines   <= sat_inc(stats.ws_lines, mem_access && first_touch);
            if (mem_access) fp_vld[widx] <= 1'b1;
            if (cta_end) begin
              state       <= S_IDLE;
              stats_valid <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // bitmap storage: a word is rewritten with the new bit set
  always_ff @(posedge clk) begin
    if (counting && !arm && mem_access)
      fp_mem[widx] <= word_rd | (64'd1 << bidx);
  end

  // one result per armed kernel: stats_valid is a single-cycle pulse
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                  stats_valid |=> !stats_valid);
endmodule
