// md_predictor: the Predictor that sits on the prediction core. When the
// profiled CTA has finished, it turns that CTA's statistics into the
// multithreading degree (in CTAs per core) that all cores use for the rest
// of the kernel.
//
// Steps, in the order of the decision flow:
//  1. measured miss rate m1 = DRAM reads / L1 accesses, and the average
//     memory latency = latency sum / samples (reported, not used by the
//     rules), both with one shared serial divider;
//  2. memory-bound test: DRAM reads / warp instructions >= 0.05. A
//     computation-bound kernel gets the largest degree the core allows;
//  3. for n = 1 .. max_md: stage 1 (dram_read_predictor) gives m(n), the
//     DRAM reads per CTA and the working set of n CTAs; stage 2
//     (latency_predictor) and stage 3 (pipeline_predictor) give the rates
//     of the step from n-1 to n.
//  4. The execution time of one CTA is predicted relative to n = 1 as
//       T(n) = T(n-1) * dr_inc(n) * lat_rate(n) * pipe_rate(n),
//     with dr_inc(n) = dr(n)/dr(n-1), i.e. T(n) ~ m(n) * G(n) where G is
//     the running product of the latency and pipeline rates. The chosen
//     degree maximises throughput n / T(n), compared by cross
//     multiplication so no division is needed; a tie keeps the smaller n.
// The three stages, their rules and the memory-bound test are the
// document's. Combining them as the product above follows its analysis of
// CTA execution time as the product of DRAM-read increase, latency growth
// and pipeline effect; choosing by n / T(n) and the computation-bound
// outcome are this design's reading.
//
// Interface: start (the collector's stats_valid) latches stats; md_valid
// pulses once with md_ctas, md_warps = md_ctas * warps_per_cta, the
// computation-bound flag, m1 and the average latency. It takes about
// 100 + 36 * max_md cycles. Fixed point as in md_pkg (12 fraction bits).
module md_predictor
  import md_pkg::*;
#(
  parameter int MAX_CTA = 8    // CTA buffer size of a shader core
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cta_stats_t  stats,
  input  logic [15:0] cache_lines,     // L1 capacity, lines
  input  logic [3:0]  max_md,          // resource limit of the kernel, CTAs
  input  logic [5:0]  warps_per_cta,
  output logic        busy,
  output logic        md_valid,
  output logic [3:0]  md_ctas,
  output logic [9:0]  md_warps,
  output logic        compute_bound,
  output frac_t       miss_rate,       // measured m1
  output logic [15:0] avg_latency      // cycles
);
  localparam int GW = 40;              // width of the running product G

  typedef enum logic [2:0] {S_IDLE, S_M1, S_LAT, S_DRP, S_EVAL, S_DONE} state_e;
  state_e state;

  cta_stats_t st;
  logic [3:0] n_lim;

  // shared divider
  logic        div_start, div_busy, div_done;
  logic [47:0] div_a, div_b, div_q;

  seq_divider #(.W(48)) u_div (
    .clk, .rst_n,
    .start (div_start), .dividend (div_a), .divisor (div_b),
    .busy  (div_busy),  .done (div_done), .quotient (div_q)
  );

  // stage 1..3
  logic        drp_start, drp_done;
  logic [3:0]  n;
  frac_t       m_n, m_prev;
  cnt_t        dr_n, ws_md;
  rate_t       lat_rate, pipe_rate;

  dram_read_predictor u_drp (
    .clk, .rst_n,
    .start (drp_start), .n (n), .m1 (miss_rate),
    .accesses (st.accesses), .ws_lines (st.ws_lines), .cache_lines (cache_lines),
    .done (drp_done), .m_n (m_n), .dr_n (dr_n), .ws_md (ws_md)
  );

  latency_predictor u_lat (
    .m_n (m_n), .m_prev (m_prev), .ws_md (ws_md), .cache_lines (cache_lines),
    .lat_rate (lat_rate)
  );

  pipeline_predictor u_pipe (
    .ws_md (ws_md), .dr_n (dr_n), .cache_lines (cache_lines),
    .pipe_rate (pipe_rate)
  );

  // throughput comparison
  logic [GW-1:0]   g_r, g_new;
  logic [GW+31:0]  g_prod;
  logic [GW+12:0]  cost, best_cost;
  logic [GW+16:0]  lhs, rhs;
  logic [3:0]      best_n;
  logic            better;
  frac_t           m_eff;

  always_comb begin
    g_prod = (72'(g_r) * 72'(lat_rate) * 72'(pipe_rate)) >> (2 * FRAC);
    if (n == 4'd1)
      g_new = GW'(ONE);
    else
      g_new = (g_prod[GW+31:GW] != 0) ? '1 : g_prod[GW-1:0];
    m_eff  = (m_n == 0) ? frac_t'(1) : m_n;
    cost   = (GW+13)'(g_new) * (GW+13)'(m_eff);
    lhs    = (GW+17)'(n) * (GW+17)'(best_cost);   // n / cost > best_n / best_cost
    rhs    = (GW+17)'(best_n) * (GW+17)'(cost);
    better = (n == 4'd1) || (lhs > rhs);
  end

  logic [36:0] dr20;
  assign dr20 = 37'(st.dram_reads) * 37'(MEM_BOUND_DIV);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      st            <= '0;
      n_lim         <= 4'd1;
      div_start     <= 1'b0;
      div_a         <= '0;
      div_b         <= '0;
      drp_start     <= 1'b0;
      n             <= 4'd1;
      m_prev        <= '0;
      g_r           <= '0;
      best_cost     <= '0;
      best_n        <= 4'd1;
      md_valid      <= 1'b0;
      md_ctas       <= 4'(MAX_CTA);
      md_warps      <= '0;
      compute_bound <= 1'b0;
      miss_rate     <= '0;
      avg_latency   <= '0;
    end else begin
      div_start <= 1'b0;
      drp_start <= 1'b0;
      md_valid  <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          st        <= stats;
          n_lim     <= (max_md == 0) ? 4'd1 :
                       (max_md > 4'(MAX_CTA)) ? 4'(MAX_CTA) : max_md;
          div_a     <= 48'(stats.dram_reads) << FRAC;
          div_b     <= 48'(stats.accesses);
          div_start <= 1'b1;
          state     <= S_M1;
        end
        S_M1: if (div_done) begin
          if (st.accesses == 0)       miss_rate <= '0;
          else if (div_q > 48'(ONE))  miss_rate <= frac_t'(ONE);
          else                        miss_rate <= div_q[FRAC:0];
          div_a     <= 48'(st.lat_sum);
          div_b     <= 48'(st.lat_cnt);
          div_start <= 1'b1;
          state     <= S_LAT;
        end
        S_LAT: if (div_done) begin
          avg_latency <= (st.lat_cnt == 0) ? 16'd0 :
                         (div_q[47:16] != 0) ? 16'hffff : div_q[15:0];
          if (dr20 < 37'(st.warp_insts)) begin
            compute_bound <= 1'b1;
            best_n        <= n_lim;
            state         <= S_DONE;
          end else begin
            compute_bound <= 1'b0;
            n             <= 4'd1;
            drp_start     <= 1'b1;
            state         <= S_DRP;
          end
        end
        S_DRP: if (drp_done) state <= S_EVAL;
        S_EVAL: begin
          m_prev <= m_n;
          g_r    <= g_new;
          if (better) begin
            best_n    <= n;
            best_cost <= cost;
          end
          if (n >= n_lim) begin
            state <= S_DONE;
          end else begin
            n         <= n + 4'd1;
            drp_start <= 1'b1;
            state     <= S_DRP;
          end
        end
        S_DONE: begin
          md_ctas  <= best_n;
          md_warps <= 10'(best_n) * 10'(warps_per_cta);
          md_valid <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_md_range: assert property (@(posedge clk) disable iff (!rst_n)
                               md_valid |-> (md_ctas >= 4'd1 && md_ctas <= 4'(MAX_CTA)));
endmodule
