// dram_read_predictor: stage 1 of the decision scheme. Given the profile of
// one CTA run alone, it predicts the L1 miss rate and the DRAM reads per
// CTA when n CTAs share the L1 data cache.
//
// Model (a two-segment curve in the total working set n*ws):
//   n*ws <= C : m(n) = m1                       (everything still fits)
//   n*ws >  C : m(n) = m1 + (1 - m1) * (1 - C / (n*ws))
// where m1 is the measured miss rate, ws the working set of one CTA in
// lines and C the cache capacity in lines. The fraction 1 - C/(n*ws) of
// the lines cannot stay resident; a re-use of one of them, which the
// profile says happens with probability 1 - m1, becomes an extra DRAM read.
// Predicted DRAM reads per CTA are dr(n) = accesses * m(n). The document
// gives the inputs (miss rate, cache capacity, working set per CTA), the
// eviction/re-use reasoning and the fact that a segmented curve is used,
// but not the curve; this curve is this design's own.
//
// Interface: start latches the operands; done pulses 35 cycles later
// (one serial 32-bit division plus three cycles) with m_n, dr_n and ws_md =
// n*ws held until the next start. Fixed point: m values have 12 fraction
// bits (md_pkg::FRAC).
module dram_read_predictor
  import md_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  n,            // target degree in CTAs, 1..8
  input  frac_t       m1,           // miss rate of the CTA run alone
  input  cnt_t        accesses,     // L1 accesses of one CTA
  input  cnt_t        ws_lines,     // working set of one CTA, lines
  input  logic [15:0] cache_lines,  // L1 data cache capacity, lines
  output logic        done,
  output frac_t       m_n,          // predicted miss rate at degree n
  output cnt_t        dr_n,         // predicted DRAM reads per CTA
  output cnt_t        ws_md         // working set of n CTAs, lines
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_EVAL} state_e;
  state_e state;

  logic        div_start, div_done, div_busy;
  logic [31:0] div_q;
  logic [35:0] ws_prod;
  cnt_t        ws_sat;
  logic        overflow;   // working set of n CTAs exceeds the cache
  frac_t       m1_r;
  cnt_t        acc_r;

  always_comb begin
    ws_prod = 36'(ws_lines) * 36'(n);
    ws_sat  = (ws_prod[35:32] != 0) ? '1 : ws_prod[31:0];
  end

  seq_divider #(.W(32)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend ({4'd0, cache_lines, 12'd0}),
    .divisor  (ws_sat),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q)
  );

  assign div_start = (state == S_IDLE) && start;

  // evaluation of the curve once C/(n*ws) is known
  frac_t        fit_frac;     // C/(n*ws), clamped to 1.0
  frac_t        evict_frac;   // 1 - C/(n*ws)
  logic [25:0]  extra;
  logic [13:0]  m_sum;
  frac_t        m_new;
  logic [44:0]  dr_prod;

  always_comb begin
    fit_frac   = (div_q > 32'(ONE)) ? frac_t'(ONE) : div_q[FRAC:0];
    evict_frac = overflow ? frac_t'(ONE) - fit_frac : '0;
    extra      = (26'(frac_t'(ONE) - m1_r) * 26'(evict_frac)) >> FRAC;
    m_sum      = 14'(m1_r) + extra[13:0];
    m_new      = (m_sum > 14'(ONE)) ? frac_t'(ONE) : m_sum[FRAC:0];
    dr_prod    = (45'(acc_r) * 45'(m_new)) >> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      m_n      <= '0;
      dr_n     <= '0;
      ws_md    <= '0;
      overflow <= 1'b0;
      m1_r     <= '0;
      acc_r    <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_DIV;
          ws_md    <= ws_sat;
          overflow <= ws_sat > 32'(cache_lines);
          m1_r     <= (m1 > frac_t'(ONE)) ? frac_t'(ONE) : m1;
          acc_r    <= accesses;
        end
        S_DIV: if (div_done) state <= S_EVAL;
        S_EVAL: begin
          m_n   <= m_new;
          dr_n  <= (dr_prod[44:32] != 0) ? '1 : dr_prod[31:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the divider is free whenever a new prediction starts
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
endmodule
