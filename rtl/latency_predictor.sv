// latency_predictor: stage 2 of the decision scheme. For one step of the
// multithreading degree, from n-1 to n CTAs, it gives the rate at which the
// memory access latency grows, as a fixed set of rules on the predicted
// miss rate at n, its change since n-1 and the working set of n CTAs
// against the cache capacity:
//   miss < 0.15 or miss > 0.85                     -> 1.03
//   0.15 <= miss < 0.3                             -> 1.1
//   otherwise ws > 5 x cache  and dmiss > 0.1      -> 1.9
//             ws > 15 x cache and dmiss > 0.04     -> 1.75
//             else                                 -> 1.1
// The rules and rates are the document's. That the working set meant is
// the one of all n CTAs, that the miss rate is the predicted one at n and
// that the 5x rule is tested before the 15x rule (the order it is stated
// in) are this design's reading.
//
// Purely combinational. Rates are Q4.12 (md_pkg).
module latency_predictor
  import md_pkg::*;
(
  input  frac_t       m_n,          // predicted miss rate at n CTAs
  input  frac_t       m_prev,       // predicted miss rate at n-1 CTAs
  input  cnt_t        ws_md,        // working set of n CTAs, lines
  input  logic [15:0] cache_lines,  // L1 capacity, lines
  output rate_t       lat_rate
);
  logic [19:0] c5, c15;
  frac_t       dmiss;

  always_comb begin
    c5    = 20'(cache_lines) * 20'd5;
    c15   = 20'(cache_lines) * 20'd15;
    dmiss = (m_n > m_prev) ? m_n - m_prev : '0;
    if (m_n < MISS_015 || m_n > MISS_085)
      lat_rate = LAT_RATE_EDGE;
    else if (m_n < MISS_030)
      lat_rate = LAT_RATE_MID;
    else if (ws_md > 32'(c5) && dmiss > DMISS_010)
      lat_rate = LAT_RATE_WS5;
    else if (ws_md > 32'(c15) && dmiss > DMISS_004)
      lat_rate = LAT_RATE_WS15;
    else
      lat_rate = LAT_RATE_MID;
  end
endmodule
