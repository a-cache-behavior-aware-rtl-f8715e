// pipeline_predictor: stage 3 of the decision scheme. It gives the
// "pipeline adverse effect", the extra slowdown of a single warp when more
// warps compete for the pipeline than its latencies need:
//   working set of n CTAs < cache capacity            -> 1.05
//   otherwise DRAM reads per CTA > 5 x cache capacity  -> 1.2
//             else                                     -> 1.1
// Rules and ratios are the document's (its scheme section; an earlier
// analysis section words the 1.2 case differently, see the README).
//
// Purely combinational. Rates are Q4.12 (md_pkg).
module pipeline_predictor
  import md_pkg::*;
(
  input  cnt_t        ws_md,        // working set of n CTAs, lines
  input  cnt_t        dr_n,         // predicted DRAM reads per CTA at n
  input  logic [15:0] cache_lines,  // L1 capacity, lines
  output rate_t       pipe_rate
);
  logic [19:0] c5;

  always_comb begin
    c5 = 20'(cache_lines) * 20'd5;
    if (ws_md < 32'(cache_lines))
      pipe_rate = PIPE_RATE_FIT;
    else if (dr_n > 32'(c5))
      pipe_rate = PIPE_RATE_BIG;
    else
      pipe_rate = PIPE_RATE_MID;
  end
endmodule
