// tb_inlab_profiles: runs the predictor on single-CTA profiles of the
// published memory-intensive benchmarks and on a streaming kernel, and
// prints the degree it picks next to the degree the published scheme
// picked. The checks compare the predictor with the reference model and
// require a computation-bound kernel to keep the full degree and a
// streaming kernel (every access a miss, nothing re-used) to get the full
// degree as well. Agreement with the published choices is reported, not
// required: it depends on the DRAM-read curve, which is this design's own.
//
// Profiles (6 warps per CTA, 128-byte lines):
//   bfs : miss 0.41, 72.94 DRAM reads per CTA, working set ~70 lines
//   nbf : miss 0.13, 169.39 DRAM reads per CTA, working set ~65 lines
// taken at one CTA per core; the cache is taken as 32 KB (256 lines) and
// 8 KB (64 lines). Warp instructions are set to 10x the DRAM reads
// (memory bound), as the profiles do not give them.
module tb_inlab_profiles;
  import md_pkg::*;
  import md_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, md_valid, compute_bound;
  cta_stats_t stats;
  logic [15:0] cache_lines, avg_latency;
  logic [3:0] max_md, md_ctas;
  logic [5:0] warps_per_cta = 6;
  logic [9:0] md_warps;
  frac_t miss_rate;
  int checks = 0, failures = 0, agree = 0, compared = 0;

  md_predictor dut (.*);

  task automatic run(string name, longint acc, longint dr, longint winst, longint ws,
                     int c, int mx, int published);
    int cyc, exp_md; bit exp_cb;
    @(negedge clk);
    stats = '{accesses: cnt_t'(acc), dram_reads: cnt_t'(dr), warp_insts: cnt_t'(winst),
              ws_lines: cnt_t'(ws), lat_sum: cnt_t'(dr * 330), lat_cnt: cnt_t'(dr)};
    cache_lines = 16'(c); max_md = 4'(mx);
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!md_valid && cyc < 2000) begin @(negedge clk); cyc++; end
    exp_md = ref_md(acc, dr, winst, ws, c, mx, exp_cb);
    checks++;
    if (md_ctas != 4'(exp_md) || compute_bound != exp_cb) begin
      failures++; $display("FAIL %s: md %0d exp %0d", name, md_ctas, exp_md);
    end
    if (published > 0) begin
      compared++;
      if (md_ctas == 4'(published)) agree++;
      $display("%-28s cache %4d lines: degree %0d CTAs (published %0d)", name, c, md_ctas, published);
    end else
      $display("%-28s cache %4d lines: degree %0d CTAs%s", name, c, md_ctas,
               compute_bound ? " (computation bound)" : "");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("bfs",  178,  73, 730, 70, 256, 8, 4);
    run("nbf", 1303, 169, 1690, 65, 256, 7, 1);
    run("bfs",  178,  73, 730, 70,  64, 8, 4);
    run("nbf", 1303, 169, 1690, 65,  64, 7, 1);
    // streaming (vector addition): every access misses, no re-use
    run("streaming", 640, 640, 3200, 640, 256, 8, 0);
    checks++;
    if (md_ctas != 4'd8) begin failures++; $display("FAIL streaming kernel did not keep degree 8"); end
    // computation bound: 1 DRAM read per 40 instructions
    run("computation bound", 500, 100, 4000, 100, 256, 8, 0);
    checks++;
    if (!compute_bound || md_ctas != 4'd8) begin failures++; $display("FAIL computation-bound kernel"); end
    $display("agreement with published choices: %0d of %0d", agree, compared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
