// tb_md_predictor: feeds CTA profiles to the predictor and compares the
// chosen degree, the computation-bound flag, the measured miss rate and
// the average latency with the reference model. Directed profiles cover a
// cache-thrashing kernel (degree 1), a kernel whose CTAs fit the cache
// (full degree), a computation-bound kernel, and a resource limit below
// the CTA buffer size; random profiles follow. Each decision must arrive
// within 100 + 40 * max_md cycles.
module tb_md_predictor;
  import md_pkg::*;
  import md_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, md_valid, compute_bound;
  cta_stats_t stats;
  logic [15:0] cache_lines, avg_latency;
  logic [3:0] max_md, md_ctas;
  logic [5:0] warps_per_cta;
  logic [9:0] md_warps;
  frac_t miss_rate;
  int checks = 0, failures = 0;
  int n_cb = 0, n_md1 = 0, n_mdmax = 0, n_mid = 0;

  md_predictor dut (.*);

  task automatic run(longint acc, longint dr, longint winst, longint ws,
                     longint lsum, longint lcnt, int c, int mx, int wpc);
    int cyc, exp_md; bit exp_cb;
    @(negedge clk);
    stats = '{accesses: cnt_t'(acc), dram_reads: cnt_t'(dr), warp_insts: cnt_t'(winst),
              ws_lines: cnt_t'(ws), lat_sum: cnt_t'(lsum), lat_cnt: cnt_t'(lcnt)};
    cache_lines = 16'(c); max_md = 4'(mx); warps_per_cta = 6'(wpc);
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!md_valid && cyc < 1000) begin @(negedge clk); cyc++; end
    exp_md = ref_md(acc, dr, winst, ws, c, mx, exp_cb);
    checks += 6;
    if (cyc > 100 + 40 * mx) begin failures++; $display("FAIL too slow: %0d cycles", cyc); end
    if (md_ctas !== 4'(exp_md)) begin failures++; $display("FAIL md acc=%0d dr=%0d ws=%0d c=%0d mx=%0d: %0d vs %0d", acc, dr, ws, c, mx, md_ctas, exp_md); end
    if (md_warps !== 10'(exp_md * wpc)) begin failures++; $display("FAIL md_warps"); end
    if (compute_bound !== exp_cb) begin failures++; $display("FAIL cb"); end
    if (miss_rate !== frac_t'(ref_m1(dr, acc))) begin failures++; $display("FAIL m1 %0d", miss_rate); end
    if (avg_latency !== 16'((lcnt == 0) ? 0 : lsum / lcnt)) begin failures++; $display("FAIL avg lat %0d", avg_latency); end
    if (exp_cb) n_cb++;
    else if (exp_md == 1) n_md1++;
    else if (exp_md == mx) n_mdmax++;
    else n_mid++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // thrashing: 65-line CTA, miss rate 0.19, 64-line cache -> one CTA
    run(630, 120, 1500, 65, 120 * 374, 120, 64, 8, 6);
    if (md_ctas !== 4'd1) begin failures++; $display("FAIL thrashing case did not pick 1"); end
    checks++;
    // small CTAs that all fit in a 256-line cache -> full degree
    run(400, 30, 500, 20, 9000, 30, 256, 8, 6);
    if (md_ctas !== 4'd8) begin failures++; $display("FAIL fitting case did not pick 8"); end
    checks++;
    // computation bound: DRAM reads / warp instructions < 0.05
    run(1000, 49, 1000, 500, 100, 1, 64, 6, 4);
    if (!compute_bound || md_ctas !== 4'd6) begin failures++; $display("FAIL compute bound"); end
    checks++;
    // limited by resources
    run(400, 30, 500, 20, 0, 0, 256, 3, 6);
    for (int i = 0; i < 300; i++) begin
      longint acc, dr;
      acc = $urandom_range(20000, 1);
      dr  = $urandom_range(int'(acc));
      run(acc, dr, $urandom_range(40000), $urandom_range(3000, 1),
          $urandom_range(1000000), $urandom_range(3000), $urandom_range(1024, 16),
          $urandom_range(8, 1), $urandom_range(16, 1));
    end
    checks++;
    if (n_cb == 0 || n_md1 == 0 || n_mdmax == 0 || n_mid == 0) begin
      failures++;
      $display("FAIL outcome not covered: cb=%0d md1=%0d max=%0d mid=%0d", n_cb, n_md1, n_mdmax, n_mid);
    end
    $display("outcomes: compute-bound %0d, degree 1 %0d, full %0d, in between %0d", n_cb, n_md1, n_mdmax, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
