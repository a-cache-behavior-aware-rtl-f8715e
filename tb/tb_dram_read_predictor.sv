// tb_dram_read_predictor: runs stage 1 of the prediction on directed and
// random profiles and compares m(n), DRAM reads per CTA and n*ws with the
// reference model. Also checks the fixed latency from start to done.
module tb_dram_read_predictor;
  import md_pkg::*;
  import md_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done;
  logic [3:0] n;
  frac_t m1, m_n;
  cnt_t accesses, ws_lines, dr_n, ws_md;
  logic [15:0] cache_lines;
  int checks = 0, failures = 0;
  localparam int LATENCY = 35;   // start to done, cycles

  dram_read_predictor dut (.*);

  task automatic run(int nn, int mm1, longint acc, longint ws, int c);
    int cyc; longint em, edr;
    @(negedge clk);
    n = 4'(nn); m1 = frac_t'(mm1); accesses = cnt_t'(acc); ws_lines = cnt_t'(ws);
    cache_lines = 16'(c); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    em  = ref_mn(mm1, ws, nn, c);
    edr = ref_drn(acc, em);
    checks += 4;
    if (m_n !== frac_t'(em)) begin failures++; $display("FAIL m n=%0d m1=%0d ws=%0d c=%0d: %0d vs %0d", nn, mm1, ws, c, m_n, em); end
    if (dr_n !== cnt_t'(edr)) begin failures++; $display("FAIL dr: %0d vs %0d", dr_n, edr); end
    if (ws_md !== cnt_t'(ws * nn)) begin failures++; $display("FAIL ws_md: %0d", ws_md); end
    if (cyc != LATENCY) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fits: miss rate unchanged
    run(2, 800, 600, 60, 256);
    // nbf-like profile in an 8 KB cache (64 lines): 1 CTA of 65 lines, m1 = 0.19
    run(1, 778, 630, 65, 64);
    run(2, 778, 630, 65, 64);
    run(8, 778, 630, 65, 64);
    // everything misses already
    run(5, 4096, 1000, 300, 64);
    for (int i = 0; i < 300; i++)
      run($urandom_range(8, 1), $urandom_range(4096), $urandom_range(100000),
          $urandom_range(5000, 1), $urandom_range(1024, 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
