// tb_latency_predictor: checks the memory-latency growing-rate rules on
// directed corner cases (each rule and each threshold on both sides) and
// on random operands against the reference model.
module tb_latency_predictor;
  import md_pkg::*;
  import md_ref_pkg::*;

  frac_t m_n, m_prev;
  cnt_t  ws_md;
  logic [15:0] cache_lines;
  rate_t lat_rate;
  int checks = 0, failures = 0;
  int hit_rule [5];

  latency_predictor dut (.*);

  task automatic check(int m, int mp, longint ws, int c, int exp_rate);
    m_n = frac_t'(m); m_prev = frac_t'(mp); ws_md = cnt_t'(ws); cache_lines = 16'(c);
    #1;
    checks++;
    if (lat_rate !== rate_t'(exp_rate)) begin
      failures++;
      $display("FAIL m=%0d mp=%0d ws=%0d c=%0d: got %0d exp %0d", m, mp, ws, c, lat_rate, exp_rate);
    end
  endtask

  initial begin
    // rule 1: miss below 0.15 / above 0.85
    check(613, 0, 100000, 64, 4219);
    check(3483, 0, 100000, 64, 4219);
    check(3482, 3000, 64*4, 64, 4506);   // 0.85 itself is not "above"
    // rule 2: 0.15 <= miss < 0.3
    check(614, 0, 100000, 64, 4506);
    check(1228, 0, 100000, 64, 4506);
    // rule 3: ws > 5C, dmiss > 0.1
    check(2000, 1589, 321, 64, 7782);
    check(2000, 1590, 321, 64, 4506);    // dmiss = 410 is not > 0.1
    check(2000, 1000, 320, 64, 4506);    // ws = 5C is not > 5C
    // rule 4: ws > 15C, dmiss > 0.04
    check(2000, 1800, 961, 64, 7168);
    check(2000, 1836, 961, 64, 4506);    // dmiss = 164
    check(2000, 1800, 960, 64, 4506);
    // default
    check(1229, 1229, 10, 64, 4506);
    for (int i = 0; i < 2000; i++) begin
      int m, mp, c; longint ws;
      m  = $urandom_range(4096);
      mp = $urandom_range(4096);
      c  = $urandom_range(1024, 16);
      ws = $urandom_range(20 * c);
      check(m, mp, ws, c, int'(ref_lat(m, mp, ws, c)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
