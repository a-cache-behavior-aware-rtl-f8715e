// tb_pipeline_predictor: checks the pipeline adverse effect rules on
// directed boundaries and on random operands against the reference model.
module tb_pipeline_predictor;
  import md_pkg::*;
  import md_ref_pkg::*;

  cnt_t  ws_md, dr_n;
  logic [15:0] cache_lines;
  rate_t pipe_rate;
  int checks = 0, failures = 0;

  pipeline_predictor dut (.*);

  task automatic check(longint ws, longint dr, int c, int exp_rate);
    ws_md = cnt_t'(ws); dr_n = cnt_t'(dr); cache_lines = 16'(c);
    #1;
    checks++;
    if (pipe_rate !== rate_t'(exp_rate)) begin
      failures++;
      $display("FAIL ws=%0d dr=%0d c=%0d: got %0d exp %0d", ws, dr, c, pipe_rate, exp_rate);
    end
  endtask

  initial begin
    check(255, 100000, 256, 4301);   // fits: 1.05 whatever the reads
    check(256, 1280, 256, 4506);     // ws = C does not fit; reads = 5C -> 1.1
    check(256, 1281, 256, 4915);     // reads > 5C -> 1.2
    check(5000, 10, 256, 4506);
    for (int i = 0; i < 2000; i++) begin
      int c; longint ws, dr;
      c  = $urandom_range(1024, 16);
      ws = $urandom_range(4 * c);
      dr = $urandom_range(10 * c);
      check(ws, dr, c, int'(ref_pipe(ws, dr, c)));
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
