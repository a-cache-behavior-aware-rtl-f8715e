// tb_md_controller: steps the controller through idle, profiling and tuned
// phases and checks every core's limit in each: the prediction core at
// one CTA while profiling, the others at the default degree capped by the
// resource limit, then all at the predicted degree capped the same way.
// Also checks that a decision outside profiling is ignored and that a new
// launch restarts profiling.
module tb_md_controller;
  localparam int NC = 15, PC = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic launch = 0, md_valid = 0;
  logic [3:0] res_limit = 8, md_ctas = 0, md_applied;
  logic [3:0] core_limit [NC];
  logic profiling, tuned;
  int checks = 0, failures = 0;

  md_controller #(.NUM_CORES(NC), .MAX_CTA(8), .PRED_CORE(PC)) dut (.*);

  task automatic expect_limits(int pred, int others, string what);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (core_limit[c] != 4'((c == PC) ? pred : others)) begin
        failures++;
        $display("FAIL %s: core %0d limit %0d", what, c, core_limit[c]);
      end
    end
  endtask

  task automatic pulse_launch(); @(negedge clk); launch = 1; @(negedge clk); launch = 0; endtask
  task automatic decide(int md); @(negedge clk); md_ctas = 4'(md); md_valid = 1; @(negedge clk); md_valid = 0; endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_limits(8, 8, "idle");
    decide(2);                        // no kernel: ignored
    checks++; if (tuned) begin failures++; $display("FAIL decision taken while idle"); end
    pulse_launch();
    checks++; if (!profiling) begin failures++; $display("FAIL not profiling"); end
    expect_limits(1, 8, "profiling");
    res_limit = 5; #1;
    expect_limits(1, 5, "profiling, resource-limited");
    decide(3);
    checks++; if (!tuned || md_applied != 3) begin failures++; $display("FAIL not tuned"); end
    expect_limits(3, 3, "tuned");
    res_limit = 2; #1;
    expect_limits(2, 2, "tuned, resource-limited");
    decide(6);                        // second answer in the same kernel: ignored
    expect_limits(2, 2, "tuned, second decision ignored");
    res_limit = 8;
    pulse_launch();
    expect_limits(1, 8, "second kernel");
    decide(7);
    expect_limits(7, 7, "second kernel tuned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
