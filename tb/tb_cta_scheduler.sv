// tb_cta_scheduler: a kernel is dispatched to NC cores that retire CTAs
// after random run times. Checked: every CTA id is dispatched exactly once,
// no core ever holds more CTAs than its limit or the resource limit, the
// first dispatches go round robin one per cycle, the resource limit of
// several kernel shapes (registers, threads, shared memory) matches the
// budget arithmetic, a limit lowered mid-kernel is respected for new
// dispatches, and kernel_done pulses once when all CTAs have retired.
module tb_cta_scheduler;
  import md_pkg::*;
  localparam int NC = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic launch = 0;
  kernel_cfg_t cfg;
  logic [3:0] core_limit [NC];
  logic [NC-1:0] cta_done;
  logic busy, disp_valid, kernel_done;
  kernel_cfg_t cfg_r;
  logic [3:0] res_limit;
  logic [3:0] disp_core;
  logic [15:0] disp_cta;
  logic [3:0] active [NC];
  int checks = 0, failures = 0;

  cta_scheduler #(.NUM_CORES(NC)) dut (.*);

  // core model: each resident CTA has a countdown
  int timers [NC][$];
  int held [NC];
  bit got [int];
  int n_done_pulses, n_over;
  int lim_now [NC];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (disp_valid && disp_core == 4'(c)) begin
          timers[c].push_back($urandom_range(40, 5));
          held[c]++;
          if (held[c] > lim_now[c] || held[c] > int'(res_limit)) n_over++;
        end
      end
      if (disp_valid) begin
        if (got.exists(int'(disp_cta))) begin failures++; $display("FAIL cta %0d twice", disp_cta); end
        got[int'(disp_cta)] = 1;
      end
      if (kernel_done) n_done_pulses++;
    end
  end

  // retire the first CTA whose timer ran out, at most one per core a cycle
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      cta_done[c] = 1'b0;
      foreach (timers[c][i]) timers[c][i]--;
      if (timers[c].size() > 0 && timers[c][0] <= 0) begin
        void'(timers[c].pop_front());
        held[c]--;
        cta_done[c] = 1'b1;
      end
    end
  end

  function automatic int ref_res(int regs, int thr, int smem);
    int l; l = 1;
    for (int k = 2; k <= 8; k++)
      if (k * regs <= 32768 && k * thr <= 1536 && k * smem <= 49152) l = k;
    return l;
  endfunction

  task automatic run_kernel(int nctas, int regs, int thr, int smem, int lim, bit lower);
    int first_cores [$];
    cfg = '{num_ctas: 16'(nctas), warps_per_cta: 6'((thr + 31) / 32),
            regs_per_cta: 16'(regs), threads_per_cta: 11'(thr), smem_per_cta: 17'(smem)};
    got.delete(); n_done_pulses = 0; n_over = 0;
    for (int c = 0; c < NC; c++) begin core_limit[c] = 4'(lim); lim_now[c] = lim; end
    @(negedge clk); launch = 1; @(negedge clk); launch = 0;
    checks++;
    if (res_limit != 4'(ref_res(regs, thr, smem))) begin
      failures++; $display("FAIL res_limit %0d exp %0d", res_limit, ref_res(regs, thr, smem));
    end
    // round robin, one dispatch per cycle
    for (int i = 0; i < 3; i++) begin
      @(posedge clk); #1;
      checks++;
      if (!disp_valid || disp_core != 4'(i)) begin failures++; $display("FAIL rr %0d: v=%0d core=%0d", i, disp_valid, disp_core); end
    end
    if (lower) begin
      repeat (30) @(negedge clk);
      for (int c = 0; c < NC; c++) core_limit[c] = 4'd1;
      repeat (2) @(negedge clk);
      // from here on a core may only be given a CTA when it holds none
      for (int c = 0; c < NC; c++) lim_now[c] = 1;
      n_over = 0;
    end
    wait (kernel_done);
    repeat (5) @(negedge clk);
    checks += 4;
    if (got.size() != nctas) begin failures++; $display("FAIL dispatched %0d of %0d", got.size(), nctas); end
    if (n_done_pulses != 1) begin failures++; $display("FAIL kernel_done pulses %0d", n_done_pulses); end
    if (n_over != 0) begin failures++; $display("FAIL limit exceeded %0d times", n_over); end
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) core_limit[c] = 4'd8;
    cta_done = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_kernel(300, 2000, 192, 0, 8, 0);      // limited by threads: 8
    run_kernel(200, 8000, 128, 1024, 8, 0);   // registers: 4
    run_kernel(150, 1000, 512, 0, 8, 0);      // threads: 3
    run_kernel(150, 1000, 128, 20000, 8, 0);  // shared memory: 2
    run_kernel(400, 1000, 128, 0, 3, 0);      // MD limit 3
    run_kernel(400, 1000, 128, 0, 8, 1);      // limit lowered to 1 mid-kernel
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
