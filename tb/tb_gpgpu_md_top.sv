// tb_gpgpu_md_top: end-to-end test of the multithreading-degree control at
// its default size (15 cores, 8-CTA buffers, 256-line L1), with no
// parameter overridden.
//
// The shader cores are modelled here: each keeps its resident CTAs with a
// countdown and retires one when it runs out. The prediction core's first
// CTA of each kernel runs for PROF_CYCLES and issues warp instructions and
// L1 accesses to its own working set; a direct-mapped model of the L1 turns
// accesses into hits or DRAM reads with hit or miss latencies. The testbench
// counts these events itself and works out the expected degree with the
// reference model.
//
// Four kernels: a cache-thrashing one (degree must drop below the
// default), a computation-bound one (degree stays at the maximum), one
// whose register use limits residency to 4 CTAs, and a short one that is
// over before its decision is. Checked per kernel: the
// decision and the statistics it is based on, one CTA at a time on the
// prediction core while profiling, every core's limit after the decision,
// no dispatch to a full core, every CTA dispatched once and retired, one
// kernel_done. A launch during a kernel, and one tried right after the
// profiled CTA retires while the decision is pending, must be ignored. Each of these
// mechanisms is counted and must occur.
module tb_gpgpu_md_top;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int NC = 15, L1 = 256, PROF_CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        launch = 0;
  kernel_cfg_t cfg;
  logic        busy, kernel_done, disp_valid;
  logic [3:0]  disp_core;
  logic [15:0] disp_cta;
  logic [NC-1:0] cta_done;
  logic [3:0]  core_limit [NC];
  logic        pc_mem_access, pc_dram_read, pc_lat_valid, pc_warp_inst;
  logic [31:0] pc_mem_addr;
  logic [15:0] pc_lat_cycles;
  logic        profiling, tuned, md_valid, compute_bound;
  logic [3:0]  md_ctas, res_limit;
  logic [9:0]  md_warps;
  frac_t       miss_rate;
  logic [15:0] avg_latency;
  cnt_t        ws_lines;

  gpgpu_md_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_profile = 0, m_reduced = 0, m_cbound = 0, m_resclamp = 0, m_retune = 0, m_ignored = 0, m_held = 0;

  // ---------------- shader core model ----------------
  int timers [NC][$];
  int held [NC];
  int prof_left;               // cycles left of the profiled CTA, -1 if none
  bit prof_taken;              // prediction core got its profiled CTA
  int ws_cfg, acc_shift, cb_mode;
  logic [31:0] l1_tag [L1];
  bit          l1_vld [L1];
  longint e_acc, e_dr, e_wi, e_lsum, e_lcnt;
  bit     seen [int];
  int n_over, n_prof_over, n_md_valid, n_done, got_cnt;
  bit got [int];

  always @(posedge clk) if (rst_n) begin
    if (disp_valid) begin
      if (got.exists(int'(disp_cta))) begin failures++; $display("FAIL cta %0d twice", disp_cta); end
      got[int'(disp_cta)] = 1;
      held[disp_core]++;
      // the core must have been below its limit before this dispatch
      if (held[disp_core] - 1 >= int'(core_limit[disp_core])) n_over++;
      if (disp_core == 0 && !prof_taken) begin
        prof_taken = 1;
        prof_left  = PROF_CYCLES;
      end else begin
        timers[disp_core].push_back($urandom_range(300, 100));
      end
      if (profiling && disp_core == 0 && held[0] > 1) n_prof_over++;
    end
    if (md_valid) n_md_valid++;
    if (kernel_done) n_done++;
  end

  // A launch tried while the decision is still being worked out must be
  // ignored: the kernel keeps profiling and no CTA is handed out twice.
  int probe = 0;
  always @(negedge clk) begin
    if (probe == 2) launch = 1'b1;
    if (probe == 1) begin
      launch = 1'b0;
      checks++;
      if (busy && profiling) m_held++;
      else begin failures++; $display("FAIL launch during a pending decision: busy=%0d", busy); end
    end
    if (probe > 0) probe--;
  end

  always @(negedge clk) begin
    cta_done = '0;
    {pc_mem_access, pc_dram_read, pc_lat_valid, pc_warp_inst} = '0;
    for (int c = 0; c < NC; c++) begin
      foreach (timers[c][i]) timers[c][i]--;
      if (timers[c].size() > 0 && timers[c][0] <= 0) begin
        void'(timers[c].pop_front());
        held[c]--;
        cta_done[c] = 1'b1;
      end
    end
    if (prof_left > 0) begin
      prof_left--;
      pc_warp_inst = 1'b1;
      if (($urandom % (1 << acc_shift)) == 0) begin
        int line, idx;
        line = $urandom_range(ws_cfg - 1);
        idx  = line % L1;
        pc_mem_access = 1'b1;
        pc_mem_addr   = 32'(line) << 7;
        pc_lat_valid  = 1'b1;
        e_acc++;
        seen[line] = 1;
        if (l1_vld[idx] && l1_tag[idx] == 32'(line)) begin
          pc_lat_cycles = 16'd30;
        end else begin
          pc_dram_read  = 1'b1;
          pc_lat_cycles = 16'($urandom_range(400, 250));
          l1_vld[idx] = 1; l1_tag[idx] = 32'(line);
          e_dr++;
        end
        e_lsum += pc_lat_cycles; e_lcnt++;
      end
      e_wi++;
      if (prof_left == 0 && !cta_done[0]) begin
        held[0]--;
        cta_done[0] = 1'b1;
        probe = 3;
      end else if (prof_left == 0) begin
        prof_left = 1;          // retire next cycle, one CTA per cycle
      end
    end
  end

  // ---------------- one kernel ----------------
  task automatic run_kernel(int nctas, int regs, int ws, int ashift, int exp_res);
    int exp_md; bit exp_cb; int cyc;
    cfg = '{num_ctas: 16'(nctas), warps_per_cta: 6'd6, regs_per_cta: 16'(regs),
            threads_per_cta: 11'd192, smem_per_cta: 17'd0};
    ws_cfg = ws; acc_shift = ashift;
    e_acc = 0; e_dr = 0; e_wi = 0; e_lsum = 0; e_lcnt = 0; seen.delete(); got.delete();
    foreach (l1_vld[i]) l1_vld[i] = 0;
    prof_taken = 0; prof_left = -1; n_over = 0; n_prof_over = 0; n_md_valid = 0; n_done = 0;
    @(negedge clk); launch = 1; @(negedge clk); launch = 0;
    checks++;
    if (res_limit != 4'(exp_res)) begin failures++; $display("FAIL res_limit %0d", res_limit); end
    if (exp_res < 8) m_resclamp++;
    // profiling: the prediction core at 1, others at the default degree
    repeat (20) @(negedge clk);
    checks++;
    if (profiling && core_limit[0] == 1 && core_limit[1] == 4'(exp_res)) m_profile++;
    else begin failures++; $display("FAIL profiling limits"); end
    // a launch while busy is ignored
    @(negedge clk); launch = 1; @(negedge clk); launch = 0;
    @(negedge clk);
    checks++;
    if (profiling && busy) m_ignored++;
    else begin failures++; $display("FAIL launch while busy was taken"); end
    cyc = 0;
    while (!md_valid && cyc < 20000) begin @(negedge clk); cyc++; end
    @(negedge clk); @(negedge clk);
    exp_md = ref_md(e_acc, e_dr, e_wi, longint'(seen.size()), L1, exp_res, exp_cb);
    checks += 6;
    if (md_ctas != 4'(exp_md)) begin failures++; $display("FAIL md %0d exp %0d", md_ctas, exp_md); end
    if (compute_bound != exp_cb) begin failures++; $display("FAIL compute_bound %0d", compute_bound); end
    if (miss_rate != frac_t'(ref_m1(e_dr, e_acc))) begin failures++; $display("FAIL miss rate %0d", miss_rate); end
    if (ws_lines != cnt_t'(seen.size())) begin failures++; $display("FAIL ws %0d exp %0d", ws_lines, seen.size()); end
    if (avg_latency != 16'((e_lcnt == 0) ? 0 : e_lsum / e_lcnt)) begin failures++; $display("FAIL avg latency"); end
    if (md_warps != 10'(exp_md * 6)) begin failures++; $display("FAIL md_warps"); end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (core_limit[c] != 4'(exp_md)) begin failures++; $display("FAIL core %0d limit %0d", c, core_limit[c]); end
    end
    if (tuned) m_retune++;
    if (exp_cb) m_cbound++;
    if (!exp_cb && exp_md < exp_res) m_reduced++;
    $display("kernel: acc=%0d dram=%0d winst=%0d ws=%0d -> md=%0d CTAs (%0d warps)%s",
             e_acc, e_dr, e_wi, seen.size(), md_ctas, md_warps, compute_bound ? ", computation bound" : "");
    cyc = 0;
    while (n_done == 0 && cyc < 200000) begin @(negedge clk); cyc++; end
    while (busy && cyc < 200000) begin @(negedge clk); cyc++; end
    repeat (3) @(negedge clk);
    checks += 5;
    if (got.size() != nctas) begin failures++; $display("FAIL dispatched %0d", got.size()); end
    if (n_done != 1) begin failures++; $display("FAIL kernel_done %0d", n_done); end
    if (n_md_valid != 1) begin failures++; $display("FAIL md_valid %0d", n_md_valid); end
    if (n_over != 0) begin failures++; $display("FAIL dispatch to a full core %0d", n_over); end
    if (n_prof_over != 0) begin failures++; $display("FAIL prediction core over 1 CTA while profiling"); end
  endtask

  initial begin
    cta_done = '0;
    {pc_mem_access, pc_dram_read, pc_lat_valid, pc_warp_inst} = '0;
    pc_mem_addr = '0; pc_lat_cycles = '0;
    foreach (held[i]) held[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_kernel(600, 4000, 600, 1, 8);     // thrashing, memory bound
    run_kernel(600, 4000, 16, 6, 8);      // computation bound
    run_kernel(300, 8000, 200, 1, 4);     // 8000 registers per CTA: 4 CTAs
    run_kernel(20, 4000, 600, 1, 8);      // short kernel: ends while the decision is pending
    checks++;
    if (m_profile == 0 || m_reduced == 0 || m_cbound == 0 || m_resclamp == 0 ||
        m_retune == 0 || m_ignored == 0 || m_held == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: profiling %0d, degree reduced %0d, computation bound %0d, resource clamp %0d, retuned %0d, busy launch ignored %0d, launch held for decision %0d",
             m_profile, m_reduced, m_cbound, m_resclamp, m_retune, m_ignored, m_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
