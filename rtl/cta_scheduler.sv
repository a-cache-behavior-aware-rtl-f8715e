// cta_scheduler: the central CTA scheduler. It hands the CTAs of a kernel,
// one per cycle, to the shader cores and keeps count of the CTAs resident
// on each core.
//
// At launch it latches the kernel configuration and works out the
// resource limit, the most CTAs one core can hold at once: the largest
// k <= MAX_CTA with k * registers, k * threads and k * shared memory per
// CTA within the core's budget (32768 registers, 1536 threads, 8 CTAs as
// the document configures the core; 48 KB shared memory is assumed). Each
// cycle it looks, round robin from the core after the last one served, for
// a core whose resident count is below its limit from the MD controller and
// dispatches the next CTA there. cta_done[c] retires one CTA of core c.
// kernel_done pulses when every CTA has been dispatched and retired.
// Round-robin (load balancing) order and one dispatch per cycle are this
// design's choices; the document only says the scheduler balances load and
// respects per-core limits. A CTA larger than a core's budget is given a
// limit of 1.
//
// Timing: launch is taken when busy is low; the first dispatch can happen
// the cycle after. disp_* are registered and valid for one cycle.
module cta_scheduler
  import md_pkg::*;
#(
  parameter int NUM_CORES        = 15,
  parameter int MAX_CTA          = 8,
  parameter int REGS_PER_CORE    = 32768,
  parameter int THREADS_PER_CORE = 1536,
  parameter int SMEM_PER_CORE    = 49152
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        launch,
  input  kernel_cfg_t cfg,
  input  logic [3:0]  core_limit [NUM_CORES],
  input  logic [NUM_CORES-1:0] cta_done,
  output logic        busy,
  output kernel_cfg_t cfg_r,
  output logic [3:0]  res_limit,
  output logic        disp_valid,
  output logic [$clog2(NUM_CORES)-1:0] disp_core,
  output logic [15:0] disp_cta,
  output logic [3:0]  active [NUM_CORES],
  output logic        kernel_done
);
  localparam int CW = $clog2(NUM_CORES);

  // resource limit of a kernel
  function automatic logic [3:0] calc_res_limit(kernel_cfg_t k);
    logic [3:0] lim;
    lim = 4'd1;
    for (int i = 2; i <= MAX_CTA; i++) begin
      if (i * int'(k.regs_per_cta)    <= REGS_PER_CORE &&
          i * int'(k.threads_per_cta) <= THREADS_PER_CORE &&
          i * int'(k.smem_per_cta)    <= SMEM_PER_CORE)
        lim = 4'(i);
    end
    return lim;
  endfunction

  logic [15:0] next_cta, retired;
  logic [CW-1:0] rr_ptr;
  logic          found;
  logic [CW-1:0] pick;
  logic [4:0]    n_done;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 0; i < NUM_CORES; i++) begin
      int c;
      c = int'(rr_ptr) + i;
      if (c >= NUM_CORES) c = c - NUM_CORES;
      if (!found && active[c] < core_limit[c] && active[c] < res_limit) begin
        found = 1'b1;
        pick  = CW'(c);
      end
    end
    n_done = '0;
    for (int c = 0; c < NUM_CORES; c++) n_done = n_done + 5'(cta_done[c]);
  end

  logic do_disp;
  assign do_disp = busy && found && (next_cta < cfg_r.num_ctas);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cfg_r       <= '0;
      res_limit   <= 4'd1;
      next_cta    <= '0;
      retired     <= '0;
      rr_ptr      <= '0;
      disp_valid  <= 1'b0;
      disp_core   <= '0;
      disp_cta    <= '0;
      kernel_done <= 1'b0;
      for (int c = 0; c < NUM_CORES; c++) active[c] <= '0;
    end else begin
      disp_valid  <= 1'b0;
      kernel_done <= 1'b0;
      if (!busy) begin
        if (launch) begin
          busy      <= 1'b1;
          cfg_r     <= cfg;
          res_limit <= calc_res_limit(cfg);
          next_cta  <= '0;
          retired   <= '0;
          rr_ptr    <= '0;
          for (int c = 0; c < NUM_CORES; c++) active[c] <= '0;
        end
      end else begin
        for (int c = 0; c < NUM_CORES; c++) begin
          active[c] <= active[c] + 4'(do_disp && pick == CW'(c)) - 4'(cta_done[c] && active[c] != 0);
        end
        if (do_disp) begin
          disp_valid <= 1'b1;
          disp_core  <= pick;
          disp_cta   <= next_cta;
          next_cta   <= next_cta + 16'd1;
          rr_ptr     <= (pick == CW'(NUM_CORES - 1)) ? '0 : pick + 1'b1;
        end
        retired <= retired + 16'(n_done);
        if (next_cta == cfg_r.num_ctas && retired + 16'(n_done) >= cfg_r.num_ctas) begin
          busy        <= 1'b0;
          kernel_done <= 1'b1;
        end
      end
    end
  end

  // dispatches stay inside the grid, and a kernel ends only once
  a_cta_in_grid: assert property (@(posedge clk) disable iff (!rst_n)
                                  disp_valid |-> disp_cta < cfg_r.num_ctas);
  a_done_pulse:  assert property (@(posedge clk) disable iff (!rst_n)
                                  kernel_done |=> !kernel_done);
endmodule
