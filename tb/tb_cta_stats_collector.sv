// tb_cta_stats_collector: drives random cache, DRAM, latency and issue
// events around one profiled CTA and checks that only the events between
// that CTA's start and end are counted, that the working set equals the
// number of distinct lines touched, that stats_valid pulses exactly once
// the cycle after the end, and that a new arm clears everything.
module tb_cta_stats_collector;
  import md_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic arm = 0, cta_start = 0, cta_end = 0;
  logic mem_access = 0, dram_read = 0, lat_valid = 0, warp_inst = 0;
  logic [31:0] mem_addr = 0;
  logic [15:0] lat_cycles = 0;
  logic collecting, stats_valid;
  cta_stats_t stats;
  int checks = 0, failures = 0;

  cta_stats_collector dut (.*);

  longint e_acc, e_dr, e_wi, e_lsum, e_lcnt;
  bit seen [4096];
  int e_ws, n_valid;

  always @(posedge clk) if (stats_valid) n_valid++;

  task automatic noise(int cycles, bit count);
    repeat (cycles) begin
      @(negedge clk);
      mem_access = $urandom_range(1);
      mem_addr   = {8'd0, 12'($urandom_range(NLINES - 1)), 7'($urandom)} ;
      dram_read  = $urandom_range(1);
      lat_valid  = $urandom_range(1);
      lat_cycles = 16'($urandom_range(600, 200));
      warp_inst  = $urandom_range(1);
      if (count) begin
        e_acc += mem_access; e_dr += dram_read; e_wi += warp_inst;
        if (lat_valid) begin e_lsum += lat_cycles; e_lcnt++; end
        if (mem_access && !seen[mem_addr[18:7]]) begin seen[mem_addr[18:7]] = 1; e_ws++; end
      end
    end
    @(negedge clk);
    {mem_access, dram_read, lat_valid, warp_inst} = '0;
  endtask

  int NLINES;

  task automatic profile(int lines, int len);
    NLINES = lines;
    e_acc = 0; e_dr = 0; e_wi = 0; e_lsum = 0; e_lcnt = 0; e_ws = 0; n_valid = 0;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    noise(20, 0);                      // before the CTA starts: ignored
    @(negedge clk); cta_start = 1; @(negedge clk); cta_start = 0;
    noise(len, 1);
    @(negedge clk); cta_end = 1;
    @(negedge clk); cta_end = 0;
    checks++;
    if (!stats_valid) begin failures++; $display("FAIL stats_valid not the cycle after cta_end"); end
    noise(20, 0);                      // after the end: ignored
    checks += 7;
    if (stats.accesses   != cnt_t'(e_acc))  begin failures++; $display("FAIL acc %0d %0d", stats.accesses, e_acc); end
    if (stats.dram_reads != cnt_t'(e_dr))   begin failures++; $display("FAIL dr"); end
    if (stats.warp_insts != cnt_t'(e_wi))   begin failures++; $display("FAIL wi"); end
    if (stats.lat_sum    != cnt_t'(e_lsum)) begin failures++; $display("FAIL lsum"); end
    if (stats.lat_cnt    != cnt_t'(e_lcnt)) begin failures++; $display("FAIL lcnt"); end
    if (stats.ws_lines   != cnt_t'(e_ws))   begin failures++; $display("FAIL ws %0d %0d", stats.ws_lines, e_ws); end
    if (n_valid != 1) begin failures++; $display("FAIL %0d stats_valid pulses", n_valid); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    profile(70, 500);
    profile(3000, 4000);
    profile(8, 200);
    // a new arm clears the statistics
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    checks++;
    if (stats.accesses != 0 || stats.ws_lines != 0) begin failures++; $display("FAIL arm did not clear"); end
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
