// md_controller: the Multithreading Degree Controller inside the CTA
// scheduler. It sets, for every shader core, how many CTAs the scheduler
// may keep resident there (the effective CTA buffer size).
//
// Phases of a kernel:
//   PROFILE (from launch until the predictor answers): the prediction core
//     runs one CTA at a time; every other core runs at the default degree,
//     the full CTA buffer (MAX_CTA), both capped by the kernel's resource
//     limit res_limit.
//   TUNED (after md_valid): every core, the prediction core included, is
//     limited to the predicted degree md_ctas, capped by res_limit.
// A core that holds more CTAs than its new limit keeps them; it only
// receives no new CTA until it is under the limit again. Lowering a core's
// limit in place, rather than preempting CTAs, is this design's choice.
// Limits are registered and change the cycle after launch or md_valid.
module md_controller #(
  parameter int NUM_CORES = 15,
  parameter int MAX_CTA   = 8,
  parameter int PRED_CORE = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       launch,
  input  logic [3:0] res_limit,
  input  logic       md_valid,
  input  logic [3:0] md_ctas,
  output logic [3:0] core_limit [NUM_CORES],
  output logic       profiling,
  output logic       tuned,
  output logic [3:0] md_applied
);
  typedef enum logic [1:0] {P_IDLE, P_PROFILE, P_TUNED} phase_e;
  phase_e phase;

  logic [3:0] def_md, md_cap;

  always_comb begin
    def_md = (res_limit < 4'(MAX_CTA)) ? res_limit : 4'(MAX_CTA);
    md_cap = (md_applied < def_md) ? md_applied : def_md;
    for (int c = 0; c < NUM_CORES; c++) begin
      unique case (phase)
        P_PROFILE: core_limit[c] = (c == PRED_CORE) ? 4'd1 : def_md;
        P_TUNED:   core_limit[c] = md_cap;
        default:   core_limit[c] = def_md;
      endcase
    end
  end

  assign profiling = (phase == P_PROFILE);
  assign tuned     = (phase == P_TUNED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_IDLE;
      md_applied <= 4'(MAX_CTA);
    end else if (launch) begin
      phase      <= P_PROFILE;
      md_applied <= 4'(MAX_CTA);
    end else if (md_valid && phase == P_PROFILE) begin
      phase      <= P_TUNED;
      md_applied <= (md_ctas == 0) ? 4'd1 : md_ctas;
    end
  end

  // a core is never starved of CTAs entirely
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_chk
    a_limit_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                      res_limit != 0 |-> core_limit[c] != 0);
  end
endmodule
