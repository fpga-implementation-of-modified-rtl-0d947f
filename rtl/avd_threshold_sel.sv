// avd_threshold_sel: threshold selection (rule 1) of the adaptive ACS, in
// its reformulated form.
//
// Rule 1 keeps a successor only if its metric is at most PMmin(n) + T,
// where PMmin(n) is the smallest survivor metric of the previous stage.
// The decoder stores every survivor metric relative to that minimum, so the
// rule reads pm_i + bm <= T, or bm <= T - pm_i. The slack T - pm_i is
// computed once, when pm_i is written into the path metric array, so this
// unit is a single small comparison per candidate that runs in parallel
// with the path metric adder instead of after it.
//
// Interface: cand_bm_i is the branch metric of candidate c = 2*i + u,
// slack_i the slack of survivor slot i; pass_o[c] is set when the candidate
// lies within the threshold. Timing: purely combinational.
module avd_threshold_sel #(
  parameter int unsigned NMAX = avd_pkg::NMAX_DEF,
  parameter int unsigned Q    = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX = avd_pkg::T_MAX_DEF,
  localparam int unsigned BM_W = avd_pkg::bm_width(Q),
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX),
  localparam int unsigned NC   = 2 * NMAX
) (
  input  logic [NC-1:0][BM_W-1:0]   cand_bm_i,
  input  logic [NMAX-1:0][PM_W-1:0] slack_i,
  output logic [NC-1:0]             pass_o
);

  always_comb begin
    for (int c = 0; c < NC; c++)
      pass_o[c] = PM_W'(cand_bm_i[c]) <= slack_i[c/2];
  end

endmodule
