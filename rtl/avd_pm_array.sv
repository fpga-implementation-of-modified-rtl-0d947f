// avd_pm_array: path metric control and path metric array.
//
// Holds the survivor list of the adaptive Viterbi decoder, NMAX slots of
// {valid, state, metric, slack}. When a stage is loaded, the path metric
// control rescales each new metric by the stage minimum (so stored metrics
// are relative to PMmin and stay within 0..T) and precomputes the slack
// T - metric that the reformulated threshold selection compares branch
// metrics with. init_i loads the start list: a single survivor in state 0
// with metric 0; its slack is T itself, read from thresh_i. init_i takes
// priority over load_i.
//
// Interface: thresh_i is the discarding threshold T (0..T_MAX); the new_*
// inputs come from the ACS; surv_* outputs are the saved list.
// Timing: one register stage; asynchronous active-low reset to the start
// list (a choice of this design).
module avd_pm_array #(
  parameter int unsigned K     = avd_pkg::K_DEF,
  parameter int unsigned NMAX  = avd_pkg::NMAX_DEF,
  parameter int unsigned Q     = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX = avd_pkg::T_MAX_DEF,
  localparam int unsigned S_W  = K - 1,
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX),
  localparam int unsigned T_W  = $clog2(T_MAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init_i,
  input  logic                      load_i,
  input  logic [T_W-1:0]            thresh_i,
  input  logic [NMAX-1:0]           new_valid_i,
  input  logic [NMAX-1:0][S_W-1:0]  new_state_i,
  input  logic [NMAX-1:0][PM_W-1:0] new_pm_i,
  input  logic [PM_W-1:0]           min_i,
  output logic [NMAX-1:0]           surv_valid_o,
  output logic [NMAX-1:0][S_W-1:0]  surv_state_o,
  output logic [NMAX-1:0][PM_W-1:0] surv_pm_o,
  output logic [NMAX-1:0][PM_W-1:0] surv_slack_o
);

  logic [PM_W-1:0] t_eff;
  assign t_eff = (PM_W'(thresh_i) > PM_W'(T_MAX)) ? PM_W'(T_MAX) : PM_W'(thresh_i);

  // fresh marks the start list (one survivor, state 0, metric 0); its
  // slack is simply T, taken straight from thresh_i.
  logic                      fresh;
  logic [NMAX-1:0][PM_W-1:0] slack_q;
  logic [NMAX-1:0][PM_W-1:0] pm_resc, slack_new;

  // Path metric control: rescale by the stage minimum, precompute slack.
  always_comb begin
    for (int k = 0; k < NMAX; k++) begin
      pm_resc[k]   = new_pm_i[k] - min_i;
      slack_new[k] = (pm_resc[k] > t_eff) ? '0 : t_eff - pm_resc[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh        <= 1'b1;
      surv_valid_o <= NMAX'(1);
      surv_state_o <= '0;
      surv_pm_o    <= '0;
      slack_q      <= '0;
    end else if (init_i) begin
      fresh        <= 1'b1;
      surv_valid_o <= NMAX'(1);
      surv_state_o <= '0;
      surv_pm_o    <= '0;
      slack_q      <= '0;
    end else if (load_i) begin
      fresh        <= 1'b0;
      surv_valid_o <= new_valid_i;
      surv_state_o <= new_state_i;
      surv_pm_o    <= pm_resc;
      slack_q      <= slack_new;
    end
  end

  always_comb
    for (int k = 0; k < NMAX; k++) surv_slack_o[k] = fresh ? t_eff : slack_q[k];

endmodule
