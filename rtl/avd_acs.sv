// avd_acs: adaptive add-compare-select unit.
//
// One trellis stage of the adaptive (T-algorithm) Viterbi decoder. The
// path metric adder extends each of the up to NMAX survivors by both input
// bits. In parallel with the addition, the reformulated threshold
// selection tests each branch metric against the survivor's precomputed
// slack (rule 1), and the state merge performs the compare-select between
// candidates that meet in the same state. The min path calculation finds
// the new stage minimum among candidates that pass the threshold, and the
// survivor state contender keeps the best nmax_i of the remaining ones
// (rule 2), sorted by {metric, state}.
//
// Interface: survivor list in (valid, state, metric relative to the last
// stage minimum, slack = T - metric) and the four BMU metrics. Out: the new
// survivor list per slot (valid, state, metric before rescaling, parent
// slot, decision bit), the stage minimum, the survivor count and
// path_valid_o, low when no candidate met the threshold.
// Timing: purely combinational; the path metric array registers the result.
module avd_acs #(
  parameter int unsigned K     = avd_pkg::K_DEF,
  parameter int unsigned NMAX  = avd_pkg::NMAX_DEF,
  parameter int unsigned Q     = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX = avd_pkg::T_MAX_DEF,
  parameter logic [31:0] G0    = avd_pkg::G0_DEF,
  parameter logic [31:0] G1    = avd_pkg::G1_DEF,
  localparam int unsigned S_W  = K - 1,
  localparam int unsigned BM_W = avd_pkg::bm_width(Q),
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX),
  localparam int unsigned NC   = 2 * NMAX,
  localparam int unsigned C_W  = $clog2(NC),
  localparam int unsigned I_W  = (NMAX > 1) ? $clog2(NMAX) : 1,
  localparam int unsigned N_W  = $clog2(NMAX + 1)
) (
  input  logic [NMAX-1:0]           surv_valid_i,
  input  logic [NMAX-1:0][S_W-1:0]  surv_state_i,
  input  logic [NMAX-1:0][PM_W-1:0] surv_pm_i,
  input  logic [NMAX-1:0][PM_W-1:0] surv_slack_i,
  input  logic [3:0][BM_W-1:0]      bm_i,
  input  logic [N_W-1:0]            nmax_i,
  output logic [NMAX-1:0]           new_valid_o,
  output logic [NMAX-1:0][S_W-1:0]  new_state_o,
  output logic [NMAX-1:0][PM_W-1:0] new_pm_o,
  output logic [NMAX-1:0][I_W-1:0]  new_parent_o,
  output logic [NMAX-1:0]           new_bit_o,
  output logic [PM_W-1:0]           min_o,
  output logic [N_W-1:0]            count_o,
  output logic                      path_valid_o
);

  // Added-path bus
  logic [NC-1:0]           cand_valid;
  logic [NC-1:0][S_W-1:0]  cand_state;
  logic [NC-1:0][PM_W-1:0] cand_pm;
  logic [NC-1:0][BM_W-1:0] cand_bm;
  logic [NC-1:0]           cand_plsb;

  logic [NC-1:0] pass, win, elig, in_thr;
  logic [NC-1:0][PM_W+S_W-1:0] key;
  logic [NMAX-1:0][C_W-1:0]    src;

  avd_pm_adder #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX), .G0(G0), .G1(G1)) u_adder (
    .surv_valid_i, .surv_state_i, .surv_pm_i, .bm_i,
    .cand_valid_o(cand_valid), .cand_state_o(cand_state), .cand_pm_o(cand_pm),
    .cand_bm_o(cand_bm), .cand_plsb_o(cand_plsb)
  );

  avd_threshold_sel #(.NMAX(NMAX), .Q(Q), .T_MAX(T_MAX)) u_thr (
    .cand_bm_i(cand_bm), .slack_i(surv_slack_i), .pass_o(pass)
  );

  avd_state_merge #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX)) u_merge (
    .cand_valid_i(cand_valid), .cand_state_i(cand_state), .cand_pm_i(cand_pm),
    .cand_plsb_i(cand_plsb), .win_o(win)
  );

  assign in_thr = cand_valid & pass;
  assign elig   = win & pass;

  avd_min_path #(.N(NC), .PM_W(PM_W)) u_min (
    .valid_i(in_thr), .pm_i(cand_pm), .min_o(min_o), .any_o(path_valid_o)
  );

  always_comb
    for (int c = 0; c < NC; c++) key[c] = {cand_pm[c], cand_state[c]};

  avd_survivor_contender #(.NMAX(NMAX), .KEY_W(PM_W + S_W)) u_contender (
    .elig_i(elig), .key_i(key), .nmax_i, .slot_valid_o(new_valid_o),
    .slot_src_o(src), .count_o
  );

  // Move the chosen candidates into their slots.
  always_comb begin
    for (int k = 0; k < NMAX; k++) begin
      new_state_o[k]  = cand_state[src[k]];
      new_pm_o[k]     = cand_pm[src[k]];
      new_parent_o[k] = I_W'(src[k] >> 1);
      new_bit_o[k]    = src[k][0];
    end
  end

endmodule
