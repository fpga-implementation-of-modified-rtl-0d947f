// avd_state_merge: state merge (compare-select) of the adaptive ACS.
//
// Two survivors whose states differ only in the LSB lead, for the same
// input bit, to the same next state. As in the compare-select step of the
// conventional Viterbi algorithm, only the better of the two may survive.
// Because survivors occupy arbitrary slots, every candidate is compared
// with every other one: a candidate loses if another valid candidate
// reaches the same state with a smaller metric, or with an equal metric
// from a predecessor whose state LSB is 0 (this design's tie rule, which
// makes the decoder deterministic).
//
// Interface: candidate valid, next state, metric and predecessor LSB in;
// win_o[c] set for a valid candidate not beaten by any other.
// Timing: purely combinational.
module avd_state_merge #(
  parameter int unsigned K    = avd_pkg::K_DEF,
  parameter int unsigned NMAX = avd_pkg::NMAX_DEF,
  parameter int unsigned Q    = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX = avd_pkg::T_MAX_DEF,
  localparam int unsigned S_W  = K - 1,
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX),
  localparam int unsigned NC   = 2 * NMAX
) (
  input  logic [NC-1:0]           cand_valid_i,
  input  logic [NC-1:0][S_W-1:0]  cand_state_i,
  input  logic [NC-1:0][PM_W-1:0] cand_pm_i,
  input  logic [NC-1:0]           cand_plsb_i,
  output logic [NC-1:0]           win_o
);

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      logic beaten;
      beaten = 1'b0;
      for (int d = 0; d < NC; d++) begin
        if (d != c && cand_valid_i[d] && cand_state_i[d] == cand_state_i[c] &&
            (cand_pm_i[d] < cand_pm_i[c] ||
             (cand_pm_i[d] == cand_pm_i[c] && !cand_plsb_i[d] && cand_plsb_i[c])))
          beaten = 1'b1;
      end
      win_o[c] = cand_valid_i[c] && !beaten;
    end
  end

endmodule
