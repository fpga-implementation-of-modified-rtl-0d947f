// avd_pm_adder: path metric adder of the adaptive ACS.
//
// Every survivor slot i is extended by both input bits u, giving 2*NMAX
// candidates with index c = 2*i + u. For each candidate the unit forms the
// next state {u, s[K-2:1]}, the expected code pair from the generator
// polynomials (which selects one of the four BMU metrics, the "BM select"),
// and the accumulated metric pm_i + bm. The metrics and states together
// form the added-path bus read by threshold selection, state merge, min
// path calculation and the survivor contender. One adder per candidate, as
// in the parallel adder bank of the architecture.
//
// Interface: survivor list in (valid, state, metric); candidate list out
// (valid, next state, metric, branch metric, LSB of the predecessor state).
// Timing: purely combinational. K must be at least 3.
module avd_pm_adder #(
  parameter int unsigned K    = avd_pkg::K_DEF,
  parameter int unsigned NMAX = avd_pkg::NMAX_DEF,
  parameter int unsigned Q    = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX = avd_pkg::T_MAX_DEF,
  parameter logic [31:0] G0   = avd_pkg::G0_DEF,
  parameter logic [31:0] G1   = avd_pkg::G1_DEF,
  localparam int unsigned S_W  = K - 1,
  localparam int unsigned BM_W = avd_pkg::bm_width(Q),
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX),
  localparam int unsigned NC   = 2 * NMAX
) (
  input  logic [NMAX-1:0]          surv_valid_i,
  input  logic [NMAX-1:0][S_W-1:0] surv_state_i,
  input  logic [NMAX-1:0][PM_W-1:0] surv_pm_i,
  input  logic [3:0][BM_W-1:0]     bm_i,
  output logic [NC-1:0]            cand_valid_o,
  output logic [NC-1:0][S_W-1:0]   cand_state_o,
  output logic [NC-1:0][PM_W-1:0]  cand_pm_o,
  output logic [NC-1:0][BM_W-1:0]  cand_bm_o,
  output logic [NC-1:0]            cand_plsb_o
);

  always_comb begin
    for (int i = 0; i < NMAX; i++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] code;
        code = avd_pkg::conv_code(G0, G1, K, 32'(surv_state_i[i]), u[0]);
        cand_valid_o[2*i+u] = surv_valid_i[i];
        cand_state_o[2*i+u] = {u[0], surv_state_i[i][S_W-1:1]};
        cand_bm_o[2*i+u]   = bm_i[code];
        cand_pm_o[2*i+u]   = surv_pm_i[i] + PM_W'(bm_i[code]);
        cand_plsb_o[2*i+u] = surv_state_i[i][0];
      end
    end
  end

endmodule
