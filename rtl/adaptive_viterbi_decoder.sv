// adaptive_viterbi_decoder: adaptive (T-algorithm) Viterbi decoder for a
// rate-1/2 convolutional code.
//
// Instead of updating all 2^(K-1) trellis states every stage, the decoder
// keeps a short list of at most N_max survivors. Each stage it extends
// every survivor by both input bits, drops successors whose metric exceeds
// the previous stage minimum by more than the threshold T (rule 1), merges
// successors that meet in one state, and keeps the best N_max of the rest
// (rule 2). Metrics are rescaled by the stage minimum, which lets the
// threshold test run as bm <= T - pm in parallel with the additions.
//
// Blocks: branch metric unit (avd_bmu) -> adaptive ACS (avd_acs) ->
// path metric array (avd_pm_array, fed back to the ACS) and survivor
// memory (avd_survivor_mem); avd_control sequences them.
//
// Interface: one symbol per clock when in_valid_i is high (there is no
// back-pressure). rx_i[b] is the Q-bit level of code bit b (0 = confident
// 0). thresh_i (T) and nmax_i (N_max, 1..NMAX) are meant to be set before a
// stream; start_i restarts from state 0. dec_bit_o/dec_valid_o deliver one
// decoded bit per symbol once TB_LEN symbols have been taken: the bit of
// symbol n appears one clock after symbol n+TB_LEN-1 is taken.
// surv_count_o gives the number of survivors kept at the last stage and
// lost_o pulses when no path met the threshold and the decoder restarted.
// Concurrent assertions check that the survivor slots stay a compact
// prefix, that the survivor count stays within NMAX and that a decoded bit
// only follows a loaded stage. rst_n both resets the flops asynchronously
// and disables these clocked assertions; Verilator's lint notes that mixed
// use of the one net (SYNCASYNCNET), which is intended here.
// Defaults: K = 9, N_max = 16, 3-bit inputs and T up to 30 follow the
// main configuration of the architecture; the generators 561/753 (octal),
// the depth TB_LEN = 45 and the restart behaviour are this design's
// choices.
module adaptive_viterbi_decoder #(
  parameter int unsigned K      = avd_pkg::K_DEF,
  parameter int unsigned NMAX   = avd_pkg::NMAX_DEF,
  parameter int unsigned Q      = avd_pkg::Q_DEF,
  parameter int unsigned T_MAX  = avd_pkg::T_MAX_DEF,
  parameter int unsigned TB_LEN = avd_pkg::TB_LEN_DEF,
  parameter logic [31:0] G0     = avd_pkg::G0_DEF,
  parameter logic [31:0] G1     = avd_pkg::G1_DEF,
  localparam int unsigned T_W   = $clog2(T_MAX + 1),
  localparam int unsigned N_W   = $clog2(NMAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic                 in_valid_i,
  input  logic [1:0][Q-1:0]    rx_i,
  input  logic [T_W-1:0]       thresh_i,
  input  logic [N_W-1:0]       nmax_i,
  output logic                 dec_valid_o,
  output logic                 dec_bit_o,
  output logic [N_W-1:0]       surv_count_o,
  output logic                 lost_o
);

  localparam int unsigned S_W  = K - 1;
  localparam int unsigned BM_W = avd_pkg::bm_width(Q);
  localparam int unsigned PM_W = avd_pkg::pm_width(Q, T_MAX);
  localparam int unsigned I_W  = (NMAX > 1) ? $clog2(NMAX) : 1;

  logic [3:0][BM_W-1:0]      bm;
  logic [NMAX-1:0]           surv_valid;
  logic [NMAX-1:0][S_W-1:0]  surv_state;
  logic [NMAX-1:0][PM_W-1:0] surv_pm, surv_slack;
  logic [NMAX-1:0]           new_valid, new_bit;
  logic [NMAX-1:0][S_W-1:0]  new_state;
  logic [NMAX-1:0][PM_W-1:0] new_pm;
  logic [NMAX-1:0][I_W-1:0]  new_parent;
  logic [PM_W-1:0]           min_pm;
  logic [N_W-1:0]            count;
  logic                      path_valid, init, load;

  avd_bmu #(.Q(Q)) u_bmu (.rx_i, .bm_o(bm));

  avd_acs #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX), .G0(G0), .G1(G1)) u_acs (
    .surv_valid_i(surv_valid), .surv_state_i(surv_state), .surv_pm_i(surv_pm),
    .surv_slack_i(surv_slack), .bm_i(bm), .nmax_i,
    .new_valid_o(new_valid), .new_state_o(new_state), .new_pm_o(new_pm),
    .new_parent_o(new_parent), .new_bit_o(new_bit), .min_o(min_pm),
    .count_o(count), .path_valid_o(path_valid)
  );

  avd_pm_array #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX)) u_pm (
    .clk, .rst_n, .init_i(init), .load_i(load), .thresh_i,
    .new_valid_i(new_valid), .new_state_i(new_state), .new_pm_i(new_pm), .min_i(min_pm),
    .surv_valid_o(surv_valid), .surv_state_o(surv_state), .surv_pm_o(surv_pm),
    .surv_slack_o(surv_slack)
  );

  avd_survivor_mem #(.NMAX(NMAX), .TB_LEN(TB_LEN)) u_sm (
    .clk, .rst_n, .init_i(init), .load_i(load), .parent_i(new_parent), .bit_i(new_bit),
    .dec_bit_o(dec_bit_o)
  );

  avd_control #(.TB_LEN(TB_LEN)) u_ctrl (
    .clk, .rst_n, .start_i, .in_valid_i, .path_valid_i(path_valid),
    .init_o(init), .load_o(load), .out_valid_o(dec_valid_o), .lost_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    surv_count_o <= N_W'(1);
    else if (init) surv_count_o <= N_W'(1);
    else if (load) surv_count_o <= count;
  end

  // Invariants of the survivor list and the control, checked in simulation.
  // The contender fills slots from 0 upward, so the valid slots form a
  // prefix and slot 0 (the best path) is always occupied.
  a_list_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    surv_valid[0] && ((surv_valid & (surv_valid + NMAX'(1))) == '0));
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    32'(surv_count_o) <= NMAX);
  a_init_xor_load: assert property (@(posedge clk) disable iff (!rst_n) !(init && load));
  a_out_after_load: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid_o |-> $past(load));

endmodule
