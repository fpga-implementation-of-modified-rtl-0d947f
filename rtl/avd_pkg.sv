// avd_pkg: constants and helper functions shared by the adaptive Viterbi decoder.
//
// The defaults describe the decoder's main configuration: a rate-1/2
// convolutional code of constraint length K = 9, 3-bit (8-level) received
// code bits, at most N_max = 16 survivors per trellis stage and a discarding
// threshold T of 20, adjustable up to 30. The generator polynomials are not
// fixed by the architecture; the defaults are the widely used K = 9 pair
// 561/753 (octal), a choice of this design.
//
// State convention: a state holds the last K-1 input bits with the newest
// bit in the MSB. Input u moves state s to {u, s[K-2:1]}, and the code bit of
// generator g is the parity of g & {u, s}.
package avd_pkg;

  localparam int unsigned K_DEF     = 9;
  localparam int unsigned NMAX_DEF  = 16;
  localparam int unsigned Q_DEF     = 3;
  localparam int unsigned T_DEF     = 20;
  localparam int unsigned T_MAX_DEF = 30;
  localparam int unsigned TB_LEN_DEF = 5 * K_DEF;
  localparam logic [31:0] G0_DEF    = 32'o561;
  localparam logic [31:0] G1_DEF    = 32'o753;

  // Width of a branch metric: two code bits, each contributing 0 .. 2^Q-1.
  function automatic int unsigned bm_width(int unsigned q);
    return $clog2(2 * ((1 << q) - 1) + 1);
  endfunction

  // Width of a stored or candidate path metric. Stored metrics are relative
  // to the previous stage minimum and never exceed T_MAX; a candidate adds
  // one branch metric on top.
  function automatic int unsigned pm_width(int unsigned q, int unsigned t_max);
    return $clog2(t_max + 2 * ((1 << q) - 1) + 1);
  endfunction

  // Code pair {c1, c0} emitted when input u leaves state s (K-1 bits wide,
  // right-aligned in a 32-bit word).
  function automatic logic [1:0] conv_code(logic [31:0] g0, logic [31:0] g1,
                                           int unsigned k, logic [31:0] s, logic u);
    logic [31:0] reg_bits;
    reg_bits = (s & ((32'd1 << (k - 1)) - 32'd1)) | (32'(u) << (k - 1));
    return {^(reg_bits & g1), ^(reg_bits & g0)};
  endfunction

endpackage
