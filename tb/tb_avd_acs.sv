// tb_avd_acs: runs the adaptive ACS on the worked K = 3 example of the
// adaptive algorithm: code generators 7 and 5 (octal), hard decisions
// (Q = 1), threshold T = 1, N_max = 3, start in state 00 with metric 0,
// received sequence 01 10 11 01 00. The testbench holds the survivor list
// itself (rescaling by the stage minimum and forming the slack T - pm), and
// after every stage compares the surviving states and their absolute
// metrics with the example's trellis, and the stage minimum with its
// dm row (1, 1, 1, 2, 2). Tracing the parent pointers back from slot 0
// after the last stage must give the decision path 00-10-01-00-00-00,
// i.e. the decoded bits 1 0 0 0 0.
module tb_avd_acs;
  localparam int K = 3, NMAX = 4, Q = 1, T_MAX = 30;
  localparam int S_W = K - 1, BM_W = avd_pkg::bm_width(Q), PM_W = avd_pkg::pm_width(Q, T_MAX);
  localparam int I_W = 2, N_W = 3, T = 1;

  logic [NMAX-1:0] sv, nv, nb;
  logic [NMAX-1:0][S_W-1:0] ss, ns;
  logic [NMAX-1:0][PM_W-1:0] sp, sl, np;
  logic [NMAX-1:0][I_W-1:0] npar;
  logic [3:0][BM_W-1:0] bm;
  logic [PM_W-1:0] mn;
  logic [N_W-1:0] cnt, nmax;
  logic pv;
  int checks = 0, failures = 0;

  avd_acs #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX), .G0(32'o7), .G1(32'o5)) dut (
    .surv_valid_i(sv), .surv_state_i(ss), .surv_pm_i(sp), .surv_slack_i(sl), .bm_i(bm),
    .nmax_i(nmax), .new_valid_o(nv), .new_state_o(ns), .new_pm_o(np), .new_parent_o(npar),
    .new_bit_o(nb), .min_o(mn), .count_o(cnt), .path_valid_o(pv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  // received symbols: first printed bit is the G0 code bit
  int rx  [5] = '{1, 2, 3, 1, 0};   // 01 10 11 01 00
  // expected absolute metric per state 00,01,10,11 after each stage (-1: no survivor)
  int exp_pm [5][4] = '{'{1, -1, 1, -1}, '{2, 1, 2, -1}, '{1, -1, 2, -1},
                        '{2, -1, 2, 2},  '{2, 3, -1, 3}};
  int exp_dm [5] = '{1, 1, 1, 2, 2};
  int par_hist [5][NMAX];
  int bit_hist [5][NMAX];

  initial begin
    automatic int base = 0;    // absolute value of the stage minimum the list is relative to
    nmax = N_W'(3);
    sv = 4'b0001; ss = '0; sp = '0;
    for (int k = 0; k < NMAX; k++) sl[k] = PM_W'(T);
    for (int t = 0; t < 5; t++) begin
      // hard-decision Hamming branch metrics
      for (int c = 0; c < 4; c++) begin
        automatic int r0 = (rx[t] >> 1) & 1, r1 = rx[t] & 1;   // printed order: G0 bit first
        bm[c] = BM_W'((r0 ^ (c & 1)) + (r1 ^ (c >> 1)));
      end
      #1;
      chk("path_valid", int'(pv), 1);
      chk("dm", base + int'(mn), exp_dm[t]);
      begin
        automatic int n = 0;
        for (int s = 0; s < 4; s++) if (exp_pm[t][s] >= 0) n++;
        chk("count", int'(cnt), n);
      end
      for (int k = 0; k < NMAX; k++) begin
        par_hist[t][k] = int'(npar[k]);
        bit_hist[t][k] = int'(nb[k]);
        if (nv[k]) chk($sformatf("t%0d state %0d metric", t + 1, ns[k]), base + int'(np[k]), exp_pm[t][ns[k]]);
      end
      for (int s = 0; s < 4; s++) begin
        automatic bit found = 0;
        for (int k = 0; k < NMAX; k++) if (nv[k] && int'(ns[k]) == s) found = 1;
        chk($sformatf("t%0d state %0d present", t + 1, s), int'(found), int'(exp_pm[t][s] >= 0));
      end
      // slot 0 must hold the best path
      chk("slot0 best", base + int'(np[0]), exp_dm[t]);
      // register the new list, rescaled by the minimum
      base = base + int'(mn);
      begin
        automatic logic [NMAX-1:0][PM_W-1:0] m = np;
        automatic logic [PM_W-1:0] mnv = mn;
        sv = nv; ss = ns;
        for (int k = 0; k < NMAX; k++) begin
          sp[k] = m[k] - mnv;
          sl[k] = (int'(sp[k]) > T) ? '0 : PM_W'(T - int'(sp[k]));
        end
      end
    end
    // trace back from slot 0 of the last stage
    begin
      automatic int slot = 0;
      automatic int bits [5];
      for (int t = 4; t >= 0; t--) begin
        bits[t] = bit_hist[t][slot];
        slot = par_hist[t][slot];
      end
      chk("decoded", bits[0]*16 + bits[1]*8 + bits[2]*4 + bits[3]*2 + bits[4], 16);   // 1 0 0 0 0
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
