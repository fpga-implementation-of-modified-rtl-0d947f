// tb_avd_state_merge: candidates are built from random survivor lists with
// distinct states (K = 5, N_max = 8, so merges are frequent). For every
// next state the testbench picks the winner on its own (smallest metric,
// predecessor LSB 0 on a tie) and checks that exactly that candidate wins.
module tb_avd_state_merge;
  localparam int K = 5, NMAX = 8, Q = 3, T_MAX = 30;
  localparam int S_W = K - 1, NS = 1 << S_W, NC = 2 * NMAX;
  localparam int PM_W = avd_pkg::pm_width(Q, T_MAX);
  logic [NC-1:0] cv, cl, win;
  logic [NC-1:0][S_W-1:0] cs;
  logic [NC-1:0][PM_W-1:0] cp;
  int checks = 0, failures = 0, merges = 0, ties = 0;

  avd_state_merge #(.K(K), .NMAX(NMAX), .Q(Q), .T_MAX(T_MAX)) dut (
    .cand_valid_i(cv), .cand_state_i(cs), .cand_pm_i(cp), .cand_plsb_i(cl), .win_o(win));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      automatic int st [$];
      automatic int best [NS];
      // distinct survivor states
      for (int s = 0; s < NS; s++) st.push_back(s);
      st.shuffle();
      for (int i = 0; i < NMAX; i++) begin
        automatic bit vi = ($urandom_range(0, 4) != 0);
        for (int u = 0; u < 2; u++) begin
          cv[2*i+u] = vi;
          cs[2*i+u] = S_W'((u << (S_W - 1)) | (st[i] >> 1));
          cl[2*i+u] = 1'(st[i] & 1);
          cp[2*i+u] = PM_W'($urandom_range(0, 6));
        end
      end
      #1;
      for (int s = 0; s < NS; s++) best[s] = -1;
      for (int c = 0; c < NC; c++) begin
        automatic int s = int'(cs[c]);
        if (!cv[c]) continue;
        if (best[s] < 0) best[s] = c;
        else begin
          automatic int b = best[s];
          merges++;
          if (cp[c] == cp[b]) ties++;
          if (cp[c] < cp[b] || (cp[c] == cp[b] && cl[c] == 1'b0)) best[s] = c;
        end
      end
      for (int c = 0; c < NC; c++) begin
        automatic bit exp = cv[c] && best[int'(cs[c])] == c;
        checks++;
        if (win[c] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL it=%0d c=%0d win=%0d exp=%0d", it, c, win[c], exp);
        end
      end
    end
    checks++;
    if (merges == 0 || ties == 0) failures++;
    $display("merges=%0d ties=%0d", merges, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
