// tb_avd_pm_adder: random survivor lists at the default K = 9, N_max = 16.
// For each candidate 2*i+u the testbench works out the next state, the
// expected code from the generator taps and the accumulated metric itself.
module tb_avd_pm_adder;
  localparam int K = avd_pkg::K_DEF, NMAX = avd_pkg::NMAX_DEF, Q = avd_pkg::Q_DEF;
  localparam int T_MAX = avd_pkg::T_MAX_DEF;
  localparam int S_W = K - 1, BM_W = avd_pkg::bm_width(Q), PM_W = avd_pkg::pm_width(Q, T_MAX);
  localparam int NC = 2 * NMAX;
  localparam logic [31:0] G0 = avd_pkg::G0_DEF, G1 = avd_pkg::G1_DEF;

  logic [NMAX-1:0] sv;
  logic [NMAX-1:0][S_W-1:0] ss;
  logic [NMAX-1:0][PM_W-1:0] sp;
  logic [3:0][BM_W-1:0] bm;
  logic [NC-1:0] cv, cl;
  logic [NC-1:0][S_W-1:0] cs;
  logic [NC-1:0][PM_W-1:0] cp;
  logic [NC-1:0][BM_W-1:0] cb;
  int checks = 0, failures = 0;

  avd_pm_adder dut (.surv_valid_i(sv), .surv_state_i(ss), .surv_pm_i(sp), .bm_i(bm),
    .cand_valid_o(cv), .cand_state_o(cs), .cand_pm_o(cp), .cand_bm_o(cb), .cand_plsb_o(cl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < NMAX; i++) begin
        sv[i] = 1'($urandom); ss[i] = S_W'($urandom); sp[i] = PM_W'($urandom_range(0, 30));
      end
      for (int c = 0; c < 4; c++) bm[c] = BM_W'($urandom_range(0, 14));
      #1;
      for (int i = 0; i < NMAX; i++)
        for (int u = 0; u < 2; u++) begin
          automatic int c = 2 * i + u, s = int'(ss[i]), code0 = 0, code1 = 0, ns, code;
          // taps: bit K-1 of G is the current input, bit j < K-1 state bit j
          for (int j = 0; j < K; j++) begin
            automatic int v = (j == K - 1) ? u : (s >> j) & 1;
            if (G0[j]) code0 ^= v;
            if (G1[j]) code1 ^= v;
          end
          code = code1 * 2 + code0;
          ns = (u << (K - 2)) + (s >> 1);
          chk("valid", int'(cv[c]), int'(sv[i]));
          chk("state", int'(cs[c]), ns);
          chk("bm", int'(cb[c]), int'(bm[code]));
          chk("pm", int'(cp[c]), int'(sp[i]) + int'(bm[code]));
          chk("plsb", int'(cl[c]), s & 1);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
