// tb_avd_pm_array: checks the start list after reset and after init_i
// (slot 0 = state 0, metric 0, slack = T taken from thresh_i), that a load
// stores the new list with each metric reduced by the stage minimum and the
// slack T - metric (0 when the metric exceeds T), that nothing changes
// without load_i, and that init_i wins over load_i. Default sizes.
module tb_avd_pm_array;
  localparam int K = avd_pkg::K_DEF, NMAX = avd_pkg::NMAX_DEF, Q = avd_pkg::Q_DEF;
  localparam int T_MAX = avd_pkg::T_MAX_DEF;
  localparam int S_W = K - 1, PM_W = avd_pkg::pm_width(Q, T_MAX), T_W = $clog2(T_MAX + 1);
  logic clk = 0, rst_n = 0, init = 0, load = 0;
  logic [T_W-1:0] thr;
  logic [NMAX-1:0] nv, sv;
  logic [NMAX-1:0][S_W-1:0] ns, ss;
  logic [NMAX-1:0][PM_W-1:0] np, sp, sl;
  logic [PM_W-1:0] mn;
  int checks = 0, failures = 0;

  avd_pm_array dut (.clk, .rst_n, .init_i(init), .load_i(load), .thresh_i(thr),
    .new_valid_i(nv), .new_state_i(ns), .new_pm_i(np), .min_i(mn),
    .surv_valid_o(sv), .surv_state_o(ss), .surv_pm_o(sp), .surv_slack_o(sl));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  task automatic chk_start(int t);
    chk("start valid", int'(sv), 1);
    chk("start state0", int'(ss[0]), 0);
    chk("start pm0", int'(sp[0]), 0);
    chk("start slack0", int'(sl[0]), t);
  endtask

  int e_pm [NMAX];
  int e_st [NMAX];
  bit e_v [NMAX];

  initial begin
    thr = T_W'(20); nv = '0; ns = '0; np = '0; mn = '0;
    #12;
    chk_start(20);
    thr = T_W'(25); #1;
    chk("start slack follows T", int'(sl[0]), 25);
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      automatic int t = $urandom_range(0, T_MAX);
      automatic int m = $urandom_range(0, 14);
      @(negedge clk);
      thr = T_W'(t); mn = PM_W'(m);
      for (int k = 0; k < NMAX; k++) begin
        e_v[k] = 1'($urandom); e_st[k] = $urandom_range(0, (1 << S_W) - 1);
        e_pm[k] = $urandom_range(0, T_MAX + 6);
        nv[k] = e_v[k]; ns[k] = S_W'(e_st[k]); np[k] = PM_W'(m + e_pm[k]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < NMAX; k++) begin
        chk("valid", int'(sv[k]), int'(e_v[k]));
        chk("state", int'(ss[k]), e_st[k]);
        chk("pm", int'(sp[k]), e_pm[k]);
        chk("slack", int'(sl[k]), (e_pm[k] > t) ? 0 : t - e_pm[k]);
      end
      // hold without load
      np = '0;
      @(negedge clk);
      for (int k = 0; k < NMAX; k++) chk("hold", int'(sp[k]), e_pm[k]);
    end
    // init has priority over load
    thr = T_W'(20);
    init = 1; load = 1;
    @(negedge clk);
    init = 0; load = 0;
    chk_start(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
