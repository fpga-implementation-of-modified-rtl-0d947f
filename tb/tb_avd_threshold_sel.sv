// tb_avd_threshold_sel: random branch metrics and slacks; a candidate must
// pass exactly when its branch metric is at most the slack of its
// survivor (candidate c belongs to survivor c/2), including equality.
module tb_avd_threshold_sel;
  localparam int NMAX = avd_pkg::NMAX_DEF, Q = avd_pkg::Q_DEF, T_MAX = avd_pkg::T_MAX_DEF;
  localparam int BM_W = avd_pkg::bm_width(Q), PM_W = avd_pkg::pm_width(Q, T_MAX), NC = 2 * NMAX;
  logic [NC-1:0][BM_W-1:0] bm;
  logic [NMAX-1:0][PM_W-1:0] sl;
  logic [NC-1:0] pass;
  int checks = 0, failures = 0, n_eq = 0;

  avd_threshold_sel dut (.cand_bm_i(bm), .slack_i(sl), .pass_o(pass));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int i = 0; i < NMAX; i++) sl[i] = PM_W'($urandom_range(0, T_MAX));
      for (int c = 0; c < NC; c++)
        bm[c] = ($urandom_range(0, 3) == 0) ? BM_W'(sl[c/2] > 14 ? 14 : sl[c/2]) : BM_W'($urandom_range(0, 14));
      #1;
      for (int c = 0; c < NC; c++) begin
        automatic bit exp = int'(bm[c]) <= int'(sl[c/2]);
        if (int'(bm[c]) == int'(sl[c/2])) n_eq++;
        checks++;
        if (pass[c] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d bm=%0d slack=%0d pass=%0d", c, bm[c], sl[c/2], pass[c]);
        end
      end
    end
    checks++;
    if (n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
