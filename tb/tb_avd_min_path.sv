// tb_avd_min_path: random masked metric vectors (including an empty mask
// and a single set bit); min_o must be the smallest unmasked metric and
// any_o must tell whether the mask is empty.
module tb_avd_min_path;
  localparam int N = 2 * avd_pkg::NMAX_DEF;
  localparam int PM_W = avd_pkg::pm_width(avd_pkg::Q_DEF, avd_pkg::T_MAX_DEF);
  logic [N-1:0] v;
  logic [N-1:0][PM_W-1:0] pm;
  logic [PM_W-1:0] mn;
  logic any;
  int checks = 0, failures = 0;

  avd_min_path dut (.valid_i(v), .pm_i(pm), .min_o(mn), .any_o(any));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      automatic int exp = -1;
      for (int c = 0; c < N; c++) pm[c] = PM_W'($urandom);
      case (it % 4)
        0: v = '0;
        1: v = N'(1) << $urandom_range(0, N - 1);
        default: for (int c = 0; c < N; c++) v[c] = ($urandom_range(0, 3) != 0);
      endcase
      #1;
      for (int c = 0; c < N; c++) if (v[c] && (exp < 0 || int'(pm[c]) < exp)) exp = int'(pm[c]);
      checks += 2;
      if (any != (exp >= 0)) failures++;
      if (exp >= 0 && int'(mn) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", mn, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
