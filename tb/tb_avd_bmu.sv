// tb_avd_bmu: exhaustive test of the branch metric unit at Q = 3.
// For every pair of received levels and every expected code pair the
// metric must be the sum, over both code bits, of the level (expected 0)
// or 7 minus the level (expected 1).
module tb_avd_bmu;
  localparam int Q = avd_pkg::Q_DEF;
  localparam int BM_W = avd_pkg::bm_width(Q);
  logic [1:0][Q-1:0] rx;
  logic [3:0][BM_W-1:0] bm;
  int checks = 0, failures = 0;

  avd_bmu dut (.rx_i(rx), .bm_o(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r0 = 0; r0 < (1 << Q); r0++)
      for (int r1 = 0; r1 < (1 << Q); r1++) begin
        rx[0] = Q'(r0); rx[1] = Q'(r1);
        #1;
        for (int c = 0; c < 4; c++) begin
          automatic int e0 = c % 2, e1 = c / 2, lvl = (1 << Q) - 1;
          automatic int exp = ((e0 != 0) ? lvl - r0 : r0) + ((e1 != 0) ? lvl - r1 : r1);
          checks++;
          if (int'(bm[c]) != exp) begin
            failures++;
            $display("FAIL rx=%0d,%0d code=%0d got %0d exp %0d", r0, r1, c, bm[c], exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
