// tb_avd_fig4_example: the worked K = 3 example of the adaptive algorithm,
// run through the complete decoder. The decoder is built for K = 3, code
// generators 7 and 5 (octal), hard decisions (Q = 1), N_max = 4 slots used
// with nmax_i = 3, threshold T = 1 and a decision depth of 5. The received
// sequence 01 10 11 01 00 (two channel errors on the codeword of 1 0 0 0 0)
// is followed by four error-free 00 symbols to push the decisions out. The
// decoder must report 2, 3, 2, 3, 3 survivors for the first five stages
// (the example's trellis) and deliver 1 0 0 0 0 as its first five bits,
// the first one exactly one clock after the fifth symbol.
module tb_avd_fig4_example;
  localparam int N_W = 3, T_W = 5;
  logic clk = 0, rst_n = 0, start = 0, iv = 0;
  logic [1:0][0:0] rx;
  logic dv, db, lost;
  logic [N_W-1:0] cnt;
  int checks = 0, failures = 0;

  adaptive_viterbi_decoder #(.K(3), .NMAX(4), .Q(1), .T_MAX(30), .TB_LEN(5),
                             .G0(32'o7), .G1(32'o5)) dut (
    .clk, .rst_n, .start_i(start), .in_valid_i(iv), .rx_i(rx), .thresh_i(T_W'(1)),
    .nmax_i(N_W'(3)), .dec_valid_o(dv), .dec_bit_o(db), .surv_count_o(cnt), .lost_o(lost));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  int sym [9] = '{1, 2, 3, 1, 0, 0, 0, 0, 0};   // 01 10 11 01 00 00 00 00 00
  int exp_cnt [5] = '{2, 3, 2, 3, 3};
  int exp_bits [5] = '{1, 0, 0, 0, 0};

  initial begin
    automatic int nd = 0;
    rx = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 9; t++) begin
      @(negedge clk);
      iv = 1;
      rx[0] = 1'(sym[t] >> 1);     // first printed bit: generator 7
      rx[1] = 1'(sym[t]);
      @(posedge clk); #1;
      iv = 0;
      if (t < 5) chk($sformatf("survivors after symbol %0d", t + 1), int'(cnt), exp_cnt[t]);
      chk("lost", int'(lost), 0);
      chk($sformatf("dec_valid after symbol %0d", t + 1), int'(dv), int'(t >= 4));
      if (dv) begin
        chk($sformatf("decoded bit %0d", nd), int'(db), exp_bits[nd]);
        nd++;
      end
    end
    chk("decoded bits", nd, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
