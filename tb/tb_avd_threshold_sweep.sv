// tb_avd_threshold_sweep: the evaluated configuration (K = 9, rate 1/2,
// 3-bit inputs) with the threshold T set to 20, 25 and 30 (the range the
// architecture is meant for), for two survivor bounds side by side: the
// default decoder (N_max = 16, no parameters set) and one built with
// NMAX = 128 = 2^(K-2), the largest bound considered for this code. For
// each T and three channel noise levels, random bits are encoded, sent
// through a soft channel and decoded by both; the same symbols go through a
// full 256-state Viterbi decoder written in the testbench (same metric,
// same decision depth, best-state decision). Reported per run: decoded-bit
// errors and the average number of add-compare-select operations per stage
// (two per survivor for the adaptive decoders, 512 for the full one).
// Checks: every bit decoded and on time, no restart, no errors at the low
// noise level, at least a 70 % reduction of ACS operations with 16
// survivors, and with 128 survivors at T = 30 an error count close to the
// full decoder's. The other error counts are only reported: with 16
// survivors a K = 9 decoder that has lost the correct path can take
// hundreds of stages to find it again, so it makes bursts of errors where
// the full decoder makes few or none.
module tb_avd_threshold_sweep;
  localparam int K = avd_pkg::K_DEF, NMAX = avd_pkg::NMAX_DEF, Q = avd_pkg::Q_DEF;
  localparam int T_MAX = avd_pkg::T_MAX_DEF, L = avd_pkg::TB_LEN_DEF;
  localparam logic [31:0] G0 = avd_pkg::G0_DEF, G1 = avd_pkg::G1_DEF;
  localparam int NS = 1 << (K - 1), LVL = (1 << Q) - 1;
  localparam int T_W = $clog2(T_MAX + 1), N_W = $clog2(NMAX + 1);
  localparam int NBITS = 2000;

  logic clk = 0, rst_n = 0, start = 0, iv = 0;
  logic [1:0][Q-1:0] rx;
  logic [T_W-1:0] thr;
  logic [N_W-1:0] nmax;
  logic dv, db, lost;
  logic [N_W-1:0] cnt;
  localparam int NB = 128;
  localparam int NB_W = $clog2(NB + 1);
  logic dv_b, db_b, lost_b;
  logic [NB_W-1:0] cnt_b;
  int checks = 0, failures = 0;

  adaptive_viterbi_decoder dut (.clk, .rst_n, .start_i(start), .in_valid_i(iv), .rx_i(rx),
    .thresh_i(thr), .nmax_i(nmax), .dec_valid_o(dv), .dec_bit_o(db), .surv_count_o(cnt),
    .lost_o(lost));

  adaptive_viterbi_decoder #(.NMAX(NB)) dut_b (.clk, .rst_n, .start_i(start), .in_valid_i(iv),
    .rx_i(rx), .thresh_i(thr), .nmax_i(NB_W'(NB)), .dec_valid_o(dv_b), .dec_bit_o(db_b),
    .surv_count_o(cnt_b), .lost_o(lost_b));

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic int code_bit(logic [31:0] g, int s, int u);
    logic [31:0] r = (32'(u) << (K - 1)) | 32'(s);
    return int'(^(r & g));
  endfunction

  function automatic int channel(int c, int noise);
    int v = (c != 0) ? LVL : 0, n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(0, 2 * noise)) - noise;
    v += n / 2;
    return (v < 0) ? 0 : (v > LVL) ? LVL : v;
  endfunction

  // full Viterbi decoder (all 256 states), register exchange over L bits
  int          va_pm   [NS];
  logic [63:0] va_path [NS];

  task automatic va_init();
    for (int s = 0; s < NS; s++) begin va_pm[s] = (s == 0) ? 0 : 1 << 20; va_path[s] = '0; end
  endtask

  function automatic int va_step(int r0, int r1);   // returns the decided bit L-1 stages back
    int          npm  [NS];
    logic [63:0] npath[NS];
    int best = 0;
    for (int ns = 0; ns < NS; ns++) begin
      int u = ns >> (K - 2);
      npm[ns] = 1 << 30;
      for (int b = 0; b < 2; b++) begin
        int s = ((ns << 1) & (NS - 1)) | b;
        int e0 = code_bit(G0, s, u), e1 = code_bit(G1, s, u);
        int m = va_pm[s] + ((e0 != 0) ? LVL - r0 : r0) + ((e1 != 0) ? LVL - r1 : r1);
        if (m < npm[ns]) begin npm[ns] = m; npath[ns] = (va_path[s] << 1) | 64'(u); end
      end
    end
    for (int s = 0; s < NS; s++) if (npm[s] < npm[best]) best = s;
    for (int s = 0; s < NS; s++) begin va_pm[s] = npm[s] - npm[best]; va_path[s] = npath[s]; end
    return int'(va_path[best][L-1]);
  endfunction

  task automatic run(int t, int noise, bit expect_clean);
    bit tx [$];
    int enc = 0, nd = 0, err_ava = 0, err_va = 0, va_n = 0, surv_sum = 0, prev = 1;
    int nd_b = 0, err_b = 0, surv_b = 0, prev_b = 1;
    real red, red_b;
    thr = T_W'(t); nmax = N_W'(NMAX);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    va_init();
    for (int i = 0; i < NBITS; i++) begin
      int u = $urandom_range(0, 1), c0, c1, r0, r1, vb;
      c0 = code_bit(G0, enc, u); c1 = code_bit(G1, enc, u);
      enc = ((u << (K - 2)) | (enc >> 1)) & (NS - 1);
      tx.push_back(1'(u));
      r0 = channel(c0, noise); r1 = channel(c1, noise);
      iv = 1; rx[0] = Q'(r0); rx[1] = Q'(r1);
      vb = va_step(r0, r1);
      if (i >= L - 1) begin
        if (vb != int'(tx[va_n])) err_va++;
        va_n++;
      end
      surv_sum += prev;             // survivors extended at this stage
      surv_b += prev_b;
      @(posedge clk); #1;
      prev = int'(cnt);
      prev_b = int'(cnt_b);
      if (lost || lost_b) begin failures++; $display("FAIL unexpected restart"); end
      if (dv) begin
        if (db != tx[nd]) err_ava++;
        nd++;
      end
      if (dv_b) begin
        if (db_b != tx[nd_b]) err_b++;
        nd_b++;
      end
      @(negedge clk); iv = 0;
    end
    red = 100.0 * (1.0 - (2.0 * surv_sum / NBITS) / (2.0 * NS));
    red_b = 100.0 * (1.0 - (2.0 * surv_b / NBITS) / (2.0 * NS));
    $display("T=%0d noise=%0d: full VA errors=%0d | N_max=16: errors=%0d, ACS ops/stage %0.1f (%0.1f %% fewer than 512) | N_max=128: errors=%0d, ACS ops/stage %0.1f (%0.1f %% fewer)",
             t, noise, err_va, err_ava, 2.0 * surv_sum / NBITS, red, err_b, 2.0 * surv_b / NBITS, red_b);
    chk("all bits decoded on time", nd == NBITS - L + 1 && nd_b == NBITS - L + 1);
    chk("ACS reduction of at least 70 % with 16 survivors", red >= 70.0);
    if (expect_clean) chk("error free at low noise", err_ava == 0 && err_b == 0 && err_va == 0);
    if (t == 30) chk("128 survivors at T = 30 close to full Viterbi", err_b <= err_va + err_va / 2 + 10);
  endtask

  initial begin
    rx = '0; thr = '0; nmax = '0;
    #12 rst_n = 1;
    foreach (thr_list[i]) begin
      run(thr_list[i], 3, 1);
      run(thr_list[i], 4, 0);
      run(thr_list[i], 5, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int thr_list [3] = '{20, 25, 30};
endmodule
