// tb_adaptive_viterbi_decoder: end-to-end test of the adaptive Viterbi
// decoder at its default parameters (K = 9, N_max = 16, 3-bit inputs).
//
// Random information bits are convolutionally encoded, passed through a
// noisy soft channel and fed to the decoder. A reference model written per
// trellis state (absolute metrics, no rescaling, no survivor slots) runs
// the same adaptive algorithm: successors over PMmin + T are dropped,
// merges keep the smaller metric (predecessor with LSB 0 on a tie), at most
// N_max states with the smallest (metric, state) survive, and an empty list
// restarts the decoder. Every cycle the testbench compares dec_valid_o,
// dec_bit_o, surv_count_o and lost_o with the model, which also fixes the
// latency: the first decoded bit must appear exactly TB_LEN symbols after a
// start. In the low-noise phase the decoded bits must also equal the
// transmitted ones. Phases: low noise with input gaps (stalls), a restart
// in mid-stream, heavy noise with a small N_max (contender overflow), and
// T = 0 with noise (empty survivor list, restart). The testbench counts
// each mechanism (threshold discard, merge, contender overflow, rescale,
// stall, restart, lost path) and fails if one never happened.
module tb_adaptive_viterbi_decoder;
  localparam int K      = avd_pkg::K_DEF;
  localparam int NMAX   = avd_pkg::NMAX_DEF;
  localparam int Q      = avd_pkg::Q_DEF;
  localparam int T_MAX  = avd_pkg::T_MAX_DEF;
  localparam int TB_LEN = avd_pkg::TB_LEN_DEF;
  localparam logic [31:0] G0 = avd_pkg::G0_DEF;
  localparam logic [31:0] G1 = avd_pkg::G1_DEF;
  localparam int NS     = 1 << (K - 1);
  localparam int LVL    = (1 << Q) - 1;
  localparam int T_W    = $clog2(T_MAX + 1);
  localparam int N_W    = $clog2(NMAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, in_valid;
  logic [1:0][Q-1:0] rx;
  logic [T_W-1:0] thresh;
  logic [N_W-1:0] nmax;
  logic dec_valid, dec_bit, lost;
  logic [N_W-1:0] surv_count;

  adaptive_viterbi_decoder dut (
    .clk, .rst_n, .start_i(start), .in_valid_i(in_valid), .rx_i(rx),
    .thresh_i(thresh), .nmax_i(nmax), .dec_valid_o(dec_valid), .dec_bit_o(dec_bit),
    .surv_count_o(surv_count), .lost_o(lost)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit          m_alive [NS];
  int          m_pm    [NS];
  logic [63:0] m_path  [NS];
  int          m_min, m_stages;
  int          ev_discard, ev_merge, ev_overflow, ev_rescale, ev_stall, ev_restart, ev_lost;

  function automatic int parity(logic [31:0] v);
    int p = 0;
    for (int i = 0; i < 32; i++) p ^= int'(v[i]);
    return p;
  endfunction

  // code bit b when input u leaves state s: taps of G over {u, s}
  function automatic int code_bit(int b, int s, int u);
    logic [31:0] g = (b == 0) ? G0 : G1;
    return parity(g & ((32'(u) << (K - 1)) | 32'(s)));
  endfunction

  function automatic int bit_metric(int level, int expected);
    return (expected != 0) ? (LVL - level) : level;
  endfunction

  task automatic m_init();
    for (int s = 0; s < NS; s++) begin m_alive[s] = 0; m_pm[s] = 0; m_path[s] = '0; end
    m_alive[0] = 1; m_min = 0; m_stages = 0;
  endtask

  // one trellis stage; returns 0 when no path met the threshold
  function automatic bit m_step(int r0, int r1, int t, int nm, output int count);
    bit          n_alive [NS];
    int          n_pm    [NS];
    logic [63:0] n_path  [NS];
    int order [$];
    int best, nmin, n_in;
    bit over;
    n_in = 0;
    for (int ns = 0; ns < NS; ns++) begin
      int u = ns >> (K - 2);
      n_alive[ns] = 0; n_pm[ns] = 0; n_path[ns] = '0;
      for (int b = 0; b < 2; b++) begin
        int s = ((ns << 1) & (NS - 1)) | b;
        if (m_alive[s]) begin
          int m = m_pm[s] + bit_metric(r0, code_bit(0, s, u)) + bit_metric(r1, code_bit(1, s, u));
          if (m <= m_min + t) begin
            if (n_alive[ns]) ev_merge++;
            if (!n_alive[ns] || m < n_pm[ns]) begin
              n_alive[ns] = 1; n_pm[ns] = m; n_path[ns] = (m_path[s] << 1) | 64'(u);
            end
          end else ev_discard++;
        end
      end
    end
    for (int ns = 0; ns < NS; ns++) if (n_alive[ns]) order.push_back(ns);
    if (order.size() == 0) begin count = 0; return 0; end
    // sort by (metric, state)
    order.sort() with (n_pm[item] * NS + item);
    over = order.size() > nm;
    if (over) ev_overflow++;
    while (order.size() > nm) void'(order.pop_back());
    for (int s = 0; s < NS; s++) m_alive[s] = 0;
    foreach (order[i]) begin
      m_alive[order[i]] = 1; m_pm[order[i]] = n_pm[order[i]]; m_path[order[i]] = n_path[order[i]];
    end
    nmin = n_pm[order[0]];
    if (nmin > 0) ev_rescale++;
    m_min = nmin;
    count = order.size();
    best = order[0];
    m_stages++;
    return 1;
  endfunction

  // ---------------- stimulus ----------------
  int enc_s;
  bit tx_bits [$];        // transmitted bits since the last start
  int dec_idx;            // index of the next decoded bit since the last start
  int exp_count;
  bit check_tx;
  int tx_errors;

  function automatic int channel(int c, int noise);
    int v = (c != 0) ? LVL : 0;
    if (noise > 0) begin
      int n = 0;
      for (int i = 0; i < 4; i++) n += int'($urandom_range(0, 2 * noise)) - noise;
      v += n / 2;
    end
    return (v < 0) ? 0 : (v > LVL) ? LVL : v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  // drive one cycle and check the registered outputs after the edge
  task automatic cycle_in(bit st, bit v, int r0, int r1);
    bit exp_valid, exp_bit, exp_lost, ok;
    int cnt;
    exp_valid = 0; exp_bit = 0; exp_lost = 0;
    @(negedge clk);
    start = st; in_valid = v; rx[0] = Q'(r0); rx[1] = Q'(r1);
    if (st) begin
      m_init(); exp_count = 1; ev_restart++;
    end else if (v) begin
      ok = m_step(r0, r1, int'(thresh), int'(nmax), cnt);
      if (!ok) begin
        m_init(); exp_count = 1; exp_lost = 1; ev_lost++;
      end else begin
        exp_count = cnt;
        if (m_stages >= TB_LEN) begin
          int best = -1;
          // best path: smallest (metric, state)
          for (int s = 0; s < NS; s++)
            if (m_alive[s] && (best < 0 || m_pm[s] < m_pm[best])) best = s;
          exp_valid = 1; exp_bit = m_path[best][TB_LEN-1];
        end
      end
    end else ev_stall++;
    @(posedge clk); #1;
    check("dec_valid", int'(dec_valid), int'(exp_valid));
    if (exp_valid) begin
      check("dec_bit", int'(dec_bit), int'(exp_bit));
      if (check_tx && dec_idx < tx_bits.size()) begin
        checks++;
        if (dec_bit != tx_bits[dec_idx]) begin failures++; tx_errors++; end
      end
      dec_idx++;
    end
    check("surv_count", int'(surv_count), exp_count);
    check("lost", int'(lost), int'(exp_lost));
    start = 0; in_valid = 0;
  endtask

  task automatic restart();
    cycle_in(1, 0, 0, 0);
    enc_s = 0; tx_bits.delete(); dec_idx = 0;
  endtask

  task automatic send_bit(bit u, int noise);
    int c0 = code_bit(0, enc_s, int'(u)), c1 = code_bit(1, enc_s, int'(u));
    enc_s = ((int'(u) << (K - 2)) | (enc_s >> 1)) & (NS - 1);
    tx_bits.push_back(u);
    cycle_in(0, 1, channel(c0, noise), channel(c1, noise));
  endtask

  task automatic run(int n, int noise, int gap_pct);
    for (int i = 0; i < n; i++) begin
      if (gap_pct > 0 && int'($urandom_range(0, 99)) < gap_pct) cycle_in(0, 0, 0, 0);
      send_bit(1'($urandom_range(0, 1)), noise);
    end
  endtask

  task automatic need(string name, int n);
    checks++;
    $display("mechanism %-18s : %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    int t0;
    start = 0; in_valid = 0; rx = '0; thresh = T_W'(avd_pkg::T_DEF); nmax = N_W'(NMAX);
    ev_discard = 0; ev_merge = 0; ev_overflow = 0; ev_rescale = 0; ev_stall = 0;
    ev_restart = 0; ev_lost = 0; tx_errors = 0; check_tx = 0;
    m_init(); exp_count = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: T = 20, N_max = 16, low noise, 10 % input gaps
    restart();
    check_tx = 1;
    t0 = cycles;
    run(1500, 2, 10);
    $display("phase 1: %0d symbols in %0d cycles, %0d decoded, %0d errors vs transmitted",
             tx_bits.size(), cycles - t0, dec_idx, tx_errors);
    check_tx = 0;
    // phase 2: restart in mid-stream, then moderate noise
    restart();
    run(600, 5, 0);
    // phase 3: heavy noise, N_max = 4 (contender overflow)
    nmax = N_W'(4);
    restart();
    run(600, 8, 0);
    // phase 4: T = 0 with noise: the list can run empty
    thresh = '0; nmax = N_W'(NMAX);
    restart();
    run(300, 6, 0);
    thresh = T_W'(avd_pkg::T_DEF);
    need("threshold_discard", ev_discard);
    need("state_merge", ev_merge);
    need("contender_overflow", ev_overflow);
    need("rescale", ev_rescale);
    need("stall", ev_stall);
    need("restart", ev_restart);
    need("lost_path", ev_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
