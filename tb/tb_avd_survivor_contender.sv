// tb_avd_survivor_contender: random distinct keys, random eligibility and
// N_max values from 1 to NMAX (default sizes). The testbench sorts the
// eligible keys itself: slot k must be filled by the k-th smallest key,
// exactly min(eligible, N_max) slots must be valid, and count_o must match.
module tb_avd_survivor_contender;
  localparam int NMAX = avd_pkg::NMAX_DEF, NC = 2 * NMAX;
  localparam int KEY_W = avd_pkg::pm_width(avd_pkg::Q_DEF, avd_pkg::T_MAX_DEF) + avd_pkg::K_DEF - 1;
  localparam int C_W = $clog2(NC), N_W = $clog2(NMAX + 1);
  logic [NC-1:0] el;
  logic [NC-1:0][KEY_W-1:0] key;
  logic [N_W-1:0] nmax;
  logic [NMAX-1:0] sv;
  logic [NMAX-1:0][C_W-1:0] src;
  logic [N_W-1:0] cnt;
  int checks = 0, failures = 0, overflows = 0;

  avd_survivor_contender dut (.elig_i(el), .key_i(key), .nmax_i(nmax),
    .slot_valid_o(sv), .slot_src_o(src), .count_o(cnt));

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
    for (int it = 0; it < 400; it++) begin
      automatic int idx [$];
      automatic int n;
      // distinct keys: random metric above distinct state numbers
      for (int c = 0; c < NC; c++) begin
        key[c] = KEY_W'(($urandom_range(0, 40) << (avd_pkg::K_DEF - 1)) | (c * 7 % 256));
        el[c] = ($urandom_range(0, 3) != 0);
      end
      nmax = N_W'($urandom_range(1, NMAX));
      #1;
      for (int c = 0; c < NC; c++) if (el[c]) idx.push_back(c);
      idx.sort() with (key[item]);
      n = (idx.size() < int'(nmax)) ? idx.size() : int'(nmax);
      if (idx.size() > int'(nmax)) overflows++;
      chk("count", int'(cnt), n);
      for (int k = 0; k < NMAX; k++) begin
        chk("slot_valid", int'(sv[k]), int'(k < n));
        if (k < n) chk("slot_src", int'(src[k]), idx[k]);
      end
    end
    checks++;
    if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
