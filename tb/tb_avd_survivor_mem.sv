// tb_avd_survivor_mem: N_max = 4 slots, depth 8. The testbench keeps every
// slot's full decision history as a queue, applies random parent/bit
// updates (the same moves the ACS makes), and checks that dec_bit_o is the
// bit decided 7 stages ago on the path now in slot 0. Also checks that
// init_i clears the rows and that nothing moves without load_i.
module tb_avd_survivor_mem;
  localparam int NMAX = 4, L = 8, I_W = 2;
  logic clk = 0, rst_n = 0, init = 0, load = 0;
  logic [NMAX-1:0][I_W-1:0] par;
  logic [NMAX-1:0] b;
  logic dec;
  int checks = 0, failures = 0;

  avd_survivor_mem #(.NMAX(NMAX), .TB_LEN(L)) dut (.clk, .rst_n, .init_i(init), .load_i(load),
    .parent_i(par), .bit_i(b), .dec_bit_o(dec));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [NMAX][$];
  bit nh [NMAX][$];

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    par = '0; b = '0;
    #12 rst_n = 1;
    for (int k = 0; k < NMAX; k++) hist[k].delete();
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if (it == 150) begin
        init = 1;
        @(negedge clk);
        init = 0;
        for (int k = 0; k < NMAX; k++) hist[k].delete();
        chk("cleared", int'(dec), 0);
      end
      for (int k = 0; k < NMAX; k++) begin
        par[k] = I_W'($urandom); b[k] = 1'($urandom);
        nh[k] = hist[par[k]];
        nh[k].push_back(b[k]);
      end
      for (int k = 0; k < NMAX; k++) hist[k] = nh[k];
      load = 1;
      @(negedge clk);
      load = 0;
      if (hist[0].size() >= L) chk("dec_bit", int'(dec), int'(hist[0][hist[0].size() - L]));
      else chk("zero fill", int'(dec), 0);
      // idle cycle: output must hold
      if (it % 5 == 0) begin
        automatic bit d = dec;
        par = '1; b = '1;
        @(negedge clk);
        chk("hold", int'(dec), int'(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
