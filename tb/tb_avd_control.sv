// tb_avd_control: depth 4. Checks that init_o follows start_i and an
// empty survivor list, that load_o is given only for a valid symbol with a
// valid path and no start, that out_valid_o first rises one clock after the
// 4th loaded stage and then follows every load, that stalls (no symbol)
// neither load nor advance, and that lost_o pulses one clock after an empty
// list and restarts the fill count.
module tb_avd_control;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, st = 0, iv = 0, pv = 1;
  logic init, load, ov, lost;
  int checks = 0, failures = 0;

  avd_control #(.TB_LEN(L)) dut (.clk, .rst_n, .start_i(st), .in_valid_i(iv), .path_valid_i(pv),
    .init_o(init), .load_o(load), .out_valid_o(ov), .lost_o(lost));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d at %0t", w, got, exp, $time); end
  endtask

  int loaded;   // stages loaded since the last (re)start
  // one clock: drive, check the combinational outputs, then the registered ones
  task automatic step(bit s, bit v, bit p);
    bit e_load, e_init, e_ov, e_lost;
    @(negedge clk);
    st = s; iv = v; pv = p;
    #1;
    e_load = v && !s && p;
    e_init = s || (v && !p);
    e_lost = v && !s && !p;
    chk("load", int'(load), int'(e_load));
    chk("init", int'(init), int'(e_init));
    if (e_init) loaded = 0;
    else if (e_load) loaded++;
    e_ov = e_load && loaded >= L;
    @(posedge clk); #1;
    chk("out_valid", int'(ov), int'(e_ov));
    chk("lost", int'(lost), int'(e_lost));
  endtask

  initial begin
    loaded = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 6; i++) step(0, 1, 1);       // fill then run
    step(0, 0, 1);                                   // stall
    step(0, 1, 1);
    step(1, 1, 1);                                   // start drops the symbol
    for (int i = 0; i < 5; i++) step(0, 1, 1);
    step(0, 1, 0);                                   // empty list: lost
    for (int i = 0; i < 200; i++)
      step(($urandom_range(0, 30) == 0), ($urandom_range(0, 4) != 0), ($urandom_range(0, 20) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
