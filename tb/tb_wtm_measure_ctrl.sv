// tb_wtm_measure_ctrl: feeds alternating F1/F2 pulse trains and checks that a
// START passes exactly n_meas F1 and n_meas F2 pulses, that the first pulse
// passed is an F1 pulse, that MC rises at the start of the last F2 pulse,
// END_M is one pulse lasting until that F2 pulse ends, nothing passes after,
// MC stays until reset_int, and n_meas = 0 ends at once.
module tb_wtm_measure_ctrl;
  logic       clk = 0, rst_n = 0, start = 0, reset_int = 0;
  logic [7:0] n_meas = 0;
  logic       f1 = 0, f2 = 0;
  logic       out_f1, out_f2, window, mc, end_m;
  logic [7:0] nout;
  int checks = 0, failures = 0;

  wtm_measure_ctrl dut (.*);

  always #5 clk = ~clk;

  // gate generator stand-in: period 40 clocks, F1 high 8, F2 high 8
  initial begin
    forever begin
      repeat (6)  @(negedge clk);
      f1 = 1; repeat (8) @(negedge clk); f1 = 0;
      repeat (12) @(negedge clk);
      f2 = 1; repeat (8) @(negedge clk); f2 = 0;
      repeat (6)  @(negedge clk);
    end
  end

  int n1 = 0, n2 = 0, nend = 0, first_is_f1 = -1;
  logic o1_q = 0, o2_q = 0, e_q = 0, mc_q = 0;
  bit mc_at_f2_rise = 0;
  always @(posedge clk) begin
    if (out_f1 && !o1_q) begin n1++; if (first_is_f1 < 0) first_is_f1 = 1; end
    if (out_f2 && !o2_q) begin n2++; if (first_is_f1 < 0) first_is_f1 = 0; end
    if (end_m && !e_q) nend++;
    if (mc && !mc_q && out_f2) mc_at_f2_rise = 1;
    o1_q <= out_f1; o2_q <= out_f2; e_q <= end_m; mc_q <= mc;
  end

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int n);
    n1 = 0; n2 = 0; nend = 0; first_is_f1 = -1; mc_at_f2_rise = 0;
    n_meas = 8'(n);
    repeat (13) @(negedge clk);
    start = 1;
    fork
      begin wait (mc); end
      begin repeat (100 * (n + 2)) @(posedge clk); end
    join_any
    disable fork;
    start = 0;
    repeat (200) @(posedge clk);
    check(mc, $sformatf("mc set n=%0d", n));
    check(n1 == n, $sformatf("F1 pulses %0d expected %0d", n1, n));
    check(n2 == n, $sformatf("F2 pulses %0d expected %0d", n2, n));
    check(int'(nout) == n, $sformatf("nout %0d expected %0d", nout, n));
    check(!window, "window closed");
    if (n > 0) begin
      check(first_is_f1 == 1, "first pulse is F1");
      check(nend == 1, $sformatf("one END_M pulse, saw %0d", nend));
      check(mc_at_f2_rise, "MC rises at start of last F2 pulse");
    end
    // MC holds until cleared
    start = 1;
    repeat (200) @(posedge clk);
    check(mc && n1 == n && n2 == n, "no restart while MC set");
    start = 0;
    @(negedge clk) reset_int = 1;
    @(negedge clk) reset_int = 0;
    check(!mc, "reset_int clears MC");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6);
    run(1);
    run(17);
    run(0);
    run(255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
