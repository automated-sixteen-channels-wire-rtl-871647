// tb_wtm_timing_unit: programs the timing FPGA over the bus and checks the
// whole timing chain against rates worked out from the settings:
//   divider 65528 -> fout every 8 clocks, HV period 256 * 8 = 2048 clocks
//   width 32      -> each gate high for (128 - 32) * 8 = 768 clocks
//   fine delay    -> F1 follows F10 by (3 + 1) * 2 = 8 clocks (+0/-2)
//   3 measurements-> 3 F1 and 3 F2 pulses reach the scalers, then MC
// plus register read-back, status, the MC clear register, the scaler clear
// pulse, HV off and LOAD_COUNT.
module tb_wtm_timing_unit;
  import wtm_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic       wr = 0, rd = 0, rsel;
  logic       fout, loadout, f10, f20, f1, f2, out_f1, out_f2, hvc_even, hvc_odd;
  logic       mc, end_m, window, scaler_clear;
  int checks = 0, failures = 0;

  wtm_timing_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input logic [4:0] r, input logic [7:0] v);
    @(negedge clk) begin addr = {BLK_TIMING, r}; wdata = v; wr = 1; end
    @(negedge clk) wr = 0;
  endtask

  task automatic bus_read(input logic [4:0] r, output logic [7:0] v);
    @(negedge clk) begin addr = {BLK_TIMING, r}; rd = 1; end
    #1 v = rdata;
    check(rsel, "rsel during own read");
    @(negedge clk) rd = 0;
  endtask

  // clocks a signal stays high, sampled on the clock
  task automatic high_len(ref logic s, output int n);
    n = 0;
    do @(posedge clk); while (s);
    do @(posedge clk); while (!s);
    while (s) begin @(posedge clk); n++; end
  endtask

  int n_f1 = 0, n_f2 = 0, n_end = 0, n_clr = 0;
  logic o1q = 0, o2q = 0, eq = 0;
  int t_f10 = 0, t_f1 = 0, max_lag = -1, min_lag = 1 << 30;
  always @(posedge clk) if (rst_n) begin
    if (out_f1 && !o1q) n_f1++;
    if (out_f2 && !o2q) n_f2++;
    if (end_m && !eq) n_end++;
    if (scaler_clear) n_clr++;
    o1q <= out_f1; o2q <= out_f2; eq <= end_m;
  end
  // lag of F1 behind F10 rising edges
  logic f10q = 0, f1q = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    f10q <= f10; f1q <= f1;
    if (f10 && !f10q) t_f10 = cyc;
    if (f1 && !f1q && t_f10 > 0) begin
      if (cyc - t_f10 > max_lag) max_lag = cyc - t_f10;
      if (cyc - t_f10 < min_lag) min_lag = cyc - t_f10;
    end
  end

  initial begin
    logic [7:0] v;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // HV off by default
    repeat (20) @(posedge clk);
    check(hvc_even && hvc_odd, "HV off after reset");
    bus_write(TREG_D0, 8'hF8);       // divider 0xFFF8 = 65528
    bus_write(TREG_D1, 8'hFF);
    bus_write(TREG_D2, 8'd0);        // position 0
    bus_write(TREG_D3, 8'd32);       // width 32
    bus_write(TREG_D4, {5'd3, 3'd0});// tap 3, shift every 2 clocks
    bus_write(TREG_D5, 8'd3);        // 3 measurements
    bus_write(TREG_CTRL, 8'h02);     // HV on
    bus_read(TREG_D0, v); check(v == 8'hF8, "read D0");
    bus_read(TREG_D1, v); check(v == 8'hFF, "read D1");
    bus_read(TREG_D3, v); check(v == 8'd32, "read D3");
    bus_read(TREG_D4, v); check(v == 8'h18, "read D4");
    bus_read(TREG_D5, v); check(v == 8'd3, "read D5");
    bus_read(TREG_CTRL, v); check(v == 8'h02, "read CTRL");
    // fout period
    do @(posedge clk); while (!fout);
    n = 0;
    do begin @(posedge clk); n++; end while (!fout);
    check(n == 8, $sformatf("fout period %0d", n));
    // HV half period and gate length
    high_len(hvc_odd, n);
    check(n == 1024, $sformatf("HV half period %0d", n));
    high_len(f10, n);
    check(n == 768, $sformatf("F10 length %0d", n));
    high_len(f20, n);
    check(n == 768, $sformatf("F20 length %0d", n));
    check(max_lag <= 8 && min_lag >= 6, $sformatf("fine delay lag %0d..%0d", min_lag, max_lag));
    // measurement
    check(n_f1 == 0 && n_f2 == 0, "no gates before START");
    bus_write(TREG_CTRL, 8'h03);
    fork
      wait (mc);
      repeat (30_000) @(posedge clk);
    join_any
    disable fork;
    repeat (3000) @(posedge clk);
    check(n_f1 == 3 && n_f2 == 3, $sformatf("gates passed %0d/%0d", n_f1, n_f2));
    check(n_end == 1, "one END_M");
    bus_read(TREG_STATUS, v); check(v == 8'h01, $sformatf("status %h", v));
    bus_read(TREG_NOUT, v);   check(v == 8'd3, "nout");
    bus_write(TREG_CTRL, 8'h02);
    bus_write(TREG_RESET, 8'h00);
    bus_read(TREG_STATUS, v); check(v == 8'h00, "MC cleared by reset register");
    // scaler clear pulse: one clock, control bits kept
    bus_write(TREG_CTRL, 8'h0A);
    repeat (3) @(posedge clk);
    check(n_clr == 1, $sformatf("scaler clear pulses %0d", n_clr));
    bus_read(TREG_CTRL, v); check(v == 8'h02, "clear bit reads 0");
    // another block's address is not answered
    @(negedge clk) begin addr = 8'h20; rd = 1; end
    #1 check(!rsel, "other block not answered");
    @(negedge clk) rd = 0;
    // LOAD_COUNT stops fout, HV off raises both drives
    bus_write(TREG_CTRL, 8'h04);
    n = 0;
    repeat (100) begin @(posedge clk); if (fout) n++; end
    check(n == 0 && hvc_even && hvc_odd, "LOAD_COUNT and HV off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
