// tb_wtm_gate_gen: drives fout as a pulse every 3 clocks and compares F10,
// F20, HVC_EVEN and HVC_ODD after every pulse with a model written from the
// gate rules: with k fout pulses seen and p = (k + position) mod 256,
// F10 = (p < 128) and (p mod 128 >= width), F20 = (p >= 128) and
// (p mod 128 >= width); HV follows bit 7 of k. Also checks the gate length
// and its placement inside the HV half period for a non-zero position.
module tb_wtm_gate_gen;
  logic       clk = 0, rst_n = 0, fout = 0, hv_on = 0;
  logic [7:0] position = 0;
  logic [6:0] width = 0;
  logic       f10, f20, hvc_even, hvc_odd;
  logic [7:0] qcc;
  int checks = 0, failures = 0;
  int k = 0;   // fout pulses seen (model phase)

  wtm_gate_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one fout pulse, then compare with the model
  task automatic step();
    int p;
    logic e10, e20;
    p = (k + int'(position)) % 256;
    e10 = (p < 128)  && ((p % 128) >= int'(width));
    e20 = (p >= 128) && ((p % 128) >= int'(width));
    @(negedge clk) fout = 1;
    @(negedge clk) fout = 0;
    k++;
    checks++;
    if (f10 !== e10 || f20 !== e20) begin
      failures++;
      $display("FAIL k=%0d pos=%0d w=%0d f10=%b/%b f20=%b/%b", k, position, width, f10, e10, f20, e20);
    end
    checks++;
    if (hvc_even !== !(hv_on && ((k / 128) % 2 == 1)) || hvc_odd !== !(hv_on && ((k / 128) % 2 == 0))) begin
      failures++;
      $display("FAIL hvc k=%0d even=%b odd=%b", k, hvc_even, hvc_odd);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // HV off: both drives high
    repeat (300) step();
    hv_on = 1;
    width = 7'd20;
    repeat (600) step();
    width = 7'd63; position = 8'd0;
    repeat (512) step();
    width = 7'd100; position = 8'd40;
    repeat (512) step();
    // gate length and placement: width 60, position 20 -> F10 high for
    // 68 pulses, starting 40 pulses after qcc[7] falls
    width = 7'd60; position = 8'd20;
    while (k % 256 != 0) step();
    begin
      int first = -1, len = 0;
      for (int i = 0; i < 256; i++) begin
        step();
        if (f10) begin if (first < 0) first = i; len++; end
      end
      checks++;
      if (len != 68 || first != 40) begin
        failures++;
        $display("FAIL gate len=%0d first=%0d", len, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
