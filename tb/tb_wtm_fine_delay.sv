// tb_wtm_fine_delay: for several divider selections k and taps t, raises and
// lowers F10 and F20 (F20 at another time) and measures the delay to the
// matching F1/F2 edge. Expected: (t + 1) shift periods of 2**(k+1) clocks,
// minus up to one period for the phase of the input edge against the shift
// clock.
module tb_wtm_fine_delay;
  logic       clk = 0, rst_n = 0, f10 = 0, f20 = 0;
  logic [2:0] fine_clk = 0;
  logic [4:0] fine_tap = 0;
  logic       f1, f2;
  int checks = 0, failures = 0;

  wtm_fine_delay dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge on one input, clocks until the output follows
  task automatic measure(input bit second, input logic level, input int k, input int t);
    int n = 0, per, hi, lo;
    @(negedge clk);
    if (second) f20 = level; else f10 = level;
    do begin @(posedge clk); #1; n++; end while ((second ? f2 : f1) !== level && n < 100000);
    per = 1 << (k + 1);
    hi  = (t + 1) * per;
    lo  = t * per;
    checks++;
    if (n > hi || n <= lo) begin
      failures++;
      $display("FAIL k=%0d tap=%0d %s edge=%b delay=%0d expected (%0d,%0d]",
               k, t, second ? "F2" : "F1", level, n, lo, hi);
    end
  endtask

  initial begin
    int ks[4] = '{0, 1, 3, 7};
    int ts[6] = '{0, 1, 7, 15, 16, 31};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ks[i]) foreach (ts[j]) begin
      fine_clk = 3'(ks[i]);
      fine_tap = 5'(ts[j]);
      // flush the shift register with zeros
      repeat (40 * (1 << (ks[i] + 1))) @(posedge clk);
      measure(0, 1'b1, ks[i], ts[j]);
      measure(1, 1'b1, ks[i], ts[j]);
      measure(0, 1'b0, ks[i], ts[j]);
      measure(1, 1'b0, ks[i], ts[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
