// tb_wtm_mod_divider: checks the modulation divider period, 2**16 - div
// clocks between fout pulses, for several settings including the slowest
// (div = 0, 65536 clocks, about 256 Hz at 16.8 MHz) and the fastest, and that
// load_count stops the output.
module tb_wtm_mod_divider;
  logic        clk = 0, rst_n = 0, load_count = 0;
  logic [15:0] div = 0;
  logic        fout, loadout;
  logic [15:0] q;
  int checks = 0, failures = 0;

  wtm_mod_divider #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_period(input logic [15:0] d);
    int t0, n;
    div = d;
    // let the new setting take effect at the next reload
    do @(posedge clk); while (!fout);
    do @(posedge clk); while (!fout);
    for (int rep = 0; rep < 3; rep++) begin
      n = 0;
      do begin @(posedge clk); n++; end while (!fout);
      checks++;
      if (n != 65536 - int'(d)) begin
        failures++;
        $display("FAIL div=%0d period=%0d expected=%0d", d, n, 65536 - int'(d));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_period(16'hFFFF);   // period 1
    check_period(16'hFFF0);   // 16
    check_period(16'd65000);  // 536
    check_period(16'd64763);  // 773
    check_period(16'd0);      // 65536: the 256 Hz minimum
    // load_count holds the counter: no fout pulses
    div = 16'hFF00;
    @(negedge clk) load_count = 1;
    begin
      int seen = 0;
      repeat (1000) begin @(posedge clk); if (fout) seen++; end
      checks++;
      if (seen != 0) begin failures++; $display("FAIL fout during load_count"); end
    end
    @(negedge clk) load_count = 0;
    begin
      int n = 0;
      do begin @(posedge clk); n++; end while (!fout);
      checks++;
      // restarts from div: 255 increments to reach FFFF, first pulse after 256 edges at most
      if (n > 256 || n < 254) begin failures++; $display("FAIL restart phase n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
