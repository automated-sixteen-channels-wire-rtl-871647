// tb_wtm_top_full: one complete measurement with the top at its default
// parameters (16.8 MHz clock, 57600 baud, 16 channels, 4 scaler FPGAs).
//
// The host programs a modulation of 16.8 MHz / (256 * 1773) = 37.0 Hz, the
// resonance quoted for 3.8 m tubes (divider 65536 - 1773 = 63763), gates of
// 96 of 128 fout periods (about 10 ms, some 200 000 sensor periods, so the
// upper counter halves are used), position 4, a fine delay, and two
// measurements. It polls MC over the serial line, stops the sensor models
// once the gates have closed (nothing is counted after that; this only saves
// simulation time), reads all 128 counter bytes over RS232 and compares them
// with the testbench's own edge counts and with the HV phase of each tube.
module tb_wtm_top_full;
  import wtm_pkg::*;
  localparam int unsigned CLK_HZ = 16_800_000;
  localparam int          BITC   = 292;
  localparam logic [7:0]  ID     = 8'h01;

  logic        clk = 0, rst_n = 0;
  logic        rxd, txd, tx_oe;
  logic [7:0]  board_id = ID;
  logic [15:0] sensor_in;
  logic        hvc_even, hvc_odd, fout, loadout, gate_f10, gate_f20, scaler_f1, scaler_f2, out_mc_n, end_m;
  logic        run_sensors = 1;

  int checks = 0, failures = 0;

  wtm_top dut (.*);
  wtm_tb_host #(.BIT_CLKS(BITC)) host (.clk, .from_dut(txd), .to_dut(rxd));

  // sensors near 20 MHz, each a little different; HV on shifts the period
  // by 0.4 % plus a per-channel amount
  for (genvar c = 0; c < 16; c++) begin : g_sensor
    localparam realtime P_OFF = 50.0 + 0.37 * c;
    wtm_tb_sensor #(.PERIOD_OFF_NS(P_OFF)) u_s (
      .run (run_sensors), .hv_n ((c % 2 == 0) ? hvc_even : hvc_odd),
      .on_ppm (4000 + 500 * c), .out (sensor_in[c]));
  end

  // 16.8 MHz
  always #(1.0e9 / CLK_HZ / 2.0) clk = ~clk;

  // reference edge counts and gate windows
  longint ref_cnt [32];
  int     n_win1 = 0, n_win2 = 0;
  for (genvar c = 0; c < 16; c++) begin : g_ref
    always @(posedge sensor_in[c]) begin
      if (scaler_f1) ref_cnt[2*c]++;
      if (scaler_f2) ref_cnt[2*c+1]++;
    end
  end
  logic g1q = 0, g2q = 0, endq = 0, hvq = 0;
  int   n_end_m = 0, n_hv_edges = 0;
  always @(posedge clk) if (rst_n) begin
    if (scaler_f1 && !g1q) n_win1++;
    if (scaler_f2 && !g2q) n_win2++;
    if (end_m && !endq) n_end_m++;
    if (hvc_even != hvq) n_hv_edges++;
    g1q <= scaler_f1; g2q <= scaler_f2; endq <= end_m; hvq <= hvc_even;
  end

  // mechanism counters
  int m_write = 0, m_read = 0, m_ignored = 0, m_position = 0, m_fine = 0;
  int m_mc = 0, m_mc_clear = 0, m_clear = 0, m_load = 0, m_msb = 0;

  initial begin : watchdog
    #2000ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] r; bit ok;
    host.xact(ID, CMD_WRITE, a, d, r, ok);
    check(ok, $sformatf("write %h <= %h echoed", a, d));
    m_write++;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    bit ok;
    host.xact(ID, CMD_READ, a, 8'h00, d, ok);
    check(ok, $sformatf("read %h echoed", a));
    m_read++;
  endtask

  task automatic measure_point(input logic [15:0] div, input logic [7:0] pos,
                               input logic [6:0] width, input logic [2:0] fclk,
                               input logic [4:0] ftap, input logic [7:0] n);
    logic [7:0] v;
    int polls = 0;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    run_sensors = 1;
    n_win1 = 0; n_win2 = 0;
    wr({BLK_TIMING, TREG_CTRL}, 8'h04);          // hold divider (LOAD_COUNT)
    m_load++;
    wr({BLK_TIMING, TREG_D0}, div[7:0]);
    wr({BLK_TIMING, TREG_D1}, div[15:8]);
    wr({BLK_TIMING, TREG_D2}, pos);
    wr({BLK_TIMING, TREG_D3}, {1'b0, width});
    wr({BLK_TIMING, TREG_D4}, {ftap, fclk});
    wr({BLK_TIMING, TREG_D5}, n);
    if (pos != 0) m_position++;
    if (ftap != 0 || fclk != 0) m_fine++;
    wr({BLK_TIMING, TREG_CTRL}, 8'h02);          // run, HV on
    wr({BLK_TIMING, TREG_CTRL}, 8'h03);          // START
    do begin
      rd({BLK_TIMING, TREG_STATUS}, v);
      polls++;
    end while (!v[0] && polls < 2000);
    check(v[0], "MC seen by polling");
    check(!out_mc_n, "OUT_MC low at the end");
    if (v[0]) m_mc++;
    wr({BLK_TIMING, TREG_CTRL}, 8'h02);          // drop START
    // wait for the window to close, then compare
    do rd({BLK_TIMING, TREG_STATUS}, v); while (v[1]);
    run_sensors = 0;
    check(n_win1 == int'(n) && n_win2 == int'(n),
          $sformatf("gate windows %0d/%0d expected %0d", n_win1, n_win2, n));
    rd({BLK_TIMING, TREG_NOUT}, v);
    check(v == n, "measurement count register");
    for (int k = 0; k < 32; k++) begin
      logic [31:0] w;
      for (int b = 0; b < 4; b++) begin
        rd({3'(k / 8), 3'(k % 8), 2'(b)}, v);
        w[8*b +: 8] = v;
      end
      if (w[31:16] != 0) m_msb++;
      check(longint'(w) <= ref_cnt[k] + longint'(n) && longint'(w) + longint'(n) >= ref_cnt[k],
            $sformatf("counter %0d = %0d, reference %0d", k, w, ref_cnt[k]));
    end
    // HV on lowers the frequency: even tubes have HV on in F2, odd in F1
    for (int c = 0; c < 16; c++) begin
      longint on_cnt  = (c % 2 == 0) ? ref_cnt[2*c+1] : ref_cnt[2*c];
      longint off_cnt = (c % 2 == 0) ? ref_cnt[2*c]   : ref_cnt[2*c+1];
      check(on_cnt < off_cnt, $sformatf("channel %0d HV-on count %0d below HV-off %0d", c, on_cnt, off_cnt));
    end
    wr({BLK_TIMING, TREG_RESET}, 8'h00);
    rd({BLK_TIMING, TREG_STATUS}, v);
    check(v[0] == 1'b0, "MC cleared");
    if (!v[0]) m_mc_clear++;
    wr({BLK_TIMING, TREG_CTRL}, 8'h0A);          // clear scalers
    rd({3'd0, 5'd0}, v);
    check(v == 0, "scaler cleared");
    if (v == 0) m_clear++;
  endtask

  initial begin
    string s; bit ok;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    // frame for another unit: no answer
    host.send_cmd(8'h02, CMD_WRITE, {BLK_TIMING, TREG_D5}, 8'h77);
    host.get_reply(BITC * 60, s, ok);
    check(!ok, "other unit's frame not answered");
    if (!ok) m_ignored++;
    // the unit must answer its own number before anything else is tried
    begin
      logic [7:0] v;
      host.xact(ID, CMD_READ, {BLK_TIMING, TREG_D0}, 8'h00, v, ok);
      check(ok, "unit answers");
      if (!ok) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    // 37.0 Hz modulation, 2 measurements
    measure_point(16'd63763, 8'd4, 7'd32, 3'd2, 5'd5, 8'd2);
    check(n_end_m == 1, $sformatf("END_M pulses %0d", n_end_m));
    check(n_hv_edges > 2, "HV modulation toggled");
    check(host.errors == 0, "answer framing");
    $display("mechanisms: write=%0d read=%0d ignored=%0d position=%0d fine=%0d mc=%0d end_m=%0d mc_clear=%0d scaler_clear=%0d load=%0d msb=%0d hv_edges=%0d",
             m_write, m_read, m_ignored, m_position, m_fine, m_mc, n_end_m, m_mc_clear, m_clear, m_load, m_msb, n_hv_edges);
    check(m_write > 0 && m_read > 0 && m_ignored > 0 && m_position > 0 && m_fine > 0 &&
          m_mc > 0 && m_msb > 0 && n_end_m > 0 && m_mc_clear > 0 && m_clear > 0 && m_load > 0 && n_hv_edges > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
