// tb_wtm_scan: the measurement the host program performs. The modulation is
// stepped across a range of frequencies; at each step all sixteen tubes are
// measured and each tube's amplitude is taken as its HV-off minus HV-on
// count. The tube's resonance is where that difference peaks.
//
// The wires are modelled by their steady-state response. Tube c resonates at
// the modulation produced by divider length M_c = 13 + (c mod 6) fout clocks
// (f_mod = 16.8 MHz / (256 * M)), with quality factor 10. While its HV is on,
// its sensor period grows by 0.1 % times the response
// A(r) = 1 / sqrt((1 - r^2)^2 + (r / Q)^2), r = f_mod / f_res.
// The scan runs M = 12 ... 19, two measurements per step, over a serial line
// at clk/16 to keep the run short; the time scale of the wire is shrunk
// accordingly (resonances near 3.3 - 5.4 kHz instead of 37 Hz), which changes
// nothing in the logic. Checks: every tube's difference is positive at every
// step and peaks at its own M_c; every count agrees with the testbench's own
// edge count within one per gate window.
module tb_wtm_scan;
  import wtm_pkg::*;
  localparam int unsigned CLK_HZ = 16_800_000;
  localparam int          BITC   = 16;
  localparam logic [7:0]  ID     = 8'h05;
  localparam real         Q      = 10.0;

  logic        clk = 0, rst_n = 0;
  logic        rxd, txd, tx_oe;
  logic [7:0]  board_id = ID;
  logic [15:0] sensor_in;
  logic        hvc_even, hvc_odd, fout, loadout, gate_f10, gate_f20;
  logic        scaler_f1, scaler_f2, out_mc_n, end_m;
  logic        run_sensors = 0;
  int checks = 0, failures = 0;

  wtm_top #(.CLK_HZ(CLK_HZ), .BAUD(CLK_HZ / BITC)) dut (.*);
  wtm_tb_host #(.BIT_CLKS(BITC)) host (.clk, .from_dut(txd), .to_dut(rxd));

  always #(1.0e9 / CLK_HZ / 2.0) clk = ~clk;

  // sensors: about 20 MHz, period stretched while the tube's HV is on
  int unsigned on_ppm [16];
  for (genvar c = 0; c < 16; c++) begin : g_sensor
    wtm_tb_sensor #(.PERIOD_OFF_NS(50.0 + 0.29 * c)) u_s (
      .run (run_sensors), .hv_n ((c % 2 == 0) ? hvc_even : hvc_odd),
      .on_ppm (on_ppm[c]), .out (sensor_in[c]));
  end

  longint ref_cnt [32];
  for (genvar c = 0; c < 16; c++) begin : g_ref
    always @(posedge sensor_in[c]) begin
      if (scaler_f1) ref_cnt[2*c]++;
      if (scaler_f2) ref_cnt[2*c+1]++;
    end
  end

  initial begin : watchdog
    #400ms;
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
    check(ok, $sformatf("write %h echoed", a));
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    bit ok;
    host.xact(ID, CMD_READ, a, 8'h00, d, ok);
    check(ok, $sformatf("read %h echoed", a));
  endtask

  function automatic real response(input int m_drive, input int m_res);
    real r = real'(m_res) / real'(m_drive);   // f_mod / f_res
    return 1.0 / $sqrt((1.0 - r * r) ** 2 + (r / Q) ** 2);
  endfunction

  localparam int M_FIRST = 12, M_LAST = 19, N_MEAS = 2;
  longint amp [16][M_FIRST:M_LAST];

  initial begin
    logic [7:0] v;
    bit ok;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    host.xact(ID, CMD_READ, {BLK_TIMING, TREG_D0}, 8'h00, v, ok);
    check(ok, "unit answers");
    if (!ok) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    wr({BLK_TIMING, TREG_D2}, 8'd0);
    wr({BLK_TIMING, TREG_D3}, 8'd32);
    wr({BLK_TIMING, TREG_D4}, 8'h00);
    wr({BLK_TIMING, TREG_D5}, 8'(N_MEAS));
    for (int m = M_FIRST; m <= M_LAST; m++) begin
      logic [15:0] div;
      div = 16'(65536 - m);
      for (int c = 0; c < 16; c++) on_ppm[c] = int'(1000.0 * response(m, 13 + c % 6));
      foreach (ref_cnt[i]) ref_cnt[i] = 0;
      wr({BLK_TIMING, TREG_CTRL}, 8'h0C);        // hold divider, clear scalers
      wr({BLK_TIMING, TREG_D0}, div[7:0]);
      wr({BLK_TIMING, TREG_D1}, div[15:8]);
      run_sensors = 1;
      wr({BLK_TIMING, TREG_CTRL}, 8'h02);
      wr({BLK_TIMING, TREG_CTRL}, 8'h03);
      do rd({BLK_TIMING, TREG_STATUS}, v); while (!v[0]);
      wr({BLK_TIMING, TREG_CTRL}, 8'h02);
      do rd({BLK_TIMING, TREG_STATUS}, v); while (v[1]);
      run_sensors = 0;
      for (int c = 0; c < 16; c++) begin
        logic [31:0] w [2];
        for (int ph = 0; ph < 2; ph++) begin
          int k;
          k = 2 * c + ph;
          for (int b = 0; b < 4; b++) begin
            rd({3'(k / 8), 3'(k % 8), 2'(b)}, v);
            w[ph][8*b +: 8] = v;
          end
          check(longint'(w[ph]) <= ref_cnt[k] + N_MEAS && longint'(w[ph]) + N_MEAS >= ref_cnt[k],
                $sformatf("M=%0d counter %0d = %0d, reference %0d", m, k, w[ph], ref_cnt[k]));
        end
        // even tubes: HV on in F2; odd tubes: HV on in F1
        amp[c][m] = (c % 2 == 0) ? longint'(w[0]) - longint'(w[1]) : longint'(w[1]) - longint'(w[0]);
        check(amp[c][m] > 0, $sformatf("tube %0d M=%0d amplitude %0d positive", c, m, amp[c][m]));
      end
      wr({BLK_TIMING, TREG_RESET}, 8'h00);
      $display("step M=%0d done at %0t", m, $realtime);
    end
    for (int c = 0; c < 16; c++) begin
      int best;
      string row;
      best = M_FIRST;
      row = "";
      for (int m = M_FIRST; m <= M_LAST; m++) begin
        if (amp[c][m] > amp[c][best]) best = m;
        row = {row, $sformatf(" %4d", amp[c][m])};
      end
      $display("tube %2d resonance at M=%0d, found M=%0d:%s", c, 13 + c % 6, best, row);
      check(best == 13 + c % 6, $sformatf("tube %0d peak at M=%0d", c, best));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
