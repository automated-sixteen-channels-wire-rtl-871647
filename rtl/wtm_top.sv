// wtm_top: digital part of the sixteen-channel wire tension meter.
//
// The meter excites each wire electrostatically with HV switched on and off
// at a settable modulation frequency, and measures the frequency of an LC
// sensor oscillator coupled to the wire in both HV phases: the difference
// grows as the modulation approaches the wire's mechanical resonance. This
// top joins:
//   wtm_serial_ctrl   RS232 command interface and system-bus master
//   wtm_timing_unit   modulation divider, HV drive, counting gates F1/F2,
//                     fine delay and measurement sequencing
//   4 x wtm_scaler8   32 counters: for each of the 16 channels one counts
//                     sensor periods during F1, the other during F2
// Scaler FPGA k serves channels 4k..4k+3 and answers bus block k; the timing
// unit is block 4. The analog parts stay outside: sensor_in are the
// zero-crossing comparator outputs, hvc_even/hvc_odd drive the HV
// modulators (even and odd tubes in opposite phases, low = HV on). fout,
// loadout, gate_f10/gate_f20 (coarse gates before the fine delay),
// scaler_f1/scaler_f2, out_mc_n and end_m are the timing FPGA's monitor pins.
//
// A measurement as the host sees it: write D<47..0> (divider, gate width and
// position, fine delay, number of measurements), set ON_OFF_HV and START,
// poll the status register until MC is set (or watch out_mc_n / end_m),
// read the 128 counter bytes, clear MC with a write to timing register 15,
// then pulse the scaler clear bit before the next frequency point.
//
// Clock: one 16.8 MHz clock for everything but the scaler counters, which
// run on the sensor signals. Reset: asynchronous, active low; it also clears
// the scaler counters, as the scaler FPGA's CLEAR pin doubles as its global
// reset. The bus
// numbering and the use of the serial state machine in place of the local
// processor are this design's choices; the block split follows the document.
module wtm_top
  import wtm_pkg::*;
#(
  parameter int unsigned N_CHANNELS     = 16,
  parameter int unsigned N_SCALER_FPGAS = 4,
  parameter int unsigned CLK_HZ         = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD           = BAUD_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // RS232 line
  input  logic                  rxd,
  output logic                  txd,
  output logic                  tx_oe,
  input  logic [7:0]            board_id,
  // sensors and HV modulators
  input  logic [N_CHANNELS-1:0] sensor_in,
  output logic                  hvc_even,
  output logic                  hvc_odd,
  // timing monitor outputs
  output logic                  fout,
  output logic                  loadout,
  output logic                  gate_f10,
  output logic                  gate_f20,
  output logic                  scaler_f1,
  output logic                  scaler_f2,
  output logic                  out_mc_n,
  output logic                  end_m
);

  localparam int unsigned CH_PER_FPGA = 4;

  // ------------------------------------------------------------ system bus
  logic [7:0] bus_addr, bus_wdata, bus_rdata;
  logic       bus_wr, bus_rd;

  wtm_serial_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_serial (
    .clk, .rst_n, .rxd, .txd, .tx_oe, .board_id,
    .bus_addr, .bus_wdata, .bus_wr, .bus_rd, .bus_rdata
  );

  // ------------------------------------------------------------ timing unit
  logic [7:0] t_rdata;
  logic       t_rsel, mc, scaler_clear;

  wtm_timing_unit u_timing (
    .clk, .rst_n,
    .addr (bus_addr), .wdata (bus_wdata), .wr (bus_wr), .rd (bus_rd),
    .rdata (t_rdata), .rsel (t_rsel),
    .fout, .loadout, .f10 (gate_f10), .f20 (gate_f20), .f1 (), .f2 (),
    .out_f1 (scaler_f1), .out_f2 (scaler_f2),
    .hvc_even, .hvc_odd, .mc, .end_m, .window (), .scaler_clear
  );
  assign out_mc_n = !mc;

  // ------------------------------------------------------------ scalers
  logic [7:0] s_dout [N_SCALER_FPGAS];
  logic       s_en   [N_SCALER_FPGAS];

  for (genvar k = 0; k < N_SCALER_FPGAS; k++) begin : g_scaler
    logic [CH_PER_FPGA-1:0] ch;
    for (genvar c = 0; c < CH_PER_FPGA; c++) begin : g_ch
      assign ch[c] = (k * CH_PER_FPGA + c < N_CHANNELS) ? sensor_in[k * CH_PER_FPGA + c] : 1'b0;
    end
    wtm_scaler8 #(.BOARD_ID(3'(k)), .N_CH(CH_PER_FPGA), .CNT_W(32)) u_scaler (
      .ch_in (ch),
      .in_f1 (scaler_f1), .in_f2 (scaler_f2),
      .clear (scaler_clear || !rst_n),
      .addr (bus_addr), .cs (1'b1), .rd (bus_rd),
      .dout (s_dout[k]), .dout_en (s_en[k])
    );
  end

  always_comb begin
    bus_rdata = t_rsel ? t_rdata : 8'h00;
    for (int k = 0; k < N_SCALER_FPGAS; k++)
      if (s_en[k]) bus_rdata = s_dout[k];
  end

endmodule
