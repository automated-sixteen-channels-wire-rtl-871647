// wtm_pkg: constants and types shared by the wire tension meter (WTM) logic.
//
// The digital part of the meter runs from one 16.8 MHz crystal clock, except the
// scaler counters, which are clocked by the discriminated sensor signals. The
// CPU-side system bus is eight bits wide with an eight-bit address:
//   addr[7:5]  block select: 0..3 = scaler FPGAs, 4 = timing unit
//   addr[4:0]  register inside the block
// The block-select split follows the scaler FPGA's board-address compare on
// A<7..5>; the numbering of the blocks and the timing-unit register map are
// this design's own choice.
package wtm_pkg;

  localparam int unsigned CLK_HZ_DEFAULT = 16_800_000;  // timing-unit quartz
  localparam int unsigned BAUD_DEFAULT   = 57_600;      // RS232 line rate

  // System bus block numbers (addr[7:5]).
  localparam logic [2:0] BLK_TIMING = 3'd4;

  // Timing-unit registers (addr[4:0]).
  localparam logic [4:0] TREG_D0     = 5'd0;   // D<7..0>   divider low byte
  localparam logic [4:0] TREG_D1     = 5'd1;   // D<15..8>  divider high byte
  localparam logic [4:0] TREG_D2     = 5'd2;   // D<23..16> pulse position
  localparam logic [4:0] TREG_D3     = 5'd3;   // D<30..24> pulse width (bit 7 unused)
  localparam logic [4:0] TREG_D4     = 5'd4;   // D<39..32> fine delay
  localparam logic [4:0] TREG_D5     = 5'd5;   // D<47..40> number of measurements
  localparam logic [4:0] TREG_CTRL   = 5'd6;   // control bits, see ctrl_t
  localparam logic [4:0] TREG_STATUS = 5'd7;   // read: {6'b0, window, MC}
  localparam logic [4:0] TREG_NOUT   = 5'd8;   // read: measurements done
  localparam logic [4:0] TREG_RESET  = 5'd15;  // write: clears MC (RESET_INT)

  // Control register bits.
  typedef struct packed {
    logic [3:0] unused;
    logic       scaler_clear;  // bit 3: clear all scaler counters (self-clearing)
    logic       load_count;    // bit 2: hold the modulation divider at its load value
    logic       hv_on;         // bit 1: ON_OFF_HV, enables the HV modulator drive
    logic       start;         // bit 0: START, begins a measurement
  } ctrl_t;

  // Timing settings, the D<47..0> word of the timing FPGA.
  typedef struct packed {
    logic [7:0]  n_meas;      // D<47..40>
    logic [4:0]  fine_tap;    // D<39..35>
    logic [2:0]  fine_clk;    // D<34..32>
    logic        unused31;    // D<31>
    logic [6:0]  width;       // D<30..24>
    logic [7:0]  position;    // D<23..16>
    logic [15:0] divider;     // D<15..0>
  } tsettings_t;

  // Table 1 protocol constants.
  localparam logic [7:0] CMD_WRITE   = 8'hFF;
  localparam logic [7:0] CMD_READ    = 8'h00;
  localparam logic [7:0] MASTER_ID   = 8'h00;
  localparam logic [7:0] ASCII_CR    = 8'h0D;
  localparam logic [7:0] ASCII_LF    = 8'h0A;

endpackage
