// wtm_timing_unit: the timing FPGA of the wire tension meter.
//
// It holds the 48-bit setting word D<47..0> and a control register, both
// written over the system bus, and chains the four timing blocks:
//   wtm_mod_divider   16.8 MHz / (65536 - D<15..0>)  -> fout
//   wtm_gate_gen      fout/256 HV modulation, coarse gates F10/F20, HVC drive
//   wtm_fine_delay    F10/F20 delayed by D<39..32>   -> F1/F2
//   wtm_measure_ctrl  START window, D<47..40> measurements, MC and END_M
// HV modulation frequency is therefore 16.8 MHz / (256 * (65536 - D<15..0>)).
//
// Bus (block 4 of addr[7:5], see wtm_pkg): wr and rd are one-clock strobes;
// rdata is combinational and valid while rd is high, with rsel telling the
// bus that this block answers. Registers 0..5 hold D bytes, 6 the control
// bits (START, ON_OFF_HV, LOAD_COUNT, scaler clear), 7 the status
// {window, MC}, 8 the measurement count; a write to register 15 clears MC.
// The scaler clear bit reads back 0: writing 1 gives a one-clock pulse.
//
// The four timing blocks and the select-15 write that clears MC follow the
// document; the register map, the scaler clear bit and the reset values (all
// zero) are this design's choices.
module wtm_timing_unit
  import wtm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // system bus
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] rdata,
  output logic       rsel,
  // timing outputs
  output logic       fout,
  output logic       loadout,
  output logic       f10,
  output logic       f20,
  output logic       f1,
  output logic       f2,
  output logic       out_f1,
  output logic       out_f2,
  output logic       hvc_even,
  output logic       hvc_odd,
  output logic       mc,
  output logic       end_m,
  output logic       window,
  output logic       scaler_clear
);

  tsettings_t d;
  ctrl_t      ctrl;
  logic [7:0] nout;
  logic       blk, reset_int, clear_q;

  assign blk       = (addr[7:5] == BLK_TIMING);
  assign reset_int = blk && wr && (addr[4:0] == TREG_RESET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d    <= '0;
      ctrl <= '0;
    end else begin
      if (blk && wr) begin
        unique case (addr[4:0])
          TREG_D0:   d[7:0]   <= wdata;
          TREG_D1:   d[15:8]  <= wdata;
          TREG_D2:   d[23:16] <= wdata;
          TREG_D3:   d[31:24] <= wdata;
          TREG_D4:   d[39:32] <= wdata;
          TREG_D5:   d[47:40] <= wdata;
          TREG_CTRL: ctrl     <= ctrl_t'({5'b0, wdata[2:0]});
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = 8'h00;
    unique case (addr[4:0])
      TREG_D0:     rdata = d[7:0];
      TREG_D1:     rdata = d[15:8];
      TREG_D2:     rdata = d[23:16];
      TREG_D3:     rdata = d[31:24];
      TREG_D4:     rdata = d[39:32];
      TREG_D5:     rdata = d[47:40];
      TREG_CTRL:   rdata = {5'b0, ctrl.load_count, ctrl.hv_on, ctrl.start};
      TREG_STATUS: rdata = {6'b0, window, mc};
      TREG_NOUT:   rdata = nout;
      default:     rdata = 8'h00;
    endcase
  end
  // The scaler clear pulse has a flip-flop of its own: it drives the
  // asynchronous clear of the scaler counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clear_q <= 1'b0;
    else        clear_q <= blk && wr && (addr[4:0] == TREG_CTRL) && wdata[3];
  end

  assign rsel         = blk && rd;
  assign scaler_clear = clear_q;

  wtm_mod_divider #(.W(16)) u_div (
    .clk, .rst_n,
    .load_count (ctrl.load_count),
    .div        (d.divider),
    .fout,
    .loadout,
    .q          ()
  );

  wtm_gate_gen u_gate (
    .clk, .rst_n, .fout,
    .position (d.position),
    .width    (d.width),
    .hv_on    (ctrl.hv_on),
    .f10, .f20, .hvc_even, .hvc_odd,
    .qcc      ()
  );

  wtm_fine_delay u_fine (
    .clk, .rst_n, .f10, .f20,
    .fine_clk (d.fine_clk),
    .fine_tap (d.fine_tap),
    .f1, .f2
  );

  wtm_measure_ctrl u_meas (
    .clk, .rst_n,
    .start     (ctrl.start),
    .n_meas    (d.n_meas),
    .f1, .f2, .reset_int,
    .out_f1, .out_f2, .window, .mc, .end_m, .nout
  );

endmodule
