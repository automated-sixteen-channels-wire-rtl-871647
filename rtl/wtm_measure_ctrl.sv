// wtm_measure_ctrl: measure control of the timing unit.
//
// START opens the measurement window, which passes the delayed gates F1 and
// F2 to the scalers as out_f1/out_f2. The window only opens or closes on a
// falling edge of F2, so the scalers always see whole F1/F2 pulse pairs. The
// block counts the F2 pulses that pass; when the n_meas-th one begins it sets
// MC (measure complete), the window closes at the end of that pulse, and
// END_M is high from MC until the window has closed, telling the readout that
// data are ready. MC stays set until the host clears it (reset_int, a write to
// the timing unit's reset register); only then can a held START begin a new
// measurement. n_meas = 0 ends a measurement at once with no windows.
//
// Interface: clk, rst_n, start, n_meas = D<47..40>, f1, f2, reset_int;
// outputs out_f1, out_f2, window, mc, end_m and nout (F2 pulses counted in
// the current or last measurement).
// Timing: F2 edges are found by comparing F2 with its value one clock earlier,
// so window, mc and nout change one clock after the F2 edge.
//
// Following the schematic: START re-timed on F2 falling edges, an 8-bit
// counter of F2 pulses restarted as the window opens, MC set by the
// counter's end and cleared by a select-15 write, END_M as MC AND window, and
// AND gates passing F1/F2. Closing the window on MC rather than waiting for
// the host to drop START, and the n_meas = 0 behaviour, are this design's
// choices.
module wtm_measure_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] n_meas,
  input  logic       f1,
  input  logic       f2,
  input  logic       reset_int,
  output logic       out_f1,
  output logic       out_f2,
  output logic       window,
  output logic       mc,
  output logic       end_m,
  output logic [7:0] nout
);

  logic f2_q;
  logic f2_rise, f2_fall;

  assign f2_rise = f2 && !f2_q;
  assign f2_fall = !f2 && f2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f2_q   <= 1'b0;
      window <= 1'b0;
      mc     <= 1'b0;
      nout   <= '0;
    end else begin
      f2_q <= f2;

      if (f2_fall)
        window <= start && !mc && (n_meas != 8'd0);

      if (f2_fall && !window && start && !mc)
        nout <= '0;                       // window about to open
      else if (window && f2_rise && !mc)
        nout <= nout + 1'b1;

      if (reset_int)
        mc <= 1'b0;
      else if (window && f2_rise && !mc && (nout + 8'd1 == n_meas))
        mc <= 1'b1;
      else if (f2_fall && start && !mc && !window && (n_meas == 8'd0))
        mc <= 1'b1;
    end
  end

  assign out_f1 = f1 && window;
  assign out_f2 = f2 && window;
  assign end_m  = mc && window;

endmodule
