// wtm_tb_sensor: behavioural model of one sensor channel as the scalers see
// it, the LC oscillator followed by its zero-crossing comparator. It is not
// synthesizable and stands in for analog parts only.
//
// The output is a square wave of period PERIOD_OFF_NS while the HV on this
// tube is off, and longer by on_ppm parts per million while it is on (hv_n
// low): the wire pulled towards the tube wall changes the wire-tube
// capacitance and so the oscillator frequency. The period switches at the
// next half cycle. With run low the output stops, which only saves
// simulation time when nothing is counted.
module wtm_tb_sensor #(
  parameter realtime PERIOD_OFF_NS = 50.0
) (
  input  logic        run,
  input  logic        hv_n,
  input  int unsigned on_ppm,
  output logic        out
);
  initial begin
    out = 1'b0;
    forever begin
      if (!run) @(posedge run);
      #((hv_n ? PERIOD_OFF_NS : PERIOD_OFF_NS * (1.0 + real'(on_ppm) * 1.0e-6)) / 2.0);
      out = ~out;
    end
  end
endmodule
