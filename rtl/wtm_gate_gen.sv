// wtm_gate_gen: coarse delay setting and scaler counting gate generator.
//
// An 8-bit phase counter (qcc) advances once per fout pulse, so its bit 7 is a
// square wave at fout/256: this is the HV modulation. HV drive follows qcc[7]
// when hv_on is set: hvc_even is low (HV applied) while qcc[7] is 1 and
// hvc_odd is low while qcc[7] is 0, so neighbouring tubes are excited in
// opposite half periods. With both outputs high the HV is off.
//
// The counting gates are derived from qc = qcc + position. In each half period
// of qc[7] a gate is high while qc[6:0] >= width: F10 in the half with
// qc[7] = 0, F20 in the half with qc[7] = 1. With position = 0 a gate opens
// `width` fout periods after the HV edge and closes on the next HV edge; a
// non-zero position smaller than width moves both gates inside the HV half
// period, so width then sets the pulse length and position its placement.
// Both gates are re-timed by a register enabled by fout.
//
// Interface: clk, rst_n, fout (enable), position = D<23..16>,
// width = D<30..24>, hv_on = ON_OFF_HV; outputs f10, f20, hvc_even, hvc_odd,
// qcc. Timing: gates change one clock after an fout pulse; resolution is one
// fout period (about 4 ms at the 256 Hz minimum rate).
//
// The counter, adder, 8-bit compare against {0, D<30..24>} and {0, qc[6:0]},
// the gating by qc[7] and the NAND drive of HVC_EVEN/HVC_ODD follow the
// timing-unit schematic; which NAND input is inverted, and the reset values,
// are this design's reading of it.
module wtm_gate_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fout,
  input  logic [7:0] position,
  input  logic [6:0] width,
  input  logic       hv_on,
  output logic       f10,
  output logic       f20,
  output logic       hvc_even,
  output logic       hvc_odd,
  output logic [7:0] qcc
);

  logic [7:0] qc;
  logic       in_width;   // qc[6:0] >= width, i.e. not (width > qc[6:0])

  assign qc       = qcc + position;
  assign in_width = !({1'b0, width} > {1'b0, qc[6:0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcc <= '0;
      f10 <= 1'b0;
      f20 <= 1'b0;
    end else if (fout) begin
      qcc <= qcc + 1'b1;
      f10 <= in_width && !qc[7];
      f20 <= in_width &&  qc[7];
    end
  end

  assign hvc_even = !(hv_on &&  qcc[7]);
  assign hvc_odd  = !(hv_on && !qcc[7]);

endmodule
