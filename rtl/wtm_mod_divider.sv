// wtm_mod_divider: HV modulation frequency generator of the timing unit.
//
// A 16-bit up-counter runs on the 16.8 MHz quartz clock. When it reaches its
// terminal count (all ones) it emits a one-clock pulse on fout and reloads the
// divider setting D<15..0> on the next edge, so fout has a period of
// (2**W - div) clocks: div = 0 gives the slowest rate, 16.8 MHz / 65536 =
// 256 Hz, matching the quoted minimum output frequency. Holding load_count
// high keeps the counter at the load value (no fout pulses), which lets the
// host restart the divider from a known phase.
//
// Interface: clk, asynchronous active-low rst_n, load_count, div; outputs fout
// (pulse, doubles as the count enable of the gate generator), loadout (the
// counter's load condition, a monitor pin) and the count q.
// Timing: fout is high for one clock per period; a new div takes effect at the
// next reload.
//
// The loadable up-counter whose load input is the OR of its carry-out and a
// host load bit follows the timing-unit schematic; the reset value is this
// design's own choice.
module wtm_mod_divider #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_count,
  input  logic [W-1:0] div,
  output logic         fout,
  output logic         loadout,
  output logic [W-1:0] q
);

  logic tc;
  assign tc   = (q == '1);
  assign fout    = tc;
  assign loadout = tc || load_count;   // LOAD net, brought out as a monitor pin

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= '0;
    else if (tc || load_count) q <= div;
    else                       q <= q + 1'b1;
  end

endmodule
