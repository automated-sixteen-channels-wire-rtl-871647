// wtm_fine_delay: fine delay of the two scaler gates, compensating the HV
// cable length.
//
// A free-running 8-bit counter on the 16.8 MHz clock provides eight divided
// rates; fine_clk (D<34..32>) picks counter bit k, giving a shift rate of
// clk / 2**(k+1). At that rate F10 and F20 are each shifted into a 32-stage
// shift register (two 16-stage halves in the original), and fine_tap
// (D<39..35>) selects stage fine_tap, so F1/F2 are F10/F20 delayed by
// (fine_tap + 1) shift periods: 32 delays in steps of 2**(k+1) clocks.
// fine_tap[4] (D<39>) chooses the second half of the register, fine_tap[3:0]
// (D<38..35>) the stage inside the half.
//
// Interface: clk, rst_n, f10, f20, fine_clk, fine_tap; outputs f1, f2.
// Timing: the shift happens on the clock edge at which the selected counter
// bit rises, so the delay is exact to within one shift period of sampling.
// The original clocks the shift registers with the selected counter bit
// through a global buffer; here that bit's rising edge is a clock enable, so
// the block stays in the single 16.8 MHz domain. That is this design's choice.
module wtm_fine_delay (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       f10,
  input  logic       f20,
  input  logic [2:0] fine_clk,
  input  logic [4:0] fine_tap,
  output logic       f1,
  output logic       f2
);

  localparam int unsigned STAGES = 32;

  logic [7:0]        div_cnt;
  logic [7:0]        div_next;
  logic              shift_en;
  logic [STAGES-1:0] sr1, sr2;

  assign div_next = div_cnt + 1'b1;
  assign shift_en = div_next[fine_clk] && !div_cnt[fine_clk];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      sr1     <= '0;
      sr2     <= '0;
    end else begin
      div_cnt <= div_next;
      if (shift_en) begin
        sr1 <= {sr1[STAGES-2:0], f10};
        sr2 <= {sr2[STAGES-2:0], f20};
      end
    end
  end

  assign f1 = sr1[fine_tap];
  assign f2 = sr2[fine_tap];

endmodule
