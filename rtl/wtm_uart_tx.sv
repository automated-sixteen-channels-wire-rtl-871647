// wtm_uart_tx: RS232 transmitter, 8 data bits, no parity, one stop bit.
//
// A one-clock send pulse loads data into a 10-bit frame (start bit, eight
// data bits LSB first, stop bit) that is shifted out one bit per
// CLK_HZ / BAUD clocks (rounded). busy is high from the send pulse until
// the end of the stop bit; send while busy is ignored. txd idles high.
//
// The line rate follows the document; the frame format is this design's
// choice.
module wtm_uart_tx #(
  parameter int unsigned CLK_HZ = 16_800_000,
  parameter int unsigned BAUD   = 57_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       send,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned BIT_CLKS = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW       = $clog2(BIT_CLKS + 1);

  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] timer;

  assign busy = (bits_left != 0);
  assign txd  = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      timer     <= '0;
    end else if (!busy) begin
      if (send) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        timer     <= CW'(BIT_CLKS - 1);
      end
    end else if (timer == 0) begin
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      timer     <= CW'(BIT_CLKS - 1);
    end else begin
      timer <= timer - 1'b1;
    end
  end

endmodule
