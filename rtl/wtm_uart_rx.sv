// wtm_uart_rx: RS232 receiver, 8 data bits, no parity, one stop bit.
//
// The line is synchronised with two flip-flops. A falling edge starts a
// character; the start bit is checked at its middle, then each data bit
// (LSB first) is sampled at the middle of its bit time, counted in clocks of
// CLK_HZ / BAUD (rounded). A character whose stop bit is low is dropped.
//
// Interface: clk, rst_n, rxd; outputs data and a one-clock valid pulse after
// the middle of the stop bit. Timing: 57600 baud from 16.8 MHz uses 292
// clocks per bit (0.1 % fast).
//
// The line rate follows the document; the frame format (8N1) and the
// receiver structure are this design's choices.
module wtm_uart_rx #(
  parameter int unsigned CLK_HZ = 16_800_000,
  parameter int unsigned BAUD   = 57_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned BIT_CLKS = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW       = $clog2(BIT_CLKS + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t         state;
  logic [1:0]     sync;
  logic [CW-1:0]  timer;
  logic [2:0]     bit_idx;
  logic [7:0]     shreg;
  logic           line;

  assign line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      state   <= IDLE;
      timer   <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!line) begin
          state <= START;
          timer <= CW'(BIT_CLKS / 2 - 1);
        end
        START: if (timer == 0) begin
          if (!line) begin
            state   <= DATA;
            timer   <= CW'(BIT_CLKS - 1);
            bit_idx <= '0;
          end else begin
            state <= IDLE;                 // glitch, not a start bit
          end
        end else timer <= timer - 1'b1;
        DATA: if (timer == 0) begin
          shreg <= {line, shreg[7:1]};
          timer <= CW'(BIT_CLKS - 1);
          if (bit_idx == 3'd7) state <= STOP;
          bit_idx <= bit_idx + 1'b1;
        end else timer <= timer - 1'b1;
        STOP: if (timer == 0) begin
          state <= IDLE;
          if (line) begin
            data  <= shreg;
            valid <= 1'b1;
          end
        end else timer <= timer - 1'b1;
      endcase
    end
  end

endmodule
