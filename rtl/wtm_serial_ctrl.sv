// wtm_serial_ctrl: RS232 command interface of the meter (the local
// processor's protocol), driving the system bus.
//
// The host (master) sends one command per line: four fields of two ASCII hex
// digits each, then CR LF:
//   <slave number> <command: FF write, 00 read> <address> <data>
// When the slave number equals this unit's board_id (the hex address
// switches; 00 is reserved for the master and never answers), the frame is
// executed as one system-bus cycle: FF writes data to address, 00 reads
// address. The unit then answers with
//   <00> <echoed command> <echoed address> <written or read data> CR LF
// Frames for other units, other commands and lines that are not exactly
// eight hex digits are dropped silently, so many units can share one line;
// tx_oe is high only while this unit transmits, to enable its line driver.
// CR is ignored, LF ends a line, letters may be upper or lower case.
//
// Bus: bus_wr or bus_rd is a one-clock strobe with bus_addr/bus_wdata valid;
// bus_rdata is sampled in the same clock. Timing: the answer starts one clock
// after the LF is received; a full exchange takes 20 characters, about
// 3.5 ms at 57600 baud. A command arriving while an answer is being sent is
// dropped.
//
// The field order, the FF/00 command codes, the master number 00 and the
// CR LF terminator follow the document's protocol table; hex-ASCII coding of
// the fields, the rules for malformed lines and the replacement of the
// processor firmware by this state machine are this design's choices.
module wtm_serial_ctrl
  import wtm_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD   = BAUD_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       txd,
  output logic       tx_oe,
  input  logic [7:0] board_id,
  output logic [7:0] bus_addr,
  output logic [7:0] bus_wdata,
  output logic       bus_wr,
  output logic       bus_rd,
  input  logic [7:0] bus_rdata
);

  // ---------------------------------------------------------------- serial
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_send, tx_busy;

  wtm_uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid)
  );
  wtm_uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .data(tx_data), .send(tx_send), .txd, .busy(tx_busy)
  );

  // ---------------------------------------------------------------- parser
  logic        is_hex;
  logic [3:0]  hex_val;
  logic [31:0] fields;     // {slave, command, address, data}
  logic [3:0]  n_digits;   // 0..8, 9 = line spoilt, wait for LF

  always_comb begin
    is_hex  = 1'b1;
    hex_val = 4'h0;
    if (rx_data >= "0" && rx_data <= "9")      hex_val = 4'(rx_data - "0");
    else if (rx_data >= "A" && rx_data <= "F") hex_val = 4'(rx_data - "A" + 8'd10);
    else if (rx_data >= "a" && rx_data <= "f") hex_val = 4'(rx_data - "a" + 8'd10);
    else                                       is_hex  = 1'b0;
  end

  // ---------------------------------------------------------------- answer
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} tstate_t;

  tstate_t     tstate;
  logic [31:0] reply;      // {00, command, address, data}
  logic [3:0]  char_idx;   // 0..9: 8 hex digits, CR, LF
  logic        exec;

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? (8'("0") + 8'(n)) : (8'("A") + 8'(n) - 8'd10);
  endfunction

  assign exec = rx_valid && (rx_data == ASCII_LF) && (n_digits == 4'd8) &&
                (fields[31:24] == board_id) && (board_id != MASTER_ID) &&
                (fields[23:16] == CMD_WRITE || fields[23:16] == CMD_READ) &&
                (tstate == S_IDLE);

  assign bus_addr  = fields[15:8];
  assign bus_wdata = fields[7:0];
  assign bus_wr    = exec && (fields[23:16] == CMD_WRITE);
  assign bus_rd    = exec && (fields[23:16] == CMD_READ);

  always_comb begin
    if (char_idx < 4'd8) tx_data = hex_char(reply[31 - 4*char_idx -: 4]);
    else if (char_idx == 4'd8) tx_data = ASCII_CR;
    else tx_data = ASCII_LF;
  end
  assign tx_send = (tstate == S_SEND) && !tx_busy;
  assign tx_oe   = (tstate != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fields   <= '0;
      n_digits <= '0;
      tstate   <= S_IDLE;
      reply    <= '0;
      char_idx <= '0;
    end else begin
      // line parser
      if (rx_valid) begin
        if (rx_data == ASCII_LF) begin
          n_digits <= '0;
        end else if (rx_data == ASCII_CR) begin
          // ignored
        end else if (is_hex && n_digits < 4'd8) begin
          fields   <= {fields[27:0], hex_val};
          n_digits <= n_digits + 1'b1;
        end else begin
          n_digits <= 4'd9;
        end
      end

      // answer sequencer
      unique case (tstate)
        S_IDLE: if (exec) begin
          reply    <= {MASTER_ID, fields[23:16], fields[15:8],
                       bus_wr ? fields[7:0] : bus_rdata};
          char_idx <= '0;
          tstate   <= S_SEND;
        end
        S_SEND: if (!tx_busy) begin
          tstate <= S_WAIT;
        end
        S_WAIT: if (!tx_busy) begin
          if (char_idx == 4'd9) begin
            tstate <= S_IDLE;
          end else begin
            char_idx <= char_idx + 1'b1;
            tstate   <= S_SEND;
          end
        end
        default: tstate <= S_IDLE;
      endcase
    end
  end

endmodule
