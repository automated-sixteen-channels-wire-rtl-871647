// tb_wtm_uart: transmitter and receiver at 57600 baud from 16.8 MHz. The
// transmitter's line is checked bit by bit against the expected 8N1 frame
// (292 clocks per bit); the receiver, fed by the transmitter, must return
// every byte; a frame with a low stop bit driven by the testbench is dropped.
module tb_wtm_uart;
  localparam int BIT = 292;
  logic       clk = 0, rst_n = 0;
  logic [7:0] tx_data = 0;
  logic       send = 0, txd, busy;
  logic [7:0] rx_data;
  logic       rx_valid;
  logic       line;
  bit         tb_drive = 0;
  logic       tb_line = 1;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  wtm_uart_tx #(.CLK_HZ(16_800_000), .BAUD(57_600)) u_tx (
    .clk, .rst_n, .data(tx_data), .send, .txd, .busy);
  assign line = tb_drive ? tb_line : txd;
  wtm_uart_rx #(.CLK_HZ(16_800_000), .BAUD(57_600)) u_rx (
    .clk, .rst_n, .rxd(line), .data(rx_data), .valid(rx_valid));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rx_valid) got.push_back(rx_data);

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_and_watch(input logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    @(negedge clk) begin tx_data = b; send = 1; end
    @(negedge clk) send = 0;
    // sample in the middle of each bit
    repeat (BIT / 2 - 1) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      check(txd == fr[i], $sformatf("byte %h bit %0d", b, i));
      repeat (BIT) @(negedge clk);
    end
    wait (!busy);
  endtask

  initial begin
    logic [7:0] bytes [6] = '{8'h55, 8'h00, 8'hFF, 8'hA5, 8'h0D, 8'h3C};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(txd == 1'b1, "idle line high");
    foreach (bytes[i]) send_and_watch(bytes[i]);
    repeat (BIT) @(posedge clk);
    check(got.size() == 6, $sformatf("received %0d bytes", got.size()));
    foreach (bytes[i]) if (i < got.size()) check(got[i] == bytes[i], $sformatf("rx byte %0d", i));
    // framing error: stop bit low -> dropped
    tb_drive = 1;
    begin
      logic [9:0] fr = {1'b0, 8'h81, 1'b0};
      for (int i = 0; i < 10; i++) begin tb_line = fr[i]; repeat (BIT) @(negedge clk); end
      tb_line = 1; repeat (3 * BIT) @(negedge clk);
    end
    check(got.size() == 6, "frame with low stop bit dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
