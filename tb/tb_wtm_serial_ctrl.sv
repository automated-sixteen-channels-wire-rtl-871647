// tb_wtm_serial_ctrl: the serial command interface against a host model and
// a 256-byte bus memory. Checks write and read frames and their echoes, the
// bus strobes, that frames for another slave, with an unknown command or
// malformed are ignored (no bus cycle, no answer), lower-case hex, that
// tx_oe covers the answer only, and the exchange time at 57600 baud.
module tb_wtm_serial_ctrl;
  localparam logic [7:0] ID = 8'h2A;
  logic       clk = 0, rst_n = 0;
  logic       rxd, txd, tx_oe;
  logic [7:0] board_id = ID;
  logic [7:0] bus_addr, bus_wdata, bus_rdata;
  logic       bus_wr, bus_rd;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, oe_while_idle = 0;

  wtm_serial_ctrl dut (.*);
  wtm_tb_host #(.BIT_CLKS(292)) host (.clk, .from_dut(txd), .to_dut(rxd));

  always #5 clk = ~clk;

  assign bus_rdata = mem[bus_addr];
  always @(posedge clk) if (rst_n) begin
    if (bus_wr) begin mem[bus_addr] <= bus_wdata; n_wr++; end
    if (bus_rd) n_rd++;
    if (tx_oe === 1'b0 && txd !== 1'b1) oe_while_idle++;
  end

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] d;
    bit ok;
    string s;
    int t0, t1;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);

    // write
    t0 = $time;
    host.xact(ID, 8'hFF, 8'h13, 8'hC4, d, ok);
    t1 = $time;
    check(ok, "write echo");
    check(mem[8'h13] == 8'hC4, "write reached bus");
    check(n_wr == 1 && n_rd == 0, "one write strobe");
    // 20 characters of 10 bits at 292 clocks; the host sees the last one in
    // the middle of its stop bit
    check((t1 - t0) / 10 >= 199 * 292 && (t1 - t0) / 10 < 201 * 292,
          $sformatf("exchange time %0d clocks", (t1 - t0) / 10));
    // read
    host.xact(ID, 8'h00, 8'h40, 8'h00, d, ok);
    check(ok && d == 8'(8'h40 * 7 + 3), $sformatf("read echo data %h", d));
    check(n_rd == 1, "one read strobe");
    // read back what was written
    host.xact(ID, 8'h00, 8'h13, 8'h00, d, ok);
    check(ok && d == 8'hC4, "read back written byte");
    // other slave: ignored
    host.send_cmd(8'h2B, 8'hFF, 8'h14, 8'h99);
    host.get_reply(292 * 40, s, ok);
    check(!ok && mem[8'h14] != 8'h99 && n_wr == 1, "other slave ignored");
    // unknown command: ignored
    host.send_cmd(ID, 8'h5A, 8'h14, 8'h99);
    host.get_reply(292 * 40, s, ok);
    check(!ok && n_wr == 1 && n_rd == 2, "unknown command ignored");
    // malformed lines: too short, bad character, too long
    host.send_line("2AFF14");
    host.send_line("2AFF1G99");
    host.send_line("2AFF149900");
    host.get_reply(292 * 40, s, ok);
    check(!ok && n_wr == 1, "malformed lines ignored");
    // lower case
    host.send_line("2aff14ab");
    host.get_reply(292 * 200, s, ok);
    check(ok && s == "00FF14AB" && mem[8'h14] == 8'hAB, $sformatf("lower case accepted: %s", s));
    check(oe_while_idle == 0, "line quiet without tx_oe");
    check(host.errors == 0, "stop bits of answers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
