// wtm_tb_host: testbench model of the PC end of the RS232 line.
//
// send_cmd() sends one protocol line: slave number, command, address and data
// as two upper-case hex digits each, then CR LF, at BIT_CLKS clocks per bit
// (8N1). A receiver process collects the characters the unit sends and
// queues each line (without CR LF) in `lines`; get_reply() waits for one.
// xact() sends a command and checks the echo frame, returning the data field.
module wtm_tb_host #(
  parameter int BIT_CLKS = 292
) (
  input  logic clk,
  input  logic from_dut,
  output logic to_dut
);
  string lines [$];
  string cur = "";
  int    errors = 0;

  initial to_dut = 1'b1;

  task automatic send_char(input byte c);
    logic [9:0] fr;
    fr = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin
      to_dut = fr[i];
      repeat (BIT_CLKS) @(posedge clk);
    end
  endtask

  task automatic send_line(input string s);
    for (int i = 0; i < s.len(); i++) send_char(s[i]);
    send_char(8'h0D);
    send_char(8'h0A);
  endtask

  task automatic send_cmd(input logic [7:0] slave, cmd, addr, data);
    send_line($sformatf("%02X%02X%02X%02X", slave, cmd, addr, data));
  endtask

  // receiver: sample in the middle of each bit
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge from_dut);
      repeat (BIT_CLKS / 2) @(posedge clk);
      if (from_dut == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT_CLKS) @(posedge clk);
          c[i] = from_dut;
        end
        repeat (BIT_CLKS) @(posedge clk);
        if (from_dut != 1'b1) errors++;
        if (c == 8'h0A) begin
          lines.push_back(cur);
          cur = "";
        end else if (c != 8'h0D) begin
          cur = {cur, string'(c)};
        end
      end
    end
  end

  task automatic get_reply(input int max_clks, output string s, output bit ok);
    int n = 0;
    while (lines.size() == 0 && n < max_clks) begin @(posedge clk); n++; end
    ok = (lines.size() != 0);
    s  = ok ? lines.pop_front() : "";
  endtask

  // one command and its echo; ok is cleared if the echo is wrong or missing
  task automatic xact(input logic [7:0] slave, cmd, addr, data,
                      output logic [7:0] rdata, output bit ok);
    string s;
    bit got;
    logic [7:0] m, c, a;
    int unsigned d;
    send_cmd(slave, cmd, addr, data);
    get_reply(BIT_CLKS * 200, s, got);
    ok = got && (s.len() == 8);
    rdata = 8'h00;
    if (ok) begin
      m = 8'(s.substr(0, 1).atohex());
      c = 8'(s.substr(2, 3).atohex());
      a = 8'(s.substr(4, 5).atohex());
      d = s.substr(6, 7).atohex();
      rdata = 8'(d);
      ok = (m == 8'h00) && (c == cmd) && (a == addr) && (cmd != 8'hFF || rdata == data);
    end
  endtask
endmodule
