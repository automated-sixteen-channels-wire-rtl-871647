// tb_wtm_scaler8: four sensor clocks of different periods, F1 and F2 windows
// opened by the testbench between sensor edges, so the expected counts are
// exact. Counts are also kept by the testbench itself, then all 32 bytes are
// read over the bus and compared; also checked: the board address compare,
// the byte order, counting past 16 bits and CLEAR.
module tb_wtm_scaler8;
  localparam logic [2:0] ID = 3'd5;
  logic [3:0] ch_in = 0;
  logic       in_f1 = 0, in_f2 = 0, clear = 0;
  logic [7:0] addr = 0;
  logic       cs = 0, rd = 0;
  logic [7:0] dout;
  logic       dout_en;
  int checks = 0, failures = 0;
  longint exp_cnt [8];
  bit running = 1;

  wtm_scaler8 #(.BOARD_ID(ID)) dut (.*);

  // sensor clocks: half periods 7, 9, 11, 13 ns
  for (genvar c = 0; c < 4; c++) begin : g_src
    initial begin
      #(c);
      while (running) begin
        #(7 + 2 * c) ch_in[c] = ~ch_in[c];
      end
    end
    always @(posedge ch_in[c]) begin
      if (in_f1) exp_cnt[2*c]++;
      if (in_f2) exp_cnt[2*c+1]++;
    end
  end

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // windows change at times away from any sensor edge: 0.5 ns off the grid
  task automatic window(input bit second, input int len_ns);
    #0.5;
    if (second) in_f2 = 1; else in_f1 = 1;
    #(len_ns);
    if (second) in_f2 = 0; else in_f1 = 0;
    #0.5;
  endtask

  task automatic read_byte(input logic [7:0] a, output logic [7:0] d, output bit en);
    addr = a; cs = 1; rd = 1;
    #2;
    d = dout; en = dout_en;
    cs = 0; rd = 0;
    #2;
  endtask

  task automatic compare_all(input string tag);
    logic [7:0] d; bit en;
    for (int k = 0; k < 8; k++) begin
      logic [31:0] w;
      for (int b = 0; b < 4; b++) begin
        read_byte({ID, 3'(k), 2'(b)}, d, en);
        w[8*b +: 8] = d;
        check(en, "dout_en on own address");
      end
      check(w == 32'(exp_cnt[k]), $sformatf("%s counter %0d = %0d expected %0d", tag, k, w, exp_cnt[k]));
    end
  endtask

  initial begin
    logic [7:0] d; bit en;
    #0.25 clear = 1;
    #10 clear = 0;
    foreach (exp_cnt[k]) exp_cnt[k] = 0;
    #20;
    repeat (5) begin
      window(0, 3000);
      #1000;
      window(1, 2500);
      #1000;
    end
    compare_all("short");
    // another board's address: not driven
    read_byte({3'd2, 5'd0}, d, en);
    check(!en, "other board address ignored");
    // chip select low: not driven
    addr = {ID, 5'd0}; cs = 0; rd = 1; #2;
    check(!dout_en, "cs low ignored");
    rd = 0;
    // count beyond 16 bits on F1 of channel 0: 65536 * 14 ns ~ 0.92 ms
    window(0, 1_000_000);
    compare_all("long");
    check(exp_cnt[0] > 65535, "counter passed 16 bits");
    // clear
    #0.3 clear = 1; #5 clear = 0;
    foreach (exp_cnt[k]) exp_cnt[k] = 0;
    compare_all("cleared");
    running = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
