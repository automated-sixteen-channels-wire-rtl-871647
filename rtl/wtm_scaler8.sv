// wtm_scaler8: one scaler FPGA, four sensor channels with two 32-bit
// counters each.
//
// Counter 2c counts rising edges of channel c's discriminated sensor signal
// while gate F1 is high, counter 2c+1 while F2 is high, so the pair measures
// the sensor frequency in the two HV phases. Input edges are only admitted
// while F1 or F2 is open (COUNT = F1 OR F2). CLEAR zeroes all counters
// asynchronously.
//
// Readout: the board answers when cs is high and addr[7:5] equals its
// BOARD_ID (set by pins on the board). addr[4:1] selects a 16-bit half of a
// counter (word 2k = counter k bits 15..0, word 2k+1 = bits 31..16) and
// addr[0] the byte in it (0 = low byte). dout is combinational and dout_en is
// high during a read of this board, so the data bus can be shared.
//
// Interface: ch_in[3:0] sensor square waves, in_f1/in_f2 gates, clear, and the
// bus signals addr, cs, rd; outputs dout, dout_en. Timing: each counter is
// clocked by its own sensor signal; the gates are used as count enables
// without synchronisation, as in the original, so a count at the very edge of
// a gate may fall on either side of it. Read the counters only after the
// measurement has ended.
//
// The counter arrangement, address compare, select decoding and byte
// multiplexing follow the scaler schematic. There the sensor clock is gated
// by COUNT; here COUNT is folded into the count enable so that no clock is
// gated in logic, which counts the same edges.
module wtm_scaler8 #(
  parameter logic [2:0]  BOARD_ID = 3'd0,
  parameter int unsigned N_CH     = 4,
  parameter int unsigned CNT_W    = 32
) (
  input  logic [N_CH-1:0] ch_in,
  input  logic            in_f1,
  input  logic            in_f2,
  input  logic            clear,
  input  logic [7:0]      addr,
  input  logic            cs,
  input  logic            rd,
  output logic [7:0]      dout,
  output logic            dout_en
);

  localparam int unsigned N_COUNTERS = 2 * N_CH;

  logic [CNT_W-1:0] cnt [N_COUNTERS];
  logic             count_gate;

  assign count_gate = in_f1 || in_f2;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [CNT_W-1:0] cnt_f1, cnt_f2;
    always_ff @(posedge ch_in[c] or posedge clear) begin
      if (clear) begin
        cnt_f1 <= '0;
        cnt_f2 <= '0;
      end else if (count_gate) begin
        if (in_f1) cnt_f1 <= cnt_f1 + 1'b1;
        if (in_f2) cnt_f2 <= cnt_f2 + 1'b1;
      end
    end
    assign cnt[2*c]   = cnt_f1;
    assign cnt[2*c+1] = cnt_f2;
  end

  logic             blk;
  logic [3:0]       word_sel;
  logic [CNT_W-1:0] word;

  assign blk      = cs && (addr[7:5] == BOARD_ID);
  assign word_sel = addr[4:1];

  logic [2:0] cnt_idx;
  logic [1:0] byte_idx;

  assign cnt_idx  = word_sel[3:1];
  assign byte_idx = {word_sel[0], addr[0]};

  always_comb begin
    word = (32'(cnt_idx) < N_COUNTERS) ? cnt[cnt_idx] : '0;
    dout = word[8*byte_idx +: 8];
  end

  assign dout_en = blk && rd;

endmodule
