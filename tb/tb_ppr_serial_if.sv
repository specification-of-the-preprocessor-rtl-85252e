// tb_ppr_serial_if: two interfaces in a daisy chain (DaisyOut of the first
// to DataIn of the second, DataOut of the second to DaisyIn of the first),
// Frame once every 26 serial clocks. The serial clock (20 ns) and the LHC
// clock (25 ns) are unrelated. Checks that each chip receives its own word
// of every pair, once per frame, in its LHC clock domain, and that the
// serial output carries the first chip's word followed by the second's.
`include "tb/tb_util.svh"
module tb_ppr_serial_if;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic ser_clk = 0, clk = 0, rst_n = 0, frame = 0, data_in = 0;
  logic d0_out, d0_daisy_out, d1_out, d1_daisy_out;
  logic [12:0] rx0, rx1, tx0 = 13'h0AA, tx1 = 13'h155;
  logic stb0, stb1;

  ppr_serial_if u0 (.ser_clk, .ser_rst_n(rst_n), .frame, .data_in, .data_out(d0_out),
    .daisy_in(d1_out), .daisy_out(d0_daisy_out), .clk, .rst_n, .rx_word(rx0),
    .frame_stb(stb0), .tx_word(tx0));
  ppr_serial_if u1 (.ser_clk, .ser_rst_n(rst_n), .frame, .data_in(d0_daisy_out),
    .data_out(d1_out), .daisy_in(1'b0), .daisy_out(d1_daisy_out), .clk, .rst_n,
    .rx_word(rx1), .frame_stb(stb1), .tx_word(tx1));

  always #10   ser_clk = ~ser_clk;
  always #12.5 clk = ~clk;

  initial begin
    #400000 failures++; `TB_DONE
  end

  logic [12:0] exp0 [$], exp1 [$];
  int got0 = 0, got1 = 0;
  // core side: check received words, present a new transmit word
  always @(posedge clk) begin
    if (rst_n && stb0) begin
      `CHECK(exp0.size() > 0 && rx0 == exp0[0], $sformatf("chip0 rx %h", rx0))
      if (exp0.size() > 0) void'(exp0.pop_front());
      tx0 <= 13'($urandom); got0++;
    end
    if (rst_n && stb1) begin
      `CHECK(exp1.size() > 0 && rx1 == exp1[0], $sformatf("chip1 rx %h", rx1))
      if (exp1.size() > 0) void'(exp1.pop_front());
      tx1 <= 13'($urandom); got1++;
    end
  end

  // serial output checker: 26 bits after each frame edge
  logic [25:0] expect_out;
  int bitn = -1;
  always @(posedge ser_clk) begin
    if (frame && rst_n) begin
      expect_out = {tx0, tx1};
      bitn = 0;
    end
  end
  always @(negedge ser_clk) begin
    if (bitn >= 0 && bitn < 26) begin
      `CHECK(d0_out == expect_out[25 - bitn], $sformatf("out bit %0d", bitn))
      bitn++;
    end
  end

  initial begin
    logic [12:0] w0, w1;
    repeat (3) @(posedge ser_clk);
    rst_n = 1;
    exp0.push_back('0); exp1.push_back('0);
    for (int g = 0; g < 60; g++) begin
      w1 = 13'($urandom); w0 = 13'($urandom);
      for (int b = 0; b < 26; b++) begin
        @(negedge ser_clk);
        frame   = (b == 0);
        data_in = (b < 13) ? w1[12 - b] : w0[25 - b];
      end
      exp0.push_back(w0); exp1.push_back(w1);
    end
    @(negedge ser_clk); frame = 1; @(negedge ser_clk); frame = 0;
    repeat (20) @(posedge clk);
    `CHECK(got0 == 61 && got1 == 61 && exp0.size() == 0, $sformatf("frames %0d %0d", got0, got1))
    `TB_DONE
  end
endmodule
