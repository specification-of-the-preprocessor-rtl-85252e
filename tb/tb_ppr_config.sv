// tb_ppr_config: sends command words as the serial interface would.
// Writes random values into all 24 registers of both channels and reads
// them back (each value masked to the field widths of the register map),
// checks decoded configuration fields, the power-up defaults, memory write
// strobes with auto-incrementing index, chip-wide registers and status
// read-back through the readback buffer.
`include "tb/tb_util.svh"
module tb_ppr_config;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cmd_stb = 0, rb_take = 0;
  logic [12:0] cmd = 0;
  ppr_ch_cfg_t cfg [2];
  logic add4_active, bypass, bypass_chan, rb_valid;
  logic [1:0] lut_wr, pb_wr;
  logic [9:0] mem_addr;
  logic [10:0] mem_wdata, rb_data;
  logic [10:0] pb_rdata [2];
  logic [19:0] rate_count [2];
  logic [9:0] rate_time [2];
  logic [2:0] status [2];
  ppr_config dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  // field masks of the register map
  localparam logic [10:0] MASK [24] = '{11'h003, 11'h3FF, 11'h0FF, 11'h0FF, 11'h07F,
    11'h007, 11'h3FF, 11'h007, 11'h3FF, 11'h007, 11'h3FF, 11'h07F, 11'h03F, 11'h07F,
    11'h03F, 11'h0FF, 11'h7FF, 11'h7FF, 11'h01F, 11'h7FF, 11'h7FF, 11'h003, 11'h3FF, 11'h3FF};
  task automatic send(input logic [1:0] f, input logic [10:0] d);
    @(negedge clk); cmd = {f, d}; cmd_stb = 1;
    @(negedge clk); cmd_stb = 0;
  endtask
  task automatic read_one(output logic [10:0] v);
    send(2'b11, 0);
    `CHECK(rb_valid, "readback valid")
    v = rb_data;
    rb_take = 1; @(negedge clk); rb_take = 0;
  endtask
  logic [10:0] wr [2][24];
  initial begin
    logic [10:0] v;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    `CHECK(cfg[0] == CH_CFG_DEFAULT && cfg[1] == CH_CFG_DEFAULT, "power-up defaults")
    for (int c = 0; c < 2; c++) begin
      pb_rdata[c] = 11'h123 + 11'(c); rate_count[c] = 20'hABCDE + 20'(c);
      rate_time[c] = 10'd77; status[c] = 3'(5 + c);
    end
    for (int c = 0; c < 2; c++) begin
      send(2'b10, {6'd0, 1'(c), 4'd0});      // target: channel regs
      send(2'b10, {1'b1, 10'd0});            // index 0
      for (int r = 0; r < 24; r++) begin
        wr[c][r] = 11'($urandom);
        send(2'b01, wr[c][r]);
      end
    end
    `CHECK(cfg[1].coef3 == wr[1][3][3:0] && cfg[0].bound_med == wr[0][8][9:0]
           && cfg[1].pb_empty == {wr[1][18][4:0], wr[1][17]}
           && cfg[0].hist_bc_hi == {wr[0][21][1], wr[0][20]}, "decoded fields")
    for (int c = 0; c < 2; c++) begin
      send(2'b10, {6'd0, 1'(c), 4'd0});
      send(2'b10, {1'b1, 10'd0});
      for (int r = 0; r < 24; r++) begin
        read_one(v);
        `CHECK(v == (wr[c][r] & MASK[r]), $sformatf("ch %0d reg %0d read %h wrote %h", c, r, v, wr[c][r]))
      end
    end
    // LUT writes with auto-increment
    send(2'b10, {6'd0, 1'b1, 4'd1});
    send(2'b10, {1'b1, 10'd1000});
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); cmd = {2'b01, 11'(k + 40)}; cmd_stb = 1; #1;
      `CHECK(lut_wr == 2'b10 && mem_addr == 10'(1000 + k) && mem_wdata == 11'(k + 40) && pb_wr == 0, "LUT write strobe")
      @(negedge clk); cmd_stb = 0;
    end
    // playback memory write and read
    send(2'b10, {6'd0, 1'b0, 4'd2});
    send(2'b10, {1'b1, 10'd7});
    @(negedge clk); cmd = {2'b01, 11'h55}; cmd_stb = 1; #1;
    `CHECK(pb_wr == 2'b01 && lut_wr == 0 && mem_addr == 10'd7, "PB write strobe")
    @(negedge clk); cmd_stb = 0;
    read_one(v); `CHECK(v == 11'h123, "PB read")
    // chip-wide registers
    send(2'b10, {6'd0, 1'b0, 4'd3});
    send(2'b10, {1'b1, 10'd0});
    send(2'b01, 11'h1); send(2'b01, 11'h3);
    `CHECK(add4_active && bypass && bypass_chan, "chip-wide registers")
    // status
    send(2'b10, {6'd0, 1'b1, 4'd4});
    send(2'b10, {1'b1, 10'd0});
    read_one(v); `CHECK(v == 11'(20'hABCDF & 20'h7FF), "rate count low")
    read_one(v); `CHECK(v == 11'(20'hABCDF >> 11), "rate count high")
    read_one(v); `CHECK(v == 11'd77, "rate time")
    read_one(v); `CHECK(v == 11'd6, "status")
    // no-op word changes nothing
    send(2'b00, 11'h7FF);
    `CHECK(!rb_valid && cfg[1].coef3 == wr[1][3][3:0], "no-op")
    `TB_DONE
  end
endmodule
