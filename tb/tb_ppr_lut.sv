// tb_ppr_lut: waits for the power-up fill and checks the linear content,
// then loads a random table and checks truncation (every LSB setting,
// saturation of the field on overflow), the 2-clock latency and the
// by-pass (two LSBs dropped).
`include "tb/tb_util.svh"
module tb_ppr_lut;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [16:0] y = 0;
  logic [2:0] lsb = 0;
  logic bypass = 0, wr_en = 0, init_busy, ovf;
  logic [9:0] wr_addr = 0, field;
  logic [7:0] wr_data = 0, data;
  logic [7:0] table_ref [1024];
  ppr_lut dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; `TB_DONE
  end
  logic [16:0] yh [2];
  task automatic step(input logic [16:0] v);
    @(negedge clk); y = v;
    yh[1] = yh[0]; yh[0] = v;
    @(posedge clk); #1;
  endtask
  function automatic logic [9:0] fld(input logic [16:0] v, input logic [2:0] s, output logic o);
    logic [16:0] sh;
    sh = v >> s;
    o = |sh[16:10];
    return o ? 10'h3FF : sh[9:0];
  endfunction
  initial begin
    int cyc;
    logic o;
    logic [9:0] f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    @(posedge clk);
    while (init_busy) begin @(posedge clk); cyc++; end
    `CHECK(cyc >= 1020 && cyc <= 1025, $sformatf("fill took %0d clocks", cyc))
    // linear power-up content
    for (int a = 0; a < 1024; a += 37) begin
      step(17'(a)); step(0);
      `CHECK(data == 8'(a >> 2), $sformatf("linear a=%0d data=%0d", a, data))
    end
    // load a random table
    for (int a = 0; a < 1024; a++) begin
      table_ref[a] = 8'($urandom);
      @(negedge clk); wr_en = 1; wr_addr = 10'(a); wr_data = table_ref[a];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 400; i++) begin
      lsb = 3'(i / 50);
      step((i % 7 == 0) ? 17'($urandom) : 17'($urandom_range(0, 1023 << lsb)));
      if (i % 50 > 2) begin
        f = fld(yh[1], lsb, o);
        `CHECK(field == f && ovf == o && data == table_ref[f],
               $sformatf("lsb %0d y=%0d field=%0d exp %0d", lsb, yh[1], field, f))
      end
    end
    bypass = 1; lsb = 0;
    for (int i = 0; i < 50; i++) begin
      step(17'($urandom_range(0, 1023)));
      if (i > 2) `CHECK(data == 8'(yh[1] >> 2), "bypass drops 2 LSBs")
    end
    `TB_DONE
  end
endmodule
