// tb_ppr_input_latch: drives data that changes on both clock edges and
// checks that the rising-edge setting returns the value present at the
// rising edge and the falling-edge setting the value present at the
// preceding falling edge, each one rising edge later.
`include "tb/tb_util.svh"
module tb_ppr_input_latch;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pos_edge = 1;
  logic [9:0] fadc = 0;
  logic ext_bcid = 0;
  logic [10:0] q;
  ppr_input_latch dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_DONE
  end
  logic [10:0] at_pos, at_neg;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      pos_edge = mode[0];
      for (int i = 0; i < 50; i++) begin
        // value valid around the falling edge
        #2; {ext_bcid, fadc} = 11'($urandom);
        @(negedge clk); at_neg = {ext_bcid, fadc};
        #2; {ext_bcid, fadc} = 11'($urandom);
        @(posedge clk); at_pos = {ext_bcid, fadc};
        #1;
        if (i > 1)
          `CHECK(q == (pos_edge ? at_pos : at_neg), $sformatf("mode %0d q=%h pos=%h neg=%h", mode, q, at_pos, at_neg))
      end
    end
    `TB_DONE
  end
endmodule
