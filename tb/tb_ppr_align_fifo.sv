// tb_ppr_align_fifo: random data through the alignment pipeline at every
// depth setting; checks out = in delayed by depth+1 clocks for the 10-bit
// field and by ext_depth+1 for bit 10, and the clip at DEPTH-1.
`include "tb/tb_util.svh"
module tb_ppr_align_fifo;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] depth = 0, ext_depth = 0;
  logic [10:0] d = 0, q;
  logic [10:0] hist [64];
  ppr_align_fifo #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int dd = 0; dd < 20; dd++) begin
      depth = 5'(dd); ext_depth = 5'((dd * 7) % 20);
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
        d = 11'($urandom); hist[0] = d;
        @(posedge clk); #1;
        if (i > 20) begin
          int e1, e2;
          e1 = (dd > 15 ? 15 : dd) + 1;
          e2 = (int'(ext_depth) > 15 ? 15 : int'(ext_depth)) + 1;
          `CHECK(q[9:0] == hist[e1-1][9:0] && q[10] == hist[e2-1][10],
                 $sformatf("depth %0d ext %0d q=%h", dd, ext_depth, q))
        end
      end
    end
    `TB_DONE
  end
endmodule
