// tb_ppr_scroll_mem: writes a counter every clock and checks that the
// word k locations behind the write pointer is the one written k clocks
// ago, for every k up to the memory size.
`include "tb/tb_util.svh"
module tb_ppr_scroll_mem;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0] wdata = 0, rdata;
  logic [6:0] wp, raddr = 0;
  ppr_scroll_mem #(.WORDS(128)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i > 130) begin
        int k;
        k = (i * 13) % 128 + 1;     // 1..128 clocks back
        raddr = wp - 7'(k); #1;
        `CHECK(int'(rdata) == (n - k) % 2048, $sformatf("k=%0d rdata=%0d", k, rdata))
      end
      wdata = 11'(n); n++;
    end
    `TB_DONE
  end
endmodule
