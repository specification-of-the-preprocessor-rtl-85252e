// tb_ppr_peak_finder: random sum sequences with many plateaus; the peak
// flag must equal prev < cur >= next for the sum two clocks back.
`include "tb/tb_util.svh"
module tb_ppr_peak_finder;
  import ppr_pkg::*;
  int checks = 0, failures = 0, peaks = 0;
  logic clk = 0, rst_n = 0;
  logic [16:0] y = 0;
  logic peak;
  logic [16:0] hist [4];
  ppr_peak_finder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    for (int k = 0; k < 4; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      y = 17'($urandom_range(0, 3)) * 17'(i % 500 < 250 ? 1 : 20000);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = y;
      @(posedge clk); #1;
      if (i > 4) begin
        logic exp;
        exp = (hist[2] < hist[1]) && (hist[1] >= hist[0]);
        `CHECK(peak == exp, $sformatf("i=%0d %0d %0d %0d peak=%b", i, hist[2], hist[1], hist[0], peak))
        if (peak) peaks++;
      end
    end
    `CHECK(peaks > 100, "peaks seen")
    `TB_DONE
  end
endmodule
