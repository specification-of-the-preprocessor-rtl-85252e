// tb_ppr_fir: random samples and random legal coefficient sets (signed
// outer coefficients -7..+7) against a behavioural sum, including the
// clip of negative sums and the trivial (0,0,1,0,0) pass-through with its
// 4-clock latency.
`include "tb/tb_util.svh"
module tb_ppr_fir;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] x = 0;
  logic signed [3:0] c1 = 0, c5 = 0;
  logic [3:0] c2 = 0, c3 = 1, c4 = 0;
  logic [16:0] y;
  int hist [16];
  ppr_fir dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; `TB_DONE
  end
  function automatic int expect_y();
    int s;
    // y after an edge = sum over taps loaded at the previous edge
    s = int'(c1) * hist[5] + int'(c2) * hist[4] + int'(c3) * hist[3]
      + int'(c4) * hist[2] + int'(c5) * hist[1];
    return s < 0 ? 0 : s;
  endfunction
  initial begin
    for (int k = 0; k < 16; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 40; set++) begin
      if (set == 0) begin c1 = 0; c2 = 0; c3 = 1; c4 = 0; c5 = 0; end
      else begin
        c1 = 4'(int'($urandom_range(0, 14)) - 7);
        c5 = 4'(int'($urandom_range(0, 14)) - 7);
        c2 = 4'($urandom); c3 = 4'($urandom); c4 = 4'($urandom);
      end
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        x = (i % 9 == 0) ? 10'h3FF : 10'($urandom);
        for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        @(posedge clk); #1;
        if (i > 8) `CHECK(int'(y) == expect_y(), $sformatf("set %0d y=%0d exp=%0d", set, y, expect_y()))
        if (set == 0 && i > 8) `CHECK(int'(y) == hist[3], "trivial coefficients pass sample 4 clocks late")
      end
    end
    `TB_DONE
  end
endmodule
