// tb_ppr_sat_bcid: saturated pulses with a fast and a slow leading edge.
// A pulse whose sample before saturation is above the threshold must be
// marked at the first saturated sample, otherwise one sample later; only
// one mark per pulse, none for unsaturated pulses.
`include "tb/tb_util.svh"
module tb_ppr_sat_bcid;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] x = 0, thresh = 10'd600;
  logic sat, x_sat;
  ppr_sat_bcid dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  // sends a pulse; returns index (within the pulse) of the marked sample
  task automatic pulse(input int s1, input int s2, input int nsat, output int mark, output int nmarks);
    int samples [12];
    int k;
    for (k = 0; k < 12; k++) samples[k] = 0;
    samples[2] = s1; samples[3] = s2;
    for (k = 0; k < nsat; k++) samples[4 + k] = 1023;
    samples[4 + nsat] = 300;
    mark = -1; nmarks = 0;
    for (k = 0; k < 12; k++) begin
      @(negedge clk); x = 10'(samples[k]);
      @(posedge clk); #1;
      // sat now refers to sample k
      `CHECK(x_sat == (samples[k] == 1023), "x_sat")
      if (sat) begin mark = k; nmarks++; end
    end
  endtask
  initial begin
    int m, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      int s2;
      s2 = int'($urandom_range(50, 1000));
      pulse(s2 / 3, s2, 1 + int'($urandom_range(0, 4)), m, n);
      `CHECK(n == 1, $sformatf("one mark, got %0d", n))
      `CHECK(m == ((s2 > int'(thresh)) ? 4 : 5), $sformatf("s2=%0d mark at %0d", s2, m))
    end
    pulse(100, 500, 0, m, n);
    `CHECK(n == 0, "no mark for unsaturated pulse")
    `TB_DONE
  end
endmodule
