// tb_ppr_rate_meter: random FADC data over several intervals with a
// reduced prescaler (DIV=20) so the run is short; the latched count must
// equal the number of samples above threshold in the interval and the
// interval must last interval*DIV clocks.
`include "tb/tb_util.svh"
module tb_ppr_rate_meter;
  import ppr_pkg::*;
  localparam int DIV = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, done;
  logic [9:0] fadc = 0, thresh = 10'd400, interval = 10'd7, time_q;
  logic [19:0] count_q;
  ppr_rate_meter #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    int cnt, cyc, n_done;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    cnt = 0; cyc = 0; n_done = 0;
    while (n_done < 5) begin
      fadc = 10'($urandom);
      if (fadc > thresh) cnt++;
      cyc++;
      @(posedge clk); #1;
      if (done) begin
        `CHECK(count_q == 20'(cnt), $sformatf("count %0d exp %0d", count_q, cnt))
        `CHECK(time_q == interval, "time")
        `CHECK(cyc == int'(interval) * DIV, $sformatf("interval lasted %0d clocks", cyc))
        cnt = 0; cyc = 0; n_done++;
      end
      @(negedge clk);
    end
    `TB_DONE
  end
endmodule
