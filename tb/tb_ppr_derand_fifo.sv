// tb_ppr_derand_fifo: random push/pop traffic against a queue model,
// including filling to 64 words, the dropped push and overflow flag on a
// full FIFO, and clear.
`include "tb/tb_util.svh"
module tb_ppr_derand_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [10:0] wdata = 0, rdata;
  logic empty, full, overflow;
  logic [6:0] level;
  logic [10:0] q [$];
  ppr_derand_fifo #(.WIDTH(11), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    int fulls = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;
      @(negedge clk);
      `CHECK(empty == (q.size() == 0) && full == (q.size() == 64) && int'(level) == q.size(), "flags")
      if (q.size() > 0) `CHECK(rdata == q[0], "head")
      push = ($urandom_range(0, 99) < bias); pop = ($urandom_range(0, 99) < 50);
      wdata = 11'($urandom);
      if (push && q.size() == 64) fulls++;
      @(posedge clk);
      begin
        int sz;
        sz = q.size();
        if (pop && sz > 0) void'(q.pop_front());
        if (push && sz < 64) q.push_back(wdata);
      end
      #1;
    end
    `CHECK(fulls > 0 && overflow, "overflow seen")
    @(negedge clk); push = 0; pop = 0; clear = 1; @(negedge clk); clear = 0; #1;
    `CHECK(empty && !overflow, "clear")
    `TB_DONE
  end
endmodule
