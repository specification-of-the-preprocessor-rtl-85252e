// tb_ppr_readout: writes a counter into the scrolling memory (the value
// written equals the clock number), issues Level-1 accepts, some back to
// back, and checks that each event's descriptor and derandomizer words are
// exactly the window of nsamp words around (accept clock - 1 - offset),
// and that the prescaler keeps samples only on every (prescale+1)-th accept.
`include "tb/tb_util.svh"
module tb_ppr_readout;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, l1a = 0, pop = 0, desc_pop = 0;
  logic [10:0] wdata = 0, rdata;
  logic [6:0] offset = 7'd20;
  logic [5:0] nsamp = 6'd5, desc;
  logic [7:0] prescale = 0;
  logic empty, desc_valid, overflow;
  ppr_readout dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; `TB_DONE
  end
  int n = 0;
  int exp_first [$];
  int exp_count [$];
  int acc = 0;
  // counter source and accept bookkeeping
  always @(negedge clk) if (rst_n) begin wdata <= 11'(n); n <= n + 1; end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    for (int phase = 0; phase < 2; phase++) begin
      prescale = phase ? 8'd2 : 8'd0;
      for (int e = 0; e < 12; e++) begin
        int gap;
        gap = (e % 4 == 0) ? 1 : int'($urandom_range(2, 30));
        repeat (gap) @(negedge clk);
        nsamp = 6'(1 + (e % 5)); offset = 7'($urandom_range(10, 60));
        l1a = 1;
        // word written in this clock is n (set at this negedge); newest = n-1
        begin
          int keep;
          keep = (acc % (int'(prescale) + 1)) == 0;
          acc++;
          exp_first.push_back(n - 1 - int'(offset) - (int'(nsamp) - 1) / 2);
          exp_count.push_back(keep ? int'(nsamp) : 0);
        end
        @(negedge clk); l1a = 0;
        // give the copy engine time before changing settings
        repeat (8) @(negedge clk);
      end
      // drain
      repeat (20) @(negedge clk);
      acc = 0;
      @(negedge clk); clear = 0;
      while (exp_count.size() > 0) begin
        int f, c;
        f = exp_first.pop_front(); c = exp_count.pop_front();
        `CHECK(desc_valid && int'(desc) == c, $sformatf("descriptor %0d exp %0d", desc, c))
        desc_pop = 1; @(negedge clk); desc_pop = 0;
        for (int w = 0; w < c; w++) begin
          `CHECK(!empty && int'(rdata) == (f + w) % 2048, $sformatf("word %0d = %0d exp %0d", w, rdata, (f + w) % 2048))
          pop = 1; @(negedge clk); pop = 0;
        end
      end
      `CHECK(empty && !desc_valid, "drained")
      // restart prescaler count for the next phase
      clear = 1; @(negedge clk); clear = 0;
    end
    `CHECK(!overflow, "no overflow")
    `TB_DONE
  end
endmodule
