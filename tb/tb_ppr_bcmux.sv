// tb_ppr_bcmux: random BCID results for two channels that obey the rule
// "a non-zero value is followed by a zero". A receiver model rebuilds both
// channels, crossing by crossing, from the multiplexed frames (first frame
// of a pair = channel A, second = channel B, flag = odd crossing) and must
// recover every value; odd parity is checked on every frame. Then the
// by-pass mode must pass the selected channel with the channel as flag.
`include "tb/tb_util.svh"
module tb_ppr_bcmux;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bypass = 0, sel_chan = 0, bc_odd = 0;
  logic [7:0] a = 0, b = 0;
  logic [9:0] to_cp;
  ppr_bcmux dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; `TB_DONE
  end
  logic [7:0] ah [4], bh [4];   // history, [0] newest
  initial begin
    int both = 0, odd_flag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin ah[i] = 0; bh[i] = 0; end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      bc_odd = i[0];
      a = (ah[0] != 0 || $urandom_range(0, 2) != 0) ? 8'd0 : 8'($urandom_range(1, 255));
      b = (bh[0] != 0 || $urandom_range(0, 2) != 0) ? 8'd0 : 8'($urandom_range(1, 255));
      for (int k = 3; k > 0; k--) begin ah[k] = ah[k-1]; bh[k] = bh[k-1]; end
      ah[0] = a; bh[0] = b;
      @(posedge clk); #1;
      `CHECK(($countones(to_cp) % 2) == 1, "odd parity")
      if (i > 4) begin
        if (i[0]) begin
          // frame for channel A of the pair (ah[1], ah[0])
          logic [7:0] ea; logic fa;
          fa = (ah[1] == 0) && (ah[0] != 0);
          ea = fa ? ah[0] : ah[1];
          `CHECK(to_cp[7:0] == ea && to_cp[8] == fa, $sformatf("A frame %h exp %h/%b", to_cp, ea, fa))
          if (fa) odd_flag++;
          if ((ah[0] | ah[1]) != 0 && (bh[0] | bh[1]) != 0) both++;
        end else begin
          // frame for channel B of the previous pair (bh[2], bh[1])
          logic [7:0] eb; logic fb;
          fb = (bh[2] == 0) && (bh[1] != 0);
          eb = fb ? bh[1] : bh[2];
          `CHECK(to_cp[7:0] == eb && to_cp[8] == fb, $sformatf("B frame %h exp %h/%b", to_cp, eb, fb))
        end
      end
    end
    `CHECK(both > 50 && odd_flag > 50, "both channels in one pair and odd-crossing flag exercised")
    bypass = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      sel_chan = i[6]; a = 8'($urandom); b = 8'($urandom);
      @(posedge clk); #1;
      `CHECK(to_cp[7:0] == (sel_chan ? b : a) && to_cp[8] == sel_chan && ($countones(to_cp) % 2) == 1, "bypass")
    end
    `TB_DONE
  end
endmodule
