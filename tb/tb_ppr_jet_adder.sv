// tb_ppr_jet_adder: random energies (with overflow values mixed in) for
// the two local cells and the neighbour's half-cell; checks the 9-bit
// half-cell sum, the full jet-cell sum limited to 0x1FF, the overflow
// propagation, the by-pass mode and odd parity, with their latencies.
`include "tb/tb_util.svh"
module tb_ppr_jet_adder;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, add4_active = 1;
  logic [7:0] e_a = 0, e_b = 0;
  logic [8:0] cell_sum_in = 0, cell_sum_out;
  logic [9:0] to_jp;
  ppr_jet_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    int half_prev, half, clipped = 0, ovfs = 0, exp, full;
    repeat (2) @(posedge clk);
    rst_n = 1;
    half_prev = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      add4_active = (i < 2500);
      e_a = ($urandom_range(0, 20) == 0) ? 8'hFF : 8'($urandom_range(0, 254));
      e_b = ($urandom_range(0, 20) == 0) ? 8'hFF : 8'($urandom_range(0, 254));
      cell_sum_in = ($urandom_range(0, 20) == 0) ? 9'h1FF : 9'($urandom_range(0, 510));
      half = (e_a == 8'hFF || e_b == 8'hFF) ? 511 : int'(e_a) + int'(e_b);
      full = half_prev + int'(cell_sum_in);
      if (!add4_active) exp = half_prev;
      else if (half_prev == 511 || cell_sum_in == 9'h1FF || full > 511) exp = 511;
      else exp = full;
      if (add4_active && full > 511 && half_prev != 511 && cell_sum_in != 9'h1FF) clipped++;
      if (add4_active && exp == 511) ovfs++;
      @(posedge clk); #1;
      `CHECK(int'(cell_sum_out) == half, "half-cell sum")
      if (i > 0)
        `CHECK(int'(to_jp[8:0]) == exp && ($countones(to_jp) % 2) == 1, $sformatf("i=%0d to_jp %h exp %h", i, to_jp, exp))
      half_prev = half;
    end
    `CHECK(clipped > 10 && ovfs > 10, "limit and overflow exercised")
    `TB_DONE
  end
endmodule
