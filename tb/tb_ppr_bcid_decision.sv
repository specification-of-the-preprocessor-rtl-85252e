// tb_ppr_bcid_decision: random marks, energies and interval settings
// against a behavioural model of the decision: interval selection by the
// two bounds, the per-interval 3-bit masks, 0xFF on overflow or raw
// saturation, 0x00 when not accepted, the forced zero after a non-zero
// result, and the by-pass.
`include "tb/tb_util.svh"
module tb_ppr_bcid_decision;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bypass = 0;
  logic [2:0] sel_low, sel_med, sel_high, bcid_bits;
  logic [9:0] bound_low, bound_med, field;
  logic peak, sat, ext, ovf, raw_sat;
  logic [7:0] lut_data, result;
  ppr_bcid_decision dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; `TB_DONE
  end
  logic [7:0] prev_exp;
  int forced = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_exp = 0;
    for (int i = 0; i < 5000; i++) begin
      logic [2:0] s;
      logic [7:0] e;
      @(negedge clk);
      if (i % 500 == 0) begin
        bound_low = 10'($urandom_range(0, 500));
        bound_med = bound_low + 10'($urandom_range(0, 500));
        sel_low = 3'($urandom); sel_med = 3'($urandom); sel_high = 3'($urandom);
      end
      bypass  = (i >= 4500);
      peak = ($urandom_range(0, 2) == 0); sat = ($urandom_range(0, 3) == 0);
      ext = ($urandom_range(0, 3) == 0);
      ovf = ($urandom_range(0, 9) == 0); raw_sat = ($urandom_range(0, 9) == 0);
      field = 10'($urandom); lut_data = 8'($urandom);
      s = ovf ? sel_high : (field <= bound_low) ? sel_low : (field <= bound_med) ? sel_med : sel_high;
      if (bypass) e = lut_data;
      else if (!(|(s & {ext, sat, peak}))) e = 0;
      else if (prev_exp != 0) begin e = 0; forced++; end
      else if (ovf || raw_sat) e = 8'hFF;
      else e = lut_data;
      @(posedge clk); #1;
      `CHECK(result == e && bcid_bits == {ext, sat, peak}, $sformatf("i=%0d result=%h exp=%h", i, result, e))
      prev_exp = e;
    end
    `CHECK(forced > 10, "forced zero after non-zero exercised")
    `TB_DONE
  end
endmodule
