// tb_ppr_odd_parity: exhaustive check of the 9-bit odd-parity generator,
// including the two cases named in the specification (all zeros -> 1,
// all ones -> 0).
`include "tb/tb_util.svh"
module tb_ppr_odd_parity;
  int checks = 0, failures = 0;
  logic [8:0] d;
  logic       p;
  ppr_odd_parity #(.W(9)) dut (.d, .p);
  initial begin
    #100000 failures++; `TB_DONE
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      int ones;
      d = 9'(i); #1;
      ones = $countones(d) + int'(p);
      `CHECK(ones % 2 == 1, $sformatf("d=%h p=%b", d, p))
    end
    d = '0; #1; `CHECK(p == 1'b1, "zeros")
    d = '1; #1; `CHECK(p == 1'b0, "ones")
    `TB_DONE
  end
endmodule
