// tb_ppr_l1_protocol: checks the bunch counter (counting, restart by
// BcCntRes, wrap at 3564) and the one-clock registration of L1Accept,
// EvCntRes, Reset and Sync.
`include "tb/tb_util.svh"
module tb_ppr_l1_protocol;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic l1accept_in = 0, bccntres_in = 0, evcntres_in = 0, reset_in = 0, sync_in = 0;
  logic [11:0] bcn;
  logic l1a, evcnt_reset, soft_clear, sync;
  ppr_l1_protocol dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; `TB_DONE
  end
  initial begin
    int expb;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    expb = 1;
    for (int i = 0; i < 9000; i++) begin
      logic [3:0] r;
      @(negedge clk);
      bccntres_in = (i == 1000 || i == 5000);
      r = 4'($urandom);
      {l1accept_in, evcntres_in, reset_in, sync_in} = r;
      @(posedge clk); #1;
      expb = bccntres_in ? 0 : (expb == 3563 ? 0 : expb + 1);
      `CHECK(int'(bcn) == expb, $sformatf("bcn %0d exp %0d", bcn, expb))
      `CHECK({l1a, evcnt_reset, soft_clear, sync} == r, "control registered")
    end
    `TB_DONE
  end
endmodule
