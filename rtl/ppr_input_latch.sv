// ppr_input_latch: FADC input latch with software-selected clock edge.
//
// The FADC strobe may have any phase relative to the LHC clock, so the
// 10-bit sample and the external BCID bit are captured either on the rising
// or on the falling edge of the LHC clock (pos_edge selects). A sample
// captured on the falling edge is re-registered on the next rising edge, so
// the output q is always a rising-edge register and the rest of the chip
// sees one clock domain. Edge selection follows the specification; the
// retiming register is this design's choice.
//
// Timing: with pos_edge=1, q shows the input sampled at the previous rising
// edge; with pos_edge=0, the input sampled at the falling edge half a cycle
// before that rising edge.
module ppr_input_latch
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pos_edge,   // 1: rising edge, 0: falling edge
  input  logic [FADC_W-1:0] fadc,
  input  logic              ext_bcid,
  output logic [PATH_W-1:0] q           // {ext_bcid, fadc}
);

  logic [PATH_W-1:0] pos_q, neg_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos_q <= '0;
    else        pos_q <= {ext_bcid, fadc};

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) neg_q <= '0;
    else        neg_q <= {ext_bcid, fadc};

  logic [PATH_W-1:0] neg_retimed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) neg_retimed <= '0;
    else        neg_retimed <= neg_q;

  assign q = pos_edge ? pos_q : neg_retimed;

endmodule
