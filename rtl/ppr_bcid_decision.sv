// ppr_bcid_decision: BCID decision logic and 8-bit result formation.
//
// Three BCID mechanisms report a candidate bunch crossing for each sample:
// A the FIR peak finder, B the digital saturated-pulse BCID, C the external
// BCID bit. The 10-bit FIR field is placed in one of three disjoint energy
// intervals by two programmable bounds (low: e <= bound_low, medium:
// e <= bound_med, high: above, or truncation overflow). A 3-bit mask per
// interval ({C,B,A}) enables mechanisms there; the sample is accepted if an
// enabled mechanism marks it. An accepted sample gives the LUT value, or
// 0xFF when the FIR field overflowed or the raw sample is saturated; a
// rejected sample gives 0x00. After a non-zero result the next one is
// forced to zero so that BC-multiplexing always finds a free slot. This all
// follows the specification; combining enabled mechanisms by OR is this
// design's choice.
//
// With bypass=1 every sample passes unchanged (LUT value, no BCID gating,
// no forced zero), for checking the serial links.
//
// Timing: one register; result in cycle t is for the inputs of cycle t-1.
// bcid_bits = {C,B,A} marks of that sample, for the readout memory.
module ppr_bcid_decision
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bypass,
  input  logic [2:0]        sel_low,
  input  logic [9:0]        bound_low,
  input  logic [2:0]        sel_med,
  input  logic [9:0]        bound_med,
  input  logic [2:0]        sel_high,
  input  logic              peak,      // mechanism A
  input  logic              sat,       // mechanism B
  input  logic              ext,       // mechanism C
  input  logic [LUT_DW-1:0] lut_data,
  input  logic [LUT_AW-1:0] field,
  input  logic              ovf,
  input  logic              raw_sat,
  output logic [LUT_DW-1:0] result,
  output logic [2:0]        bcid_bits
);

  logic [2:0]        sel, marks;
  logic              accept;
  logic [LUT_DW-1:0] next;

  always_comb begin
    if (ovf)                     sel = sel_high;
    else if (field <= bound_low) sel = sel_low;
    else if (field <= bound_med) sel = sel_med;
    else                         sel = sel_high;
    marks  = {ext, sat, peak};
    accept = |(sel & marks);
    if (bypass)
      next = lut_data;
    else if (!accept || result != '0)
      next = '0;
    else if (ovf || raw_sat)
      next = CP_OVERFLOW;
    else
      next = lut_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0; bcid_bits <= '0;
    end else begin
      result    <= next;
      bcid_bits <= marks;
    end
  end

endmodule
