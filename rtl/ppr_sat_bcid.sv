// ppr_sat_bcid: digital "leading edge" BCID for saturated pulses.
//
// The analog chain limits the slew rate so that every rising edge has at
// least two samples. For a saturated pulse the first saturated sample n is
// found; if the sample before it, n-1, is already above a programmable
// threshold the pulse rose early and the bunch crossing is n, otherwise it
// is n+1. The specification gives the principle (slew-rate limit, at least
// two samples on the edge, a programmable threshold); this two-case rule on
// sample n-1 is this design's reading of it.
//
// sat in cycle t flags the sample that was on x in cycle t-1 (registered).
// x_sat flags that sample itself as saturated.
module ppr_sat_bcid
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FADC_W-1:0] x,
  input  logic [FADC_W-1:0] thresh,
  output logic              sat,
  output logic              x_sat
);

  logic [FADC_W-1:0] x1, x2;   // samples one and two cycles before x

  logic first_now, first_prev, early_now, late_prev;
  always_comb begin
    first_now  = (x  == FADC_SAT) && (x1 != FADC_SAT);
    first_prev = (x1 == FADC_SAT) && (x2 != FADC_SAT);
    early_now  = first_now  && (x1 >  thresh);
    late_prev  = first_prev && (x2 <= thresh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; sat <= 1'b0; x_sat <= 1'b0;
    end else begin
      x1    <= x;
      x2    <= x1;
      sat   <= early_now || late_prev;
      x_sat <= (x == FADC_SAT);
    end
  end

endmodule
