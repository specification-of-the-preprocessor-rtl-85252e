// ppr_peak_finder: local-maximum finder on the FIR sums.
//
// A FIR sum is marked as the identified bunch crossing when it is larger
// than its predecessor and not smaller than its successor,
// prev < cur >= next. The asymmetry resolves a flat top of two equal sums
// in favour of the earlier one. The comparison uses the full 17-bit FIR
// precision, as specified. The sums before and after a peak are not marked,
// so the BCID decision logic outputs zero for them.
//
// Timing: peak in cycle t refers to the sum that was on y in cycle t-2.
module ppr_peak_finder
  import ppr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FIR_W-1:0] y,
  output logic             peak
);

  logic [FIR_W-1:0] y1, y2;   // y1 = previous sum (centre), y2 = the one before

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0; y2 <= '0; peak <= 1'b0;
    end else begin
      y1   <= y;
      y2   <= y1;
      peak <= (y2 < y1) && (y1 >= y);
    end
  end

endmodule
