// ppr_fir: five-tap FIR filter for bunch-crossing identification.
//
// The filter weights five consecutive 10-bit FADC samples with programmable
// 4-bit coefficients and sums them. Coefficients 2..4 are unsigned (0..15);
// the first and last are signed (-7..+7) so that negative weights can
// suppress pulse tails. Five taps, 4-bit coefficients and signed outer
// coefficients follow the specification. Each product needs 14 bits, the
// sum of five 17 bits. A negative sum carries no energy and is clipped to 0
// (this design's choice); the positive range fits 17 bits.
//
// Coefficient 1 weights the oldest sample of the window, coefficient 5 the
// newest. With the trivial set (0,0,1,0,0) the output equals the input.
//
// Timing: y in cycle t is the weighted sum centred on the sample that was
// on x in cycle t-4 (one tap register stage, one output register).
module ppr_fir
  import ppr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FADC_W-1:0]  x,
  input  logic signed [3:0]  c1,
  input  logic [3:0]         c2,
  input  logic [3:0]         c3,
  input  logic [3:0]         c4,
  input  logic signed [3:0]  c5,
  output logic [FIR_W-1:0]   y
);

  logic [FADC_W-1:0] tap [5];   // tap[0] newest, tap[4] oldest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) tap[i] <= '0;
    end else begin
      tap[0] <= x;
      for (int i = 1; i < 5; i++) tap[i] <= tap[i-1];
    end
  end

  logic signed [FIR_W+1:0] sum;
  always_comb begin
    sum = $signed({1'b0, tap[4]}) * c1
        + $signed({1'b0, tap[3]}) * $signed({1'b0, c2})
        + $signed({1'b0, tap[2]}) * $signed({1'b0, c3})
        + $signed({1'b0, tap[1]}) * $signed({1'b0, c4})
        + $signed({1'b0, tap[0]}) * c5;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        y <= '0;
    else if (sum < 0)  y <= '0;
    else               y <= sum[FIR_W-1:0];

endmodule
