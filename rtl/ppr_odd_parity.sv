// ppr_odd_parity: odd-parity generator for the real-time output links.
//
// Returns the bit that makes the number of ones in {d, p} odd: a word of
// all zeros gets p=1, a 9-bit word of all ones gets p=0. Odd parity on
// every word sent to the Cluster and Jet/Energy processors follows the
// specification. Purely combinational.
module ppr_odd_parity #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] d,
  output logic         p
);
  assign p = ~(^d);
endmodule
