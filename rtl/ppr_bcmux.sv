// ppr_bcmux: bunch-crossing multiplexer for the Cluster Processor link.
//
// Because the BCID logic always follows a non-zero result with a zero one,
// each channel has at most one non-zero value in any pair of crossings
// (2k, 2k+1). The two channels can therefore share one link: the pair of
// crossings is sent as two frames, the first carrying channel A's value of
// the pair and the second channel B's. The BC-mux flag tells the receiver
// to which crossing of the pair the value belongs (0: the even crossing,
// 1: the odd one). Sharing the link by using the free frame after each
// identified crossing, with a flag bit, follows the specification; the
// pairing on even/odd crossing numbers and the flag meaning are this
// design's choices.
// In by-pass mode only the channel named by sel_chan is sent, every clock,
// and the flag is the channel number (0: A, 1: B), as specified.
// to_cp = {odd parity over flag and data, flag, 8-bit data}.
//
// Timing: bc_odd is bit 0 of the crossing number of the values on a/b. The
// frames of pair k appear in the two clocks after the odd crossing 2k+1 was
// presented; in by-pass mode the output follows the input by one clock.
module ppr_bcmux
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bypass,
  input  logic              sel_chan,
  input  logic              bc_odd,
  input  logic [LUT_DW-1:0] a,
  input  logic [LUT_DW-1:0] b,
  output logic [LUT_DW+1:0] to_cp
);

  logic [LUT_DW-1:0] a_even, b_even, b_pair;
  logic              b_flag;

  logic [LUT_DW-1:0] a_sel, b_sel, d_next;
  logic              a_fl, b_fl, f_next, par;

  always_comb begin
    a_fl  = (a_even == '0) && (a != '0);
    b_fl  = (b_even == '0) && (b != '0);
    a_sel = a_fl ? a : a_even;
    b_sel = b_fl ? b : b_even;
    if (bypass) begin
      f_next = sel_chan;
      d_next = sel_chan ? b : a;
    end else if (bc_odd) begin
      f_next = a_fl;
      d_next = a_sel;
    end else begin
      f_next = b_flag;
      d_next = b_pair;
    end
  end

  ppr_odd_parity #(.W(LUT_DW + 1)) u_par (.d({f_next, d_next}), .p(par));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_even <= '0; b_even <= '0; b_pair <= '0; b_flag <= 1'b0;
      to_cp  <= {1'b1, 1'b0, {LUT_DW{1'b0}}};
    end else begin
      if (!bc_odd) begin
        a_even <= a;
        b_even <= b;
      end else begin
        b_pair <= b_sel;
        b_flag <= b_fl;
      end
      to_cp <= {par, f_next, d_next};
    end
  end

endmodule
