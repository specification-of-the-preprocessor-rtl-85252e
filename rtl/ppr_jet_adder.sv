// ppr_jet_adder: two-stage jet-cell adder towards the Jet/Energy processor.
//
// Stage 1 (Add) sums the two 8-bit LUT energies of this chip into a 9-bit
// half jet-cell; stage 2 (ADD4) adds the 9-bit half-cell of the neighbour
// chip (cell_sum_in) to form a full 0.2 x 0.2 jet-cell, limited to 0x1FF.
// If any contributing cell is at overflow (0xFF, or 0x1FF for the
// neighbour's sum) the result is the overflow value 0x1FF, so that no
// finite energy is faked. In by-pass mode (add4_active=0) the half-cell is
// sent out on to_jp instead. The partial sum also leaves the chip on
// cell_sum_out for the neighbour. Every to_jp word carries an odd parity
// bit. All of this follows the specification; the figure's "drop LSB" label
// on ADD4 is not followed, the text asks for a limit at 0x1FF instead.
//
// Timing: cell_sum_out is registered one clock after the LUT values; to_jp
// one clock later. cell_sum_in must be valid in the same clock as this
// chip's cell_sum_out (the neighbour runs the same pipeline), as the
// specification expects no resynchronisation between the chips.
module ppr_jet_adder
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add4_active,
  input  logic [LUT_DW-1:0] e_a,
  input  logic [LUT_DW-1:0] e_b,
  input  logic [JET_W-1:0]  cell_sum_in,
  output logic [JET_W-1:0]  cell_sum_out,
  output logic [JET_W:0]    to_jp           // {odd parity, 9-bit sum}
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cell_sum_out <= '0;
    else if (e_a == CP_OVERFLOW || e_b == CP_OVERFLOW) cell_sum_out <= JET_OVERFLOW;
    else cell_sum_out <= JET_W'(e_a) + JET_W'(e_b);

  logic [JET_W:0]   full_sum;
  logic [JET_W-1:0] jet;
  logic             par;
  always_comb begin
    full_sum = (JET_W+1)'(cell_sum_out) + (JET_W+1)'(cell_sum_in);
    if (!add4_active)
      jet = cell_sum_out;
    else if (cell_sum_out == JET_OVERFLOW || cell_sum_in == JET_OVERFLOW || full_sum[JET_W])
      jet = JET_OVERFLOW;
    else
      jet = full_sum[JET_W-1:0];
  end

  ppr_odd_parity #(.W(JET_W)) u_par (.d(jet), .p(par));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) to_jp <= {1'b1, {JET_W{1'b0}}};
    else        to_jp <= {par, jet};

endmodule
