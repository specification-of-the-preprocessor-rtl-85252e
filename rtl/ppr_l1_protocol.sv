// ppr_l1_protocol: Level-1 trigger protocol logic.
//
// Registers the TTC control inputs on the LHC clock and derives the chip's
// timing signals: a 12-bit bunch-crossing counter that counts LHC clocks
// and is restarted by the per-turn BcCntRes (it wraps at BC_PER_TURN-1 if
// no restart comes), the Level-1 accept pulse, the event-counter reset, the
// playback sync pulse and the soft clear for pointers and buffers. The
// signal set follows the chip's input list; the counter is local, as the
// specification says; one input register stage is this design's choice.
//
// Timing: every output is one clock after its input pin. bcn is the number
// of the crossing whose FADC sample enters the chip in the same clock.
module ppr_l1_protocol
  import ppr_pkg::*;
#(
  parameter int unsigned BC_PER_TURN = 3564
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             l1accept_in,
  input  logic             bccntres_in,
  input  logic             evcntres_in,
  input  logic             reset_in,
  input  logic             sync_in,
  output logic [BCN_W-1:0] bcn,
  output logic             l1a,
  output logic             evcnt_reset,
  output logic             soft_clear,
  output logic             sync
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcn <= '0; l1a <= 1'b0; evcnt_reset <= 1'b0; soft_clear <= 1'b0; sync <= 1'b0;
    end else begin
      l1a         <= l1accept_in;
      evcnt_reset <= evcntres_in;
      soft_clear  <= reset_in;
      sync        <= sync_in;
      if (bccntres_in || bcn == BCN_W'(BC_PER_TURN - 1)) bcn <= '0;
      else                                              bcn <= bcn + 1'b1;
    end
  end

endmodule
