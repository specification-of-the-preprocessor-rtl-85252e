// ppr_serial_if: synchronous serial interface for readout and configuration.
//
// Four signals: SerialClk, Frame, DataIn and DataOut, plus DaisyIn and
// DaisyOut for chaining chips. In the serial clock domain a 13-bit input
// shift register takes DataIn on every rising SerialClk edge, MSB first.
// On an edge with Frame high the completed word moves into the input
// register while the first bit of the next word is shifted in, and the
// output shift register is loaded with the word prepared by the core;
// otherwise the output register shifts out its MSB on DataOut and takes
// DaisyIn at the bottom. DaisyOut is the bit leaving the input shift
// register, so a chained chip sees the words 13 bits later. This follows
// the interface block and timing diagrams of the specification.
// Clock-domain crossing: each Frame edge toggles a flag that a three-stage
// synchroniser carries to the LHC clock domain, where it produces the
// one-clock strobe frame_stb; the input register is stable then, and the
// core has until the next Frame to present tx_word, which is sampled in the
// serial domain only at Frame edges. SerialClk may run at any rate for
// which 13 serial clocks last longer than about 4 LHC clocks.
module ppr_serial_if
  import ppr_pkg::*;
(
  // serial side
  input  logic             ser_clk,
  input  logic             ser_rst_n,
  input  logic             frame,
  input  logic             data_in,
  output logic             data_out,
  input  logic             daisy_in,
  output logic             daisy_out,
  // core side (LHC clock)
  input  logic             clk,
  input  logic             rst_n,
  output logic [SER_W-1:0] rx_word,
  output logic             frame_stb,
  input  logic [SER_W-1:0] tx_word
);

  logic [SER_W-1:0] in_sr, in_reg, out_sr;
  logic             frame_tgl;

  always_ff @(posedge ser_clk or negedge ser_rst_n) begin
    if (!ser_rst_n) begin
      in_sr <= '0; in_reg <= '0; out_sr <= '0; frame_tgl <= 1'b0;
    end else begin
      in_sr <= {in_sr[SER_W-2:0], data_in};
      if (frame) begin
        in_reg    <= in_sr;
        out_sr    <= tx_word;
        frame_tgl <= !frame_tgl;
      end else begin
        out_sr <= {out_sr[SER_W-2:0], daisy_in};
      end
    end
  end

  assign data_out  = out_sr[SER_W-1];
  assign daisy_out = in_sr[SER_W-1];

  logic [2:0] sync_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0; frame_stb <= 1'b0; rx_word <= '0;
    end else begin
      sync_q    <= {sync_q[1:0], frame_tgl};
      frame_stb <= sync_q[2] ^ sync_q[1];
      if (sync_q[2] ^ sync_q[1]) rx_word <= in_reg;
    end
  end

endmodule
