// ppr_align_fifo: programmable-depth alignment pipeline ("FIFO").
//
// Calorimeter signals arrive with different cable and electronics delays;
// this pipeline delays each channel by a programmable number of LHC clocks
// so that all channels present the same bunch crossing together. The 10-bit
// FADC stream and the 11th bit (external BCID) have separate depth settings,
// as the specification requires. DEPTH=16 locations follows the
// specification. The structure is a shift register of DEPTH stages with a
// tap multiplexer; depth settings above DEPTH-1 are clipped to DEPTH-1.
//
// Timing: out = input delayed by (depth + 1) clocks, 1..DEPTH clocks.
module ppr_align_fifo
  import ppr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        depth,       // delay of bits [9:0]
  input  logic [4:0]        ext_depth,   // delay of bit 10
  input  logic [PATH_W-1:0] d,
  output logic [PATH_W-1:0] q
);

  logic [PATH_W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  function automatic int unsigned clip(input logic [4:0] v);
    return (int'(v) > DEPTH - 1) ? DEPTH - 1 : int'(v);
  endfunction

  always_comb begin
    q[FADC_W-1:0] = stage[clip(depth)][FADC_W-1:0];
    q[FADC_W]     = stage[clip(ext_depth)][FADC_W];
  end

endmodule
