// ppr_scroll_mem: "scrolling" pipeline memory for readout.
//
// A circular memory written with one word on every LHC clock at the write
// pointer wp, which advances by one per clock. Because the Level-1 decision
// arrives a fixed time later, data for a triggered bunch crossing are found
// a fixed number of locations behind wp. The memory has one asynchronous
// read port addressed directly by the readout controller. The 128 x 11 size
// follows the specification.
module ppr_scroll_mem
  import ppr_pkg::*;
#(
  parameter int unsigned WORDS = 128,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PATH_W-1:0] wdata,
  output logic [AW-1:0]     wp,       // location written in this clock
  input  logic [AW-1:0]     raddr,
  output logic [PATH_W-1:0] rdata
);

  logic [PATH_W-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wp <= '0;
    else        wp <= wp + 1'b1;

  always_ff @(posedge clk) mem[wp] <= wdata;

  assign rdata = mem[raddr];

endmodule
