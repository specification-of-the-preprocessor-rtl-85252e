// ppr_lut: programmable truncation and calibration look-up table.
//
// The 17-bit FIR sum is cut to a 10-bit field whose lowest bit is chosen by
// lsb (0..7), because the significant bits depend on the coefficients in
// use. If any bit above the field is set the field saturates at 0x3FF and
// ovf is raised. The field addresses a 1024 x 8 LUT that converts it into
// a calibrated 8-bit transverse energy. The field width, the LUT size and
// the loadable LUT with a linear power-up content follow the specification;
// saturation of the field on truncation overflow is this design's choice.
//
// Power-up content: after reset the LUT is filled, one word per clock, with
// the linear table LUT[a] = a >> 2 (the same conversion as the by-pass,
// which drops two LSBs). init_busy is high during those 1024 clocks and
// writes through wr_* are ignored then. With bypass=1 the memory is not
// used and the output is the field with its two LSBs dropped.
//
// Timing: two register stages; data, field and ovf in cycle t refer to the
// FIR sum that was on y in cycle t-2.
module ppr_lut
  import ppr_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FIR_W-1:0]   y,
  input  logic [2:0]         lsb,
  input  logic               bypass,
  // load port
  input  logic               wr_en,
  input  logic [LUT_AW-1:0]  wr_addr,
  input  logic [LUT_DW-1:0]  wr_data,
  output logic               init_busy,
  // results
  output logic [LUT_DW-1:0]  data,
  output logic [LUT_AW-1:0]  field,
  output logic               ovf
);

  localparam int unsigned AW = $clog2(ENTRIES);

  logic [LUT_DW-1:0] mem [ENTRIES];

  // stage 1: truncation
  logic [FIR_W-1:0]  shifted;
  logic [LUT_AW-1:0] field1;
  logic              ovf1;
  always_comb shifted = y >> lsb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      field1 <= '0; ovf1 <= 1'b0;
    end else begin
      ovf1   <= |shifted[FIR_W-1:LUT_AW];
      field1 <= (|shifted[FIR_W-1:LUT_AW]) ? '1 : shifted[LUT_AW-1:0];
    end
  end

  // power-up linear fill
  logic [AW:0] init_cnt;
  assign init_busy = !init_cnt[AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          init_cnt <= '0;
    else if (init_busy)  init_cnt <= init_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (init_busy)
      mem[init_cnt[AW-1:0]] <= LUT_DW'(LUT_AW'(init_cnt[AW-1:0]) >> 2);
    else if (wr_en)
      mem[wr_addr[AW-1:0]] <= wr_data;
  end

  // stage 2: table read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data <= '0; field <= '0; ovf <= 1'b0;
    end else begin
      data  <= bypass ? LUT_DW'(field1 >> 2) : mem[field1[AW-1:0]];
      field <= field1;
      ovf   <= ovf1;
    end
  end

endmodule
