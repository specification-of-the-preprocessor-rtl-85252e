// ppr_asic: PreProcessor ASIC, two calorimeter trigger channels.
//
// Each channel digitally processes one trigger tower: it aligns the 40 MHz
// FADC samples in time, identifies the bunch crossing of each pulse (FIR
// filter and peak finder for normal pulses, a leading-edge rule for
// saturated ones, or an external BCID bit) and converts the energy with a
// calibration LUT to 8 bits. The two 8-bit results share one link to the
// Cluster Processor through the BC-mux, and are summed into jet-cell
// energies for the Jet/Energy processor, together with the half jet-cell
// of the neighbouring chip. Scrolling memories, derandomizers, playback,
// histogram and rate monitors serve the readout and checkout, all through
// one synchronous serial interface that also loads the configuration.
//
// Ports follow the chip's pin list: FADC and external BCID inputs per
// channel, the TTC signals (L1Accept, BcCntRes, EvCntRes, Reset, Sync),
// the six serial-interface pins, ToCP (data, BC-mux flag, odd parity),
// ToJP (sum, odd parity) and the 9-bit cell-sum link to the neighbour.
// rst_n is a power-on reset (this design's); "reset" is the soft reset pin.
// The JTAG test access port is left out of this model: its boundary and
// internal scan chains belong to the scan-insertion flow.
//
// Timing (rising-edge latch): the channel result for a sample is valid 8
// clocks after the clock edge that latches it, plus the programmed FIFO
// depth; the BC-mux and the jet adder add their own register stages.
module ppr_asic
  import ppr_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned LUT_ENTRIES  = 1024,
  parameter int unsigned PB_WORDS     = 256,
  parameter int unsigned SCROLL_WORDS = 128,
  parameter int unsigned DERAND_WORDS = 64,
  parameter int unsigned RATE_DIV     = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FADC_W-1:0] fadc_a,
  input  logic              ext_bcid_a,
  input  logic [FADC_W-1:0] fadc_b,
  input  logic              ext_bcid_b,
  input  logic              l1accept,
  input  logic              bccntres,
  input  logic              evcntres,
  input  logic              reset,
  input  logic              sync,
  // serial interface
  input  logic              ser_clk,
  input  logic              ser_frame,
  input  logic              ser_in,
  input  logic              ser_daisy_in,
  output logic              ser_out,
  output logic              ser_daisy_out,
  // real-time outputs
  output logic [9:0]        to_cp,
  output logic [9:0]        to_jp,
  output logic [JET_W-1:0]  cell_sum_out,
  input  logic [JET_W-1:0]  cell_sum_in
);

  // ---------------- timing and control ----------------
  logic [BCN_W-1:0] bcn;
  logic             l1a, evcnt_reset, soft_clear, sync_q;

  ppr_l1_protocol u_l1 (
    .clk, .rst_n, .l1accept_in(l1accept), .bccntres_in(bccntres),
    .evcntres_in(evcntres), .reset_in(reset), .sync_in(sync),
    .bcn, .l1a, .evcnt_reset, .soft_clear, .sync(sync_q)
  );

  logic [SER_W-1:0] rx_word, tx_word;
  logic             frame_stb;

  ppr_serial_if u_ser (
    .ser_clk, .ser_rst_n(rst_n), .frame(ser_frame), .data_in(ser_in),
    .data_out(ser_out), .daisy_in(ser_daisy_in), .daisy_out(ser_daisy_out),
    .clk, .rst_n, .rx_word, .frame_stb, .tx_word
  );

  ppr_ch_cfg_t       cfg [2];
  logic              add4_active, bypass, bypass_chan, rb_valid, rb_take;
  logic [1:0]        lut_wr, pb_wr;
  logic [9:0]        mem_addr;
  logic [WORD_W-1:0] mem_wdata, rb_data;
  logic [WORD_W-1:0] pb_rdata [2];
  logic [19:0]       rate_count [2];
  logic [9:0]        rate_time [2];
  logic [2:0]        status [2];

  ppr_config u_cfg (
    .clk, .rst_n, .cmd_stb(frame_stb), .cmd(rx_word), .cfg, .add4_active,
    .bypass, .bypass_chan, .lut_wr, .pb_wr, .mem_addr, .mem_wdata, .pb_rdata,
    .rate_count, .rate_time, .status, .rb_valid, .rb_data, .rb_take
  );

  // ---------------- channels ----------------
  logic [FADC_W-1:0] fadc_in [2];
  logic              ext_in [2];
  logic [LUT_DW-1:0] result [2];
  logic [PATH_W-1:0] fadc_word [2], lut_word [2];
  logic              fadc_pop [2], lut_pop [2], fadc_desc_pop [2], lut_desc_pop [2];
  logic              fadc_desc_valid [2], lut_desc_valid [2];
  logic [5:0]        fadc_desc [2], lut_desc [2], nlut [2], nraw [2];
  logic              hist_full [2], lut_init_busy [2], ro_overflow [2];

  assign fadc_in[0] = fadc_a;  assign ext_in[0] = ext_bcid_a;
  assign fadc_in[1] = fadc_b;  assign ext_in[1] = ext_bcid_b;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    ppr_channel #(
      .FIFO_DEPTH(FIFO_DEPTH), .LUT_ENTRIES(LUT_ENTRIES), .PB_WORDS(PB_WORDS),
      .SCROLL_WORDS(SCROLL_WORDS), .DERAND_WORDS(DERAND_WORDS), .RATE_DIV(RATE_DIV)
    ) u_ch (
      .clk, .rst_n, .soft_clear, .cfg(cfg[c]), .bypass, .sync(sync_q), .l1a, .bcn,
      .fadc(fadc_in[c]), .ext_bcid(ext_in[c]),
      .lut_wr(lut_wr[c]), .lut_addr(mem_addr), .lut_wdata(mem_wdata[LUT_DW-1:0]),
      .pb_wr(pb_wr[c]), .pb_addr(mem_addr[7:0]), .pb_wdata(mem_wdata),
      .pb_rdata(pb_rdata[c]), .result(result[c]),
      .fadc_pop(fadc_pop[c]), .fadc_word(fadc_word[c]),
      .fadc_desc_pop(fadc_desc_pop[c]), .fadc_desc(fadc_desc[c]),
      .fadc_desc_valid(fadc_desc_valid[c]),
      .lut_pop(lut_pop[c]), .lut_word(lut_word[c]),
      .lut_desc_pop(lut_desc_pop[c]), .lut_desc(lut_desc[c]),
      .lut_desc_valid(lut_desc_valid[c]),
      .rate_count(rate_count[c]), .rate_time(rate_time[c]),
      .hist_full(hist_full[c]), .lut_init_busy(lut_init_busy[c]),
      .ro_overflow(ro_overflow[c])
    );
    assign status[c] = {lut_init_busy[c], ro_overflow[c], hist_full[c]};
    assign nlut[c]   = cfg[c].lut_nsamp;
    assign nraw[c]   = cfg[c].fadc_nsamp;
  end

  // ---------------- readout formatting ----------------
  ppr_frame_mux u_fmt (
    .clk, .rst_n, .evcnt_reset, .frame_stb, .tx_word, .nlut, .nraw,
    .rb_valid, .rb_data, .status_word({5'd0, status[1], status[0]}), .rb_take,
    .lut_desc, .lut_desc_valid, .lut_desc_pop, .fadc_desc, .fadc_desc_valid,
    .fadc_desc_pop, .lut_word, .lut_pop, .fadc_word, .fadc_pop
  );

  // ---------------- real-time outputs ----------------
  ppr_bcmux u_bcmux (
    .clk, .rst_n, .bypass, .sel_chan(bypass_chan), .bc_odd(bcn[0]),
    .a(result[0]), .b(result[1]), .to_cp
  );

  ppr_jet_adder u_jet (
    .clk, .rst_n, .add4_active, .e_a(result[0]), .e_b(result[1]),
    .cell_sum_in, .cell_sum_out, .to_jp
  );

endmodule
