// ppr_channel: one complete PreProcessor channel (real-time path and
// its monitoring and readout memories).
//
// Data path: the FADC sample and external BCID bit are latched on the
// selected clock edge; in playback mode the playback memory replaces them.
// The alignment FIFO delays the 11-bit word; from there the 10-bit sample
// feeds the FIR filter, the saturated-pulse BCID, the rate meter, the
// histogram and the FADC scrolling memory, and bit 10 feeds the external
// BCID (a 0->1 transition marks a crossing). The FIR sum goes to the peak
// finder and, in parallel, to the truncation and LUT. The BCID decision
// logic combines the three marks and the LUT value into the 8-bit result,
// which, with the three marks, is also written into the LUT scrolling
// memory. This arrangement is the block diagram of the specification.
// With bypass=1 (chip-wide by-pass to the BC-mux) the FIR uses the trivial
// coefficients (0,0,1,0,0), the LUT drops two LSBs and every sample passes.
//
// Timing: result in cycle t belongs to the FIFO output of cycle t-7
// (FIR 4, peak finder / LUT 2, decision 1). The marks of the saturated and
// external BCID are delayed to match. From the FADC pins the latency adds
// the latch (1, or 2 on the falling edge) and the FIFO (depth+1).
module ppr_channel
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
  input  logic              soft_clear,
  input  ppr_ch_cfg_t       cfg,
  input  logic              bypass,
  input  logic              sync,
  input  logic              l1a,
  input  logic [BCN_W-1:0]  bcn,
  input  logic [FADC_W-1:0] fadc,
  input  logic              ext_bcid,
  // memory load / read ports
  input  logic              lut_wr,
  input  logic [LUT_AW-1:0] lut_addr,
  input  logic [LUT_DW-1:0] lut_wdata,
  input  logic              pb_wr,
  input  logic [7:0]        pb_addr,
  input  logic [PATH_W-1:0] pb_wdata,
  output logic [PATH_W-1:0] pb_rdata,
  // real-time result
  output logic [LUT_DW-1:0] result,
  // readout: FADC derandomizer, LUT derandomizer
  input  logic              fadc_pop,
  output logic [PATH_W-1:0] fadc_word,
  input  logic              fadc_desc_pop,
  output logic [5:0]        fadc_desc,
  output logic              fadc_desc_valid,
  input  logic              lut_pop,
  output logic [PATH_W-1:0] lut_word,
  input  logic              lut_desc_pop,
  output logic [5:0]        lut_desc,
  output logic              lut_desc_valid,
  // monitoring and status
  output logic [19:0]       rate_count,
  output logic [9:0]        rate_time,
  output logic              hist_full,
  output logic              lut_init_busy,
  output logic              ro_overflow
);

  // ---------------- input, playback, alignment ----------------
  logic [PATH_W-1:0] latched, pb_out, fifo_in, x_word;

  ppr_input_latch u_latch (
    .clk, .rst_n, .pos_edge(cfg.latch_pos_edge), .fadc, .ext_bcid, .q(latched)
  );

  assign fifo_in = cfg.playback_mode ? pb_out : latched;

  ppr_align_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .depth(cfg.fifo_depth), .ext_depth(cfg.ext_fifo_depth),
    .d(fifo_in), .q(x_word)
  );

  logic [FADC_W-1:0] x;
  assign x = x_word[FADC_W-1:0];

  ppr_pb_histo_mem #(.WORDS(PB_WORDS)) u_pbh (
    .clk, .rst_n, .sync, .playback_mode(cfg.playback_mode), .pb_run(cfg.pb_run),
    .pb_empty(cfg.pb_empty), .hist_en(cfg.hist_en), .hist_thresh(cfg.hist_thresh),
    .hist_bin(cfg.hist_bin), .bc_lo(cfg.hist_bc_lo), .bc_hi(cfg.hist_bc_hi), .bcn,
    .fadc(x), .wr_en(pb_wr), .wr_addr(pb_addr), .wr_data(pb_wdata),
    .rd_addr(pb_addr), .rd_data(pb_rdata), .pb_out, .hist_full
  );

  logic rate_done;
  ppr_rate_meter #(.DIV(RATE_DIV)) u_rate (
    .clk, .rst_n, .clear(soft_clear), .fadc(x), .thresh(cfg.rate_thresh),
    .interval(cfg.rate_interval), .count_q(rate_count), .time_q(rate_time),
    .done(rate_done)
  );

  // ---------------- BCID ----------------
  logic signed [3:0] c1, c5;
  logic [3:0]        c2, c3, c4;
  logic [2:0]        lsb;
  always_comb begin
    if (bypass) begin
      c1 = 4'sd0; c2 = 4'd0; c3 = 4'd1; c4 = 4'd0; c5 = 4'sd0; lsb = 3'd0;
    end else begin
      c1 = cfg.coef1; c2 = cfg.coef2; c3 = cfg.coef3; c4 = cfg.coef4;
      c5 = cfg.coef5; lsb = cfg.lut_lsb;
    end
  end

  logic [FIR_W-1:0] y;
  ppr_fir u_fir (.clk, .rst_n, .x, .c1, .c2, .c3, .c4, .c5, .y);

  logic peak;
  ppr_peak_finder u_peak (.clk, .rst_n, .y, .peak);

  logic [LUT_DW-1:0] lut_data;
  logic [LUT_AW-1:0] field;
  logic              ovf;
  ppr_lut #(.ENTRIES(LUT_ENTRIES)) u_lut (
    .clk, .rst_n, .y, .lsb, .bypass, .wr_en(lut_wr), .wr_addr(lut_addr),
    .wr_data(lut_wdata), .init_busy(lut_init_busy), .data(lut_data),
    .field, .ovf
  );

  logic sat1, xsat1, ext1, ext_prev;
  ppr_sat_bcid u_sat (
    .clk, .rst_n, .x, .thresh(cfg.sat_thresh), .sat(sat1), .x_sat(xsat1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ext_prev <= 1'b0; ext1 <= 1'b0; end
    else begin
      ext_prev <= x_word[FADC_W];
      ext1     <= x_word[FADC_W] && !ext_prev;
    end
  end

  // delay the one-clock marks by 5 more clocks to meet the FIR path
  logic [2:0] mark_dly [5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) mark_dly[i] <= '0;
    end else begin
      mark_dly[0] <= {ext1, sat1, xsat1};
      for (int i = 1; i < 5; i++) mark_dly[i] <= mark_dly[i-1];
    end
  end

  logic [2:0] bcid_bits;
  ppr_bcid_decision u_dec (
    .clk, .rst_n, .bypass,
    .sel_low(cfg.sel_low), .bound_low(cfg.bound_low), .sel_med(cfg.sel_med),
    .bound_med(cfg.bound_med), .sel_high(cfg.sel_high),
    .peak, .sat(mark_dly[4][1]), .ext(mark_dly[4][2]),
    .lut_data, .field, .ovf, .raw_sat(mark_dly[4][0]),
    .result, .bcid_bits
  );

  // ---------------- readout ----------------
  logic fadc_ovf, lut_ovf, fadc_empty, lut_empty;

  ppr_readout #(.SCROLL_WORDS(SCROLL_WORDS), .DERAND_WORDS(DERAND_WORDS)) u_ro_fadc (
    .clk, .rst_n, .clear(soft_clear), .wdata(x_word), .l1a,
    .offset(cfg.fadc_offset), .nsamp(cfg.fadc_nsamp), .prescale(cfg.raw_prescale),
    .pop(fadc_pop), .rdata(fadc_word), .empty(fadc_empty),
    .desc_pop(fadc_desc_pop), .desc(fadc_desc), .desc_valid(fadc_desc_valid),
    .overflow(fadc_ovf)
  );

  ppr_readout #(.SCROLL_WORDS(SCROLL_WORDS), .DERAND_WORDS(DERAND_WORDS)) u_ro_lut (
    .clk, .rst_n, .clear(soft_clear), .wdata({bcid_bits, result}), .l1a,
    .offset(cfg.lut_offset), .nsamp(cfg.lut_nsamp), .prescale(8'd0),
    .pop(lut_pop), .rdata(lut_word), .empty(lut_empty),
    .desc_pop(lut_desc_pop), .desc(lut_desc), .desc_valid(lut_desc_valid),
    .overflow(lut_ovf)
  );

  assign ro_overflow = fadc_ovf || lut_ovf;

endmodule
