// ppr_pkg: types and constants shared by the PreProcessor ASIC modules.
//
// The per-channel configuration is gathered in one struct, ppr_ch_cfg_t,
// whose fields follow the register table of the chip (input control,
// FIR coefficients, BCID decision control, readout control, playback /
// histogram control, rate meter). Fields not in that table (saturated-BCID
// threshold, playback empty-slice preset, readout prescale, histogram
// bunch range and binning) are this design's additions; their reset
// values are chosen so that the chip powers up in a working state.
package ppr_pkg;

  localparam int unsigned FADC_W   = 10;  // FADC sample width
  localparam int unsigned PATH_W   = 11;  // FADC sample + external BCID bit
  localparam int unsigned FIR_W    = 17;  // FIR sum width (result clipped at 0)
  localparam int unsigned LUT_AW   = 10;  // LUT address width
  localparam int unsigned LUT_DW   = 8;   // LUT data width (CP energy)
  localparam int unsigned JET_W    = 9;   // jet-cell sum width
  localparam int unsigned BCN_W    = 12;  // bunch-crossing number width
  localparam int unsigned SER_W    = 13;  // serial word: 2 flags + 11 data
  localparam int unsigned WORD_W   = 11;  // user data word width

  localparam logic [LUT_DW-1:0] CP_OVERFLOW  = 8'hFF;
  localparam logic [JET_W-1:0]  JET_OVERFLOW = 9'h1FF;
  localparam logic [FADC_W-1:0] FADC_SAT     = 10'h3FF;

  // Histogram binning of the 10-bit FADC value into 256 bins.
  typedef enum logic [1:0] {
    BIN_FULL    = 2'd0,   // bin = value >> 2  (whole FADC range)
    BIN_HALF    = 2'd1,   // bin = value >> 1  (lower half of range)
    BIN_QUARTER = 2'd2    // bin = value       (lower quarter of range)
  } hist_bin_e;

  typedef struct packed {
    // InputControl
    logic        latch_pos_edge;   // 1: latch FADC on rising edge, 0: falling
    logic        playback_mode;    // 1: real-time data from playback memory
    logic [4:0]  fifo_depth;       // delay of the 10-bit FADC stream
    logic [4:0]  ext_fifo_depth;   // delay of the external BCID bit
    // FIRFilterControl
    logic signed [3:0] coef1;      // -7..+7
    logic [3:0]  coef2;
    logic [3:0]  coef3;
    logic [3:0]  coef4;
    logic signed [3:0] coef5;      // -7..+7
    logic [2:0]  lut_lsb;          // lowest bit of the 10-bit LUT field
    // BCID decision control
    logic [2:0]  sel_low;          // {ext, sat, fir} enables, low interval
    logic [9:0]  bound_low;        // upper bound of the low interval
    logic [2:0]  sel_med;
    logic [9:0]  bound_med;        // upper bound of the medium interval
    logic [2:0]  sel_high;
    logic [9:0]  sat_thresh;       // saturated-BCID threshold on sample n-1
    // ReadOutControl
    logic [6:0]  fadc_offset;      // read pointer offset from write pointer
    logic [5:0]  fadc_nsamp;       // raw samples read per L1A
    logic [6:0]  lut_offset;
    logic [5:0]  lut_nsamp;
    logic [7:0]  raw_prescale;     // raw samples kept on every (N+1)th L1A
    // PBack / HistoControl
    logic        pb_run;           // playback: 1 run (cyclic), 0 load
    logic [6:0]  hist_thresh;      // histogram threshold on FADC value
    hist_bin_e   hist_bin;
    logic        hist_en;
    logic [15:0] pb_empty;         // empty slices after each playback roll
    logic [BCN_W-1:0] hist_bc_lo;
    logic [BCN_W-1:0] hist_bc_hi;
    // RateMeterControl
    logic [9:0]  rate_thresh;
    logic [9:0]  rate_interval;    // in units of 25 us
  } ppr_ch_cfg_t;

  localparam ppr_ch_cfg_t CH_CFG_DEFAULT = '{
    latch_pos_edge: 1'b1, playback_mode: 1'b0,
    fifo_depth: 5'd0, ext_fifo_depth: 5'd0,
    coef1: 4'sd0, coef2: 4'd0, coef3: 4'd1, coef4: 4'd0, coef5: 4'sd0,
    lut_lsb: 3'd0,
    sel_low: 3'b001, bound_low: 10'd0, sel_med: 3'b001, bound_med: 10'h3FF,
    sel_high: 3'b010, sat_thresh: 10'd512,
    fadc_offset: 7'd0, fadc_nsamp: 6'd5, lut_offset: 7'd0, lut_nsamp: 6'd1,
    raw_prescale: 8'd0,
    pb_run: 1'b0, hist_thresh: 7'd0, hist_bin: BIN_FULL, hist_en: 1'b0,
    pb_empty: 16'd0, hist_bc_lo: '0, hist_bc_hi: 12'hFFF,
    rate_thresh: 10'd0, rate_interval: 10'd40
  };

endpackage
