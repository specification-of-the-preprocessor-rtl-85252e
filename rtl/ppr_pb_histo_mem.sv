// ppr_pb_histo_mem: PlayBack memory, also used as histogram memory.
//
// One 256 x 11 memory per channel serves two purposes.
// PlayBack (playback_mode=1): with pb_run=0 the memory is loaded through the
// write port; with pb_run=1 a "sync" pulse starts cyclic playback, one word
// per LHC clock, which replaces the FADC data ahead of the alignment FIFO.
// After every pass through the 256 words, pb_empty empty slices (zeros) are
// inserted (16-bit preset counter), which limits the Level-1 Accept rate
// produced by playback.
// Histogram (playback_mode=0, hist_en=1): FADC values above hist_thresh,
// taken in bunch crossings bcn in [bc_lo, bc_hi], increment the count in
// their bin. Binning covers the full, half or quarter FADC range in 256
// bins. Counts are 10 bits; filling stops for good (hist_full) as soon as
// one bin reaches 0x3FF, until the memory is rewritten or reset.
// Sizes, the 16-bit preset, binning by powers of two, the bunch range and
// the stop on overflow follow the specification. Values outside the binned
// range are not counted, and a write through the port (used to clear the
// histogram) takes priority over filling; these are this design's choices.
//
// Timing: pb_out is registered, one word per clock. A histogram update is a
// single-cycle read-modify-write. rd_data is an asynchronous read.
module ppr_pb_histo_mem
  import ppr_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,
  input  logic              playback_mode,
  input  logic              pb_run,
  input  logic [15:0]       pb_empty,
  input  logic              hist_en,
  input  logic [6:0]        hist_thresh,
  input  hist_bin_e         hist_bin,
  input  logic [BCN_W-1:0]  bc_lo,
  input  logic [BCN_W-1:0]  bc_hi,
  input  logic [BCN_W-1:0]  bcn,
  input  logic [FADC_W-1:0] fadc,
  input  logic              wr_en,
  input  logic [7:0]        wr_addr,
  input  logic [PATH_W-1:0] wr_data,
  input  logic [7:0]        rd_addr,
  output logic [PATH_W-1:0] rd_data,
  output logic [PATH_W-1:0] pb_out,
  output logic              hist_full
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam logic [PATH_W-1:0] COUNT_MAX = 11'h3FF;

  logic [PATH_W-1:0] mem [WORDS];

  assign rd_data = mem[rd_addr[AW-1:0]];

  // ---------------- playback sequencer ----------------
  typedef enum logic [1:0] {PB_IDLE, PB_PLAY, PB_EMPTY} pb_state_e;
  pb_state_e   state;
  logic [AW-1:0] ptr;
  logic [15:0] empty_cnt;
  logic        running;
  assign running = playback_mode && pb_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PB_IDLE; ptr <= '0; empty_cnt <= '0; pb_out <= '0;
    end else if (!running) begin
      state <= PB_IDLE; ptr <= '0; pb_out <= '0;
    end else begin
      unique case (state)
        PB_IDLE: begin
          pb_out <= '0;
          if (sync) begin state <= PB_PLAY; ptr <= '0; end
        end
        PB_PLAY: begin
          pb_out <= mem[ptr];
          ptr    <= ptr + 1'b1;
          if (ptr == AW'(WORDS - 1) && pb_empty != '0) begin
            state     <= PB_EMPTY;
            empty_cnt <= pb_empty;
          end
        end
        PB_EMPTY: begin
          pb_out    <= '0;
          empty_cnt <= empty_cnt - 1'b1;
          if (empty_cnt == 16'd1) state <= PB_PLAY;
        end
        default: state <= PB_IDLE;
      endcase
    end
  end

  // ---------------- histogram filling ----------------
  logic [7:0] bin;
  logic       in_range, fill;
  always_comb begin
    unique case (hist_bin)
      BIN_HALF:    begin bin = fadc[8:1]; in_range = !fadc[9];     end
      BIN_QUARTER: begin bin = fadc[7:0]; in_range = fadc[9:8] == 2'b00; end
      default:     begin bin = fadc[9:2]; in_range = 1'b1;         end
    endcase
    fill = !playback_mode && hist_en && !hist_full && in_range
        && (fadc > FADC_W'(hist_thresh)) && (bcn >= bc_lo) && (bcn <= bc_hi);
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr[AW-1:0]] <= wr_data;
    else if (fill)
      mem[bin[AW-1:0]] <= mem[bin[AW-1:0]] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                           hist_full <= 1'b0;
    else if (wr_en)                                       hist_full <= 1'b0;
    else if (fill && mem[bin[AW-1:0]] == COUNT_MAX - 1'b1) hist_full <= 1'b1;
  end

endmodule
