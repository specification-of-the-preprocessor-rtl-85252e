// ppr_frame_mux: fixed-time multiplexing of readout and readback data.
//
// The serial output carries three streams in a fixed, repeating sequence
// of 13-bit words ({flag1, flag0, 11 data bits}):
//   1 readback word      flags {0,x}: x=1 read data, x=0 status word
//   channel A: header    flags {1,0}
//              LUT words flags {1,1}  (lut_nsamp of them)
//              raw words flags {1,1}  (fadc_nsamp of them)
//   channel B: the same
// The layout, the flag values and the 11-bit data width follow the
// specification's readout format (one BCID result and up to five raw
// samples per channel). At the start of each sequence an event is taken if
// both channels have a complete event in their derandomizers; its header
// is {1, event number[9:0]}, otherwise {0, 0} and the data words are zero.
// Words the prescaler did not copy are sent as zero. The event number is
// counted here and cleared by the event-counter reset; those details are
// this design's choices.
//
// Timing: on every frame_stb the next word is placed in tx_word; the
// serial interface sends it in the following frame period.
module ppr_frame_mux
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              evcnt_reset,
  input  logic              frame_stb,
  output logic [SER_W-1:0]  tx_word,
  input  logic [5:0]        nlut [2],
  input  logic [5:0]        nraw [2],
  // readback
  input  logic              rb_valid,
  input  logic [WORD_W-1:0] rb_data,
  input  logic [WORD_W-1:0] status_word,
  output logic              rb_take,
  // per channel derandomizers: [ch]
  input  logic [5:0]        lut_desc [2],
  input  logic              lut_desc_valid [2],
  output logic              lut_desc_pop [2],
  input  logic [5:0]        fadc_desc [2],
  input  logic              fadc_desc_valid [2],
  output logic              fadc_desc_pop [2],
  input  logic [PATH_W-1:0] lut_word [2],
  output logic              lut_pop [2],
  input  logic [PATH_W-1:0] fadc_word [2],
  output logic              fadc_pop [2]
);

  typedef enum logic [1:0] {SEG_RB, SEG_A, SEG_B} seg_e;
  seg_e       seg;
  logic [6:0] pos;                 // word index inside a channel segment
  logic       active;              // an event is being sent
  logic [5:0] cnt_lut [2], cnt_raw [2];
  logic [9:0] evnum;

  logic       ev_ready, ch;
  logic [6:0] n_lut, n_raw;
  assign ev_ready = lut_desc_valid[0] && lut_desc_valid[1]
                 && fadc_desc_valid[0] && fadc_desc_valid[1];
  assign ch    = (seg == SEG_B);
  assign n_lut = 7'(nlut[ch]);
  assign n_raw = 7'(nraw[ch]);

  logic [SER_W-1:0] word;
  logic             last_in_seg;
  always_comb begin
    word    = '0;
    rb_take = 1'b0;
    for (int c = 0; c < 2; c++) begin
      lut_pop[c] = 1'b0; fadc_pop[c] = 1'b0;
      lut_desc_pop[c] = 1'b0; fadc_desc_pop[c] = 1'b0;
    end
    last_in_seg = (pos == n_lut + n_raw);
    if (seg == SEG_RB) begin
      rb_take = frame_stb && rb_valid;
      word    = rb_valid ? {2'b01, rb_data} : {2'b00, status_word};
      for (int c = 0; c < 2; c++) begin
        lut_desc_pop[c]  = frame_stb && ev_ready;
        fadc_desc_pop[c] = frame_stb && ev_ready;
      end
    end else if (pos == '0) begin
      word = {2'b10, active, evnum};
    end else if (pos <= n_lut) begin
      word = {2'b11, {WORD_W{1'b0}}};
      if (active && (pos <= 7'(cnt_lut[ch]))) begin
        word[WORD_W-1:0] = lut_word[ch];
        lut_pop[ch]      = frame_stb;
      end
    end else begin
      word = {2'b11, {WORD_W{1'b0}}};
      if (active && (pos - n_lut <= 7'(cnt_raw[ch]))) begin
        word[WORD_W-1:0] = fadc_word[ch];
        fadc_pop[ch]     = frame_stb;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg <= SEG_RB; pos <= '0; active <= 1'b0; evnum <= '0; tx_word <= '0;
      for (int c = 0; c < 2; c++) begin cnt_lut[c] <= '0; cnt_raw[c] <= '0; end
    end else begin
      if (evcnt_reset) evnum <= '0;
      if (frame_stb) begin
        tx_word <= word;
        unique case (seg)
          SEG_RB: begin
            seg    <= SEG_A;
            pos    <= '0;
            active <= ev_ready;
            if (ev_ready) begin
              for (int c = 0; c < 2; c++) begin
                cnt_lut[c] <= lut_desc[c];
                cnt_raw[c] <= fadc_desc[c];
              end
            end
          end
          SEG_A: begin
            if (last_in_seg) begin seg <= SEG_B; pos <= '0; end
            else pos <= pos + 1'b1;
          end
          default: begin
            if (last_in_seg) begin
              seg <= SEG_RB; pos <= '0;
              if (active && !evcnt_reset) evnum <= evnum + 1'b1;
            end else pos <= pos + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
