// ppr_config: command decoder and register file of the serial interface.
//
// Every 13-bit word received ({flags[1:0], data[10:0]}) is one command:
//   flags 00  no operation (idle line)
//   flags 10  control: data[10]=0 selects the target, data[4] = channel
//             (0 A, 1 B), data[3:0] = space; data[10]=1 sets the index
//             to data[9:0]
//   flags 01  data: writes data[10:0] to target[index], index increments
//   flags 11  read: target[index] is placed in the readback buffer, index
//             increments; it leaves on the next readback slot
// Spaces: 0 channel registers, 1 LUT (write only), 2 playback / histogram
// memory, 3 chip-wide registers, 4 channel status (read only).
// Channel register indices: 0 InputControl.1 {playback, pos edge},
// 1 InputControl.2 {ext depth[9:5], depth[4:0]}, 2 FIR.1 {c2, c1},
// 3 FIR.2 {c4, c3}, 4 FIR.3 {lsb[6:4], c5}, 5 select low, 6 bound low,
// 7 select medium, 8 bound medium, 9 select high, 10 saturated-BCID
// threshold, 11 FADC offset, 12 FADC samples, 13 LUT offset, 14 LUT
// samples, 15 raw prescale, 16 PBack/Histo {hist_en[10], bin[9:8],
// thresh[7:1], run[0]}, 17/18 empty slices low 11/high 5 bits, 19/20
// histogram bunch low/high (11 LSBs), 21 their MSBs {hi, lo}, 22 rate
// threshold, 23 rate interval. Chip-wide: 0 OutputControl {ADD4 active},
// 1 by-pass {channel[1], enable[0]}. Status: 0/1 rate count low/high,
// 2 rate time, 3 {LUT init busy, readout overflow, histogram full}.
// The registers of the specification's register table are all here with
// their field widths; the command format, spaces, indices and the extra
// registers are this design's choices. All registers are readable.
//
// Timing: a command takes effect in the clock after cmd_stb. Memory
// writes are single-clock strobes.
module ppr_config
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_stb,
  input  logic [SER_W-1:0]  cmd,
  // configuration
  output ppr_ch_cfg_t       cfg [2],
  output logic              add4_active,
  output logic              bypass,
  output logic              bypass_chan,
  // memory ports
  output logic [1:0]        lut_wr,
  output logic [1:0]        pb_wr,
  output logic [9:0]        mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic [WORD_W-1:0] pb_rdata [2],
  // status
  input  logic [19:0]       rate_count [2],
  input  logic [9:0]        rate_time [2],
  input  logic [2:0]        status [2],
  // readback
  output logic              rb_valid,
  output logic [WORD_W-1:0] rb_data,
  input  logic              rb_take
);

  localparam logic [3:0] SP_REG = 4'd0, SP_LUT = 4'd1, SP_PB = 4'd2,
                         SP_COMMON = 4'd3, SP_STATUS = 4'd4;

  logic       chan;
  logic [3:0] space;
  logic [9:0] index;

  logic [1:0]        flags;
  logic [WORD_W-1:0] data;
  assign flags = cmd[SER_W-1:SER_W-2];
  assign data  = cmd[WORD_W-1:0];

  logic is_write;
  assign is_write = cmd_stb && flags == 2'b01;

  assign mem_addr  = index;
  assign mem_wdata = data;
  always_comb begin
    lut_wr = '0;
    pb_wr  = '0;
    if (is_write && space == SP_LUT) lut_wr[chan] = 1'b1;
    if (is_write && space == SP_PB)  pb_wr[chan]  = 1'b1;
  end

  // read multiplexer for channel registers
  function automatic logic [WORD_W-1:0] reg_read(input ppr_ch_cfg_t c, input logic [9:0] i);
    unique case (i)
      10'd0:  return WORD_W'({c.playback_mode, c.latch_pos_edge});
      10'd1:  return WORD_W'({c.ext_fifo_depth, c.fifo_depth});
      10'd2:  return WORD_W'({c.coef2, c.coef1});
      10'd3:  return WORD_W'({c.coef4, c.coef3});
      10'd4:  return WORD_W'({c.lut_lsb, c.coef5});
      10'd5:  return WORD_W'(c.sel_low);
      10'd6:  return WORD_W'(c.bound_low);
      10'd7:  return WORD_W'(c.sel_med);
      10'd8:  return WORD_W'(c.bound_med);
      10'd9:  return WORD_W'(c.sel_high);
      10'd10: return WORD_W'(c.sat_thresh);
      10'd11: return WORD_W'(c.fadc_offset);
      10'd12: return WORD_W'(c.fadc_nsamp);
      10'd13: return WORD_W'(c.lut_offset);
      10'd14: return WORD_W'(c.lut_nsamp);
      10'd15: return WORD_W'(c.raw_prescale);
      10'd16: return {c.hist_en, c.hist_bin, c.hist_thresh, c.pb_run};
      10'd17: return c.pb_empty[10:0];
      10'd18: return WORD_W'(c.pb_empty[15:11]);
      10'd19: return c.hist_bc_lo[10:0];
      10'd20: return c.hist_bc_hi[10:0];
      10'd21: return WORD_W'({c.hist_bc_hi[11], c.hist_bc_lo[11]});
      10'd22: return WORD_W'(c.rate_thresh);
      10'd23: return WORD_W'(c.rate_interval);
      default: return '0;
    endcase
  endfunction

  function automatic ppr_ch_cfg_t reg_write(input ppr_ch_cfg_t c, input logic [9:0] i,
                                            input logic [WORD_W-1:0] d);
    ppr_ch_cfg_t n = c;
    unique case (i)
      10'd0:  begin n.latch_pos_edge = d[0]; n.playback_mode = d[1]; end
      10'd1:  begin n.fifo_depth = d[4:0]; n.ext_fifo_depth = d[9:5]; end
      10'd2:  begin n.coef1 = d[3:0]; n.coef2 = d[7:4]; end
      10'd3:  begin n.coef3 = d[3:0]; n.coef4 = d[7:4]; end
      10'd4:  begin n.coef5 = d[3:0]; n.lut_lsb = d[6:4]; end
      10'd5:  n.sel_low = d[2:0];
      10'd6:  n.bound_low = d[9:0];
      10'd7:  n.sel_med = d[2:0];
      10'd8:  n.bound_med = d[9:0];
      10'd9:  n.sel_high = d[2:0];
      10'd10: n.sat_thresh = d[9:0];
      10'd11: n.fadc_offset = d[6:0];
      10'd12: n.fadc_nsamp = d[5:0];
      10'd13: n.lut_offset = d[6:0];
      10'd14: n.lut_nsamp = d[5:0];
      10'd15: n.raw_prescale = d[7:0];
      10'd16: begin n.pb_run = d[0]; n.hist_thresh = d[7:1];
                    n.hist_bin = hist_bin_e'(d[9:8]); n.hist_en = d[10]; end
      10'd17: n.pb_empty[10:0] = d;
      10'd18: n.pb_empty[15:11] = d[4:0];
      10'd19: n.hist_bc_lo[10:0] = d;
      10'd20: n.hist_bc_hi[10:0] = d;
      10'd21: begin n.hist_bc_lo[11] = d[0]; n.hist_bc_hi[11] = d[1]; end
      10'd22: n.rate_thresh = d[9:0];
      10'd23: n.rate_interval = d[9:0];
      default: ;
    endcase
    return n;
  endfunction

  logic [WORD_W-1:0] read_val;
  always_comb begin
    unique case (space)
      SP_REG:    read_val = reg_read(cfg[chan], index);
      SP_PB:     read_val = pb_rdata[chan];
      SP_COMMON: read_val = (index == 10'd0) ? WORD_W'(add4_active)
                          : (index == 10'd1) ? WORD_W'({bypass_chan, bypass}) : '0;
      SP_STATUS: unique case (index)
                   10'd0:   read_val = rate_count[chan][10:0];
                   10'd1:   read_val = WORD_W'(rate_count[chan][19:11]);
                   10'd2:   read_val = WORD_W'(rate_time[chan]);
                   10'd3:   read_val = WORD_W'(status[chan]);
                   default: read_val = '0;
                 endcase
      default:   read_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chan <= 1'b0; space <= SP_REG; index <= '0;
      cfg[0] <= CH_CFG_DEFAULT; cfg[1] <= CH_CFG_DEFAULT;
      add4_active <= 1'b0; bypass <= 1'b0; bypass_chan <= 1'b0;
      rb_valid <= 1'b0; rb_data <= '0;
    end else begin
      if (rb_take) rb_valid <= 1'b0;
      if (cmd_stb) begin
        unique case (flags)
          2'b10: begin
            if (data[10]) index <= data[9:0];
            else begin chan <= data[4]; space <= data[3:0]; end
          end
          2'b01: begin
            index <= index + 1'b1;
            if (space == SP_REG) cfg[chan] <= reg_write(cfg[chan], index, data);
            if (space == SP_COMMON && index == 10'd0) add4_active <= data[0];
            if (space == SP_COMMON && index == 10'd1) begin
              bypass <= data[0]; bypass_chan <= data[1];
            end
          end
          2'b11: begin
            index    <= index + 1'b1;
            rb_valid <= 1'b1;
            rb_data  <= read_val;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
