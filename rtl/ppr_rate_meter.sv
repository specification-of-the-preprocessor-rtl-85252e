// ppr_rate_meter: per-cell rate monitor.
//
// Counts LHC clocks in which the FADC value is above a programmable
// threshold. In parallel a 10-bit prescaler divides the 40 MHz LHC clock
// by DIV=1000 to 40 kHz (25 us ticks), and an interval counter preset to
// `interval` counts those ticks downwards. When it expires, the count and
// the elapsed time (in 25 us units) are latched for readout, `done` pulses
// for one clock, and a new interval starts. The prescaler, the 25 us unit
// and the 10-bit threshold and interval follow the specification; the
// 20-bit saturating count (enough for 1023 ticks * 1000 clocks) and the
// restart on `clear` or on a change of the interval register (including
// the first clock after reset) are this design's choices, so every
// latched count covers exactly `interval` ticks. An interval of 0 stops
// counting.
module ppr_rate_meter
  import ppr_pkg::*;
#(
  parameter int unsigned DIV = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [FADC_W-1:0] fadc,
  input  logic [9:0]        thresh,
  input  logic [9:0]        interval,
  output logic [19:0]       count_q,
  output logic [9:0]        time_q,
  output logic              done
);

  logic [9:0]  div_cnt;
  logic [9:0]  ticks_left;
  logic [19:0] count;
  logic        tick;
  logic [9:0]  ival_q;        // interval in use

  assign tick = (div_cnt == 10'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0; ticks_left <= '0; count <= '0; ival_q <= '0;
      count_q <= '0; time_q <= '0; done <= 1'b0;
    end else if (clear || interval == '0 || interval != ival_q) begin
      div_cnt <= '0; ticks_left <= interval; count <= '0; done <= 1'b0;
      ival_q  <= interval;
    end else begin
      done    <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick && ticks_left <= 10'd1) begin
        count_q    <= count + 20'(fadc > thresh && count != '1);
        time_q     <= interval;
        done       <= 1'b1;
        count      <= '0;
        ticks_left <= interval;
      end else begin
        if (fadc > thresh && count != '1) count <= count + 1'b1;
        if (tick) ticks_left <= ticks_left - 1'b1;
      end
    end
  end

endmodule
