// tb_ppr_channel: one channel end to end, each mechanism in turn:
//  1 normal pulse, default set-up (trivial FIR, linear LUT): one result,
//    LUT(peak) at the peak crossing, zeros around, fixed latency;
//  2 saturated pulses with FIR (0,1,2,1,0) overflowing the 10-bit field:
//    the saturated BCID picks the first saturated crossing for a fast edge
//    and the next one for a slow edge, result 0xFF;
//  3 external BCID only: the crossing marked by the 11th bit, delayed by
//    its own FIFO depth, is output;
//  4 playback: a pulse loaded into the playback memory and started by sync
//    comes out like a real one;
//  5 readout: after an accept, the FADC and LUT derandomizers hold the
//    window of words around the read pointer;
//  6 by-pass: every sample comes out with its two LSBs dropped.
`include "tb/tb_util.svh"
module tb_ppr_channel;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, soft_clear = 0, bypass = 0, sync = 0, l1a = 0;
  ppr_ch_cfg_t cfg;
  logic [11:0] bcn = 0;
  logic [9:0] fadc = 0;
  logic ext_bcid = 0;
  logic lut_wr = 0, pb_wr = 0;
  logic [9:0] lut_addr = 0;
  logic [7:0] lut_wdata = 0, pb_addr = 0, result;
  logic [10:0] pb_wdata = 0, pb_rdata, fadc_word, lut_word;
  logic fadc_pop = 0, fadc_desc_pop = 0, lut_pop = 0, lut_desc_pop = 0;
  logic [5:0] fadc_desc, lut_desc;
  logic fadc_desc_valid, lut_desc_valid, hist_full, lut_init_busy, ro_overflow;
  logic [19:0] rate_count;
  logic [9:0] rate_time;
  ppr_channel #(.RATE_DIV(50)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; `TB_DONE
  end

  localparam int N = 64;
  int stim [N];
  int ext_stim [N];
  int res [N + 40];

  // drives stim[] (cycle i on the pins) and records result[] per cycle
  task automatic run();
    for (int i = 0; i < N + 40; i++) begin
      @(negedge clk);
      fadc = (i < N) ? 10'(stim[i]) : 10'd0;
      ext_bcid = (i < N) ? 1'(ext_stim[i]) : 1'b0;
      @(posedge clk); #1;
      res[i] = int'(result);
    end
  endtask
  task automatic clear_stim();
    for (int i = 0; i < N; i++) begin stim[i] = 0; ext_stim[i] = 0; end
  endtask
  function automatic int count_nonzero();
    int n = 0;
    for (int i = 0; i < N + 40; i++) if (res[i] != 0) n++;
    return n;
  endfunction

  localparam int LAT = 8;   // pins -> result with FIFO depth 0, rising edge

  initial begin
    int depth;
    cfg = CH_CFG_DEFAULT;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (lut_init_busy) @(negedge clk);

    // 1: normal pulse
    depth = 3; cfg.fifo_depth = 5'(depth);
    clear_stim();
    stim[20] = 40; stim[21] = 300; stim[22] = 520; stim[23] = 410; stim[24] = 90;
    run();
    `CHECK(res[22 + LAT + depth] == 520 >> 2, $sformatf("peak result %0d", res[22 + LAT + depth]))
    `CHECK(count_nonzero() == 1, "single result for a pulse")

    // 2: saturated pulses
    cfg.fifo_depth = 0;
    cfg.coef1 = 0; cfg.coef2 = 1; cfg.coef3 = 2; cfg.coef4 = 1; cfg.coef5 = 0;
    clear_stim();
    stim[10] = 100; stim[11] = 700; stim[12] = 1023; stim[13] = 1023; stim[14] = 1023; stim[15] = 300;
    stim[40] = 100; stim[41] = 300; stim[42] = 1023; stim[43] = 1023; stim[44] = 1023; stim[45] = 300;
    run();
    `CHECK(res[12 + LAT] == 255, "fast edge: first saturated crossing")
    `CHECK(res[43 + LAT] == 255, "slow edge: next crossing")
    `CHECK(count_nonzero() == 2, $sformatf("two results, got %0d", count_nonzero()))

    // 3: external BCID only
    cfg = CH_CFG_DEFAULT;
    cfg.sel_low = 3'b100; cfg.sel_med = 3'b100; cfg.sel_high = 3'b100;
    cfg.fifo_depth = 5'd2; cfg.ext_fifo_depth = 5'd6;
    clear_stim();
    for (int i = 0; i < N; i++) stim[i] = 4 * i;
    ext_stim[20] = 1; ext_stim[21] = 1;   // rising transition at 20
    run();
    // ext bit 20 is delayed 4 clocks more than the data: marks data of 24
    `CHECK(res[24 + LAT + 2] == 24, $sformatf("ext BCID result %0d", res[24 + LAT + 2]))
    `CHECK(count_nonzero() == 1, "single ext result")

    // 4: playback
    cfg = CH_CFG_DEFAULT;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); pb_wr = 1; pb_addr = 8'(a);
      pb_wdata = (a == 100) ? 11'd200 : (a == 101) ? 11'd800 : (a == 102) ? 11'd300 : 11'd0;
    end
    @(negedge clk); pb_wr = 0;
    cfg.playback_mode = 1; cfg.pb_run = 1;
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    clear_stim();
    begin
      int seen = -1;
      for (int i = 0; i < 300; i++) begin
        @(posedge clk); #1;
        if (result != 0) begin
          `CHECK(result == 8'(800 >> 2) && seen < 0, "playback pulse result")
          seen = i;
        end
      end
      `CHECK(seen > 0, "playback produced a result")
    end
    cfg.playback_mode = 0; cfg.pb_run = 0;

    // 5: readout
    cfg = CH_CFG_DEFAULT;
    cfg.fadc_offset = 7'd8; cfg.fadc_nsamp = 6'd5; cfg.lut_offset = 7'd1; cfg.lut_nsamp = 6'd3;
    clear_stim();
    stim[20] = 40; stim[21] = 300; stim[22] = 520; stim[23] = 410; stim[24] = 90;
    fork
      run();
      begin
        // accept in cycle 22+12: FADC word of pin cycle 22 written at FIFO output in cycle 23
        repeat (22 + 12) @(negedge clk);
        l1a = 1; @(negedge clk); l1a = 0;
      end
    join
    `CHECK(fadc_desc_valid && fadc_desc == 5 && lut_desc_valid && lut_desc == 3, "descriptors")
    begin
      // accept at the edge of cycle 33: the newest word written holds pin
      // cycle 30, offset 8 points at pin cycle 22, window 20..24
      int expw [5] = '{40, 300, 520, 410, 90};
      for (int w = 0; w < 5; w++) begin
        `CHECK(int'(fadc_word) == expw[w], $sformatf("fadc readout word %0d = %0d exp %0d", w, fadc_word, expw[w]))
        @(negedge clk); fadc_pop = 1; @(negedge clk); fadc_pop = 0;
      end
      // LUT memory: newest word holds the result of pin cycle 23, offset 1
      // points at pin cycle 22, window 21..23
      for (int w = 0; w < 3; w++) begin
        `CHECK(lut_word[7:0] == ((w == 1) ? 8'(520 >> 2) : 8'd0), $sformatf("lut readout word %0d = %h", w, lut_word))
        if (w == 1) `CHECK(lut_word[0 +: 8] != 0 && lut_word[8] == 1'b1, "peak-finder mark stored")
        @(negedge clk); lut_pop = 1; @(negedge clk); lut_pop = 0;
      end
    end

    // 6: by-pass
    cfg = CH_CFG_DEFAULT;
    cfg.coef3 = 4'd7;   // must be ignored in by-pass
    bypass = 1;
    clear_stim();
    for (int i = 0; i < N; i++) stim[i] = int'($urandom_range(0, 1023));
    run();
    begin
      int ok = 1;
      for (int i = 0; i < N; i++) if (res[i + LAT] != (stim[i] >> 2)) ok = 0;
      `CHECK(ok == 1, "by-pass passes every sample")
    end
    `TB_DONE
  end
endmodule
