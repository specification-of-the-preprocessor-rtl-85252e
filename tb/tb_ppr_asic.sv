// tb_ppr_asic: end-to-end test of the two-channel chip at its default
// sizes, configured and read out only through the serial interface
// (serial clock 50 MHz, LHC clock 40 MHz, unrelated phases).
// Phases and what they must show:
//  A  register write / readback and a LUT entry loaded for channel A;
//  B  normal pulses in both channels in the same crossing: BCID by the
//     FIR peak finder, both values on the CP link in one BC-mux pair with
//     odd parity, the half jet-cell sum on ToJP (ADD4 by-passed);
//  C  ADD4 active with a neighbour half-cell, and a saturated pulse in
//     channel B with FIR (0,1,2,1,0): saturated BCID, CP overflow 0xFF and
//     jet overflow 0x1FF;
//  D  external BCID selected in channel A;
//  E  Level-1 accepts: events read out through the serial frames with
//     header, LUT word and five raw samples, compared with the pulse;
//     the raw prescaler drops the raw samples of every second accept;
//  F  playback in channel A started by Sync: a full memory of 25 pulses
//     (5 samples + 5 empty slices each) must give exactly 25 identified
//     crossings per pass, and the second pass must follow after the 100
//     programmed empty slices; meanwhile the histogram fills in channel B
//     and is read back bin by bin; rate meter read back;
//  G  by-pass to the BC-mux: channel B's samples on the CP link, flag 1;
//  H  soft reset clears pending readout.
// Throughout, every output sequence must be 15 words (195 serial bits),
// the readout length of one event with five raw samples.
// Each mechanism is counted; one that never happened is a failure.
`include "tb/tb_util.svh"
module tb_ppr_asic;
  import ppr_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, ser_clk = 0;
  logic [9:0] fadc_a = 0, fadc_b = 0;
  logic ext_bcid_a = 0, ext_bcid_b = 0;
  logic l1accept = 0, bccntres = 0, evcntres = 0, reset = 0, sync = 0;
  logic ser_frame = 0, ser_in = 0, ser_daisy_in = 0, ser_out, ser_daisy_out;
  logic [9:0] to_cp, to_jp;
  logic [8:0] cell_sum_out, cell_sum_in = 0;

  ppr_asic dut (.*);

  always #12.5 clk = ~clk;
  always #10   ser_clk = ~ser_clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    failures++; `TB_DONE
  end

  // ------------------------------------------------------------ serial
  logic [12:0] cmd_q [$];
  logic [12:0] rb_q [$];       // readback data words
  int          slots = 0;
  initial begin
    logic [12:0] w;
    @(posedge rst_n);
    forever begin
      w = (cmd_q.size() > 0) ? cmd_q.pop_front() : 13'd0;
      for (int b = 0; b < 13; b++) begin
        @(negedge ser_clk);
        ser_frame = (b == 0);
        ser_in    = w[12 - b];
      end
      slots++;
    end
  end

  // output parser
  typedef struct { int valid; int evnum; int words [2][$]; } event_t;
  event_t ev_list [$];
  event_t cur;
  int     cur_ch = -1;
  logic [12:0] sh;
  int     bitn = -1;
  int     seq_n = 0;       // words in the current output sequence
  int     seq_lens [$];
  always @(posedge ser_clk) if (ser_frame && rst_n) bitn = 0;
  always @(negedge ser_clk) begin
    if (bitn >= 0 && bitn < 13) begin
      sh = {sh[11:0], ser_out};
      bitn++;
      if (bitn == 13) parse(sh);
    end
  end
  task automatic parse(input logic [12:0] w);
    seq_n++;
    case (w[12:11])
      2'b00, 2'b01: begin
        if (seq_n > 0) seq_lens.push_back(seq_n);
        seq_n = 0;
        if (cur_ch == 1 && cur.valid) ev_list.push_back(cur);
        cur_ch = -1;
        if (w[12:11] == 2'b01) rb_q.push_back(w);
      end
      2'b10: begin
        cur_ch++;
        if (cur_ch == 0) begin
          cur.valid = w[10]; cur.evnum = int'(w[9:0]);
          cur.words[0].delete(); cur.words[1].delete();
        end
      end
      default: if (cur_ch >= 0) cur.words[cur_ch].push_back(int'(w[10:0]));
    endcase
  endtask

  task automatic wait_idle();
    while (cmd_q.size() > 0) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask
  task automatic target(input int ch, input int space);
    cmd_q.push_back({2'b10, 6'd0, 1'(ch), 4'(space)});
  endtask
  task automatic index(input int i);
    cmd_q.push_back({2'b10, 1'b1, 10'(i)});
  endtask
  task automatic wr(input int ch, input int space, input int idx, input int data);
    target(ch, space); index(idx); cmd_q.push_back({2'b01, 11'(data)});
  endtask
  task automatic rd(input int ch, input int space, input int idx, output int v);
    int n;
    n = rb_q.size();
    target(ch, space); index(idx); cmd_q.push_back({2'b11, 11'd0});
    while (rb_q.size() == n) @(posedge clk);
    v = int'(rb_q[$][10:0]);
  endtask

  // ------------------------------------------------------------ real-time capture
  int cp_vals [$];       // {flag, data} of non-zero CP frames
  int cp_flags [$];
  int jp_vals [$];
  int par_err = 0;
  logic capture = 0;
  always @(posedge clk) if (rst_n && capture) begin
    if (($countones(to_cp) % 2) != 1 || ($countones(to_jp) % 2) != 1) par_err++;
    if (to_cp[7:0] != 0) begin cp_vals.push_back(int'(to_cp[7:0])); cp_flags.push_back(int'(to_cp[8])); end
    jp_vals.push_back(int'(to_jp[8:0]));
  end

  // drive a pulse into both channels; returns the pin cycle of the peak
  task automatic pulses(input int pa [5], input int pb [5], input int ext_at);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      fadc_a = (i >= 10 && i < 15) ? 10'(pa[i-10]) : 10'd0;
      fadc_b = (i >= 10 && i < 15) ? 10'(pb[i-10]) : 10'd0;
      ext_bcid_a = (ext_at >= 0 && i >= ext_at && i < ext_at + 3);
    end
  endtask

  // mechanism counters
  int n_peak = 0, n_pair = 0, n_sat = 0, n_cp_ovf = 0, n_jet_ovf = 0, n_add4 = 0,
      n_ext = 0, n_events = 0, n_prescaled = 0, n_playback = 0, n_hist = 0,
      n_rate = 0, n_bypass = 0, n_softreset = 0, n_lutload = 0, n_readback = 0;

  function automatic bit has(ref int q [$], input int v);
    foreach (q[i]) if (q[i] == v) return 1;
    return 0;
  endfunction

  initial begin
    int v;
    int pa [5], pb [5];
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk); bccntres = 1; @(negedge clk); bccntres = 0;
    // wait for the LUT power-up fill
    repeat (1100) @(posedge clk);

    // ---------------- A: registers, readback, LUT load
    wr(0, 0, 16, 0);            // PB/Histo control of A: load, histogram off
    wr(1, 0, 22, 100);                // rate threshold B
    wr(1, 0, 23, 1);                  // rate interval B: 1 x 25 us
    rd(1, 0, 22, v);
    `CHECK(v == 100, $sformatf("readback rate threshold %0d", v))
    if (v == 100) n_readback++;
    wr(0, 1, 520, 'h77);             // LUT A[520] = 0x77
    wait_idle();
    n_lutload++;

    // ---------------- B: normal pulses in both channels
    pa = '{40, 300, 2080 / 4, 410, 90};
    pb = '{50, 350, 600, 420, 80};
    capture = 1;
    pulses(pa, pb, -1);
    repeat (20) @(posedge clk);
    capture = 0;
    `CHECK(cp_vals.size() == 2 && has(cp_vals, 8'h77) && has(cp_vals, 600 >> 2), "both results on the CP link")
    `CHECK(par_err == 0, "odd parity on CP and JP")
    if (cp_vals.size() == 2) begin n_peak += 2; n_pair++; n_lutload++; end
    `CHECK(has(jp_vals, 8'h77 + (600 >> 2)), "half jet-cell on ToJP (ADD4 by-passed)")
    cp_vals.delete(); cp_flags.delete(); jp_vals.delete();

    // ---------------- C: ADD4 active, saturated pulse in B
    wr(0, 3, 0, 1);                    // ADD4 active
    wr(1, 0, 2, 'h10);                // B: c1=0, c2=1
    wr(1, 0, 3, 'h12);                // B: c3=2, c4=1
    wr(1, 0, 4, 0);                    // B: c5=0, lsb=0
    wait_idle();
    cell_sum_in = 9'd100;
    capture = 1;
    pulses('{40, 300, 520, 410, 90}, '{0, 0, 0, 0, 0}, -1);
    pulses('{0, 0, 0, 0, 0}, '{100, 700, 1023, 1023, 300}, -1);
    repeat (20) @(posedge clk);
    capture = 0;
    `CHECK(has(cp_vals, 255), "saturated pulse gives 0xFF")
    if (has(cp_vals, 255)) begin n_sat++; n_cp_ovf++; end
    `CHECK(has(jp_vals, 511), "jet overflow 0x1FF")
    if (has(jp_vals, 511)) n_jet_ovf++;
    `CHECK(has(jp_vals, 100) && has(jp_vals, 100 + 8'h77), "ADD4 adds the neighbour half-cell")
    if (has(jp_vals, 100 + 8'h77)) n_add4++;
    cp_vals.delete(); cp_flags.delete(); jp_vals.delete();
    cell_sum_in = 0;
    wr(0, 3, 0, 0);
    wr(1, 0, 2, 0); wr(1, 0, 3, 1);   // B back to trivial coefficients

    // ---------------- D: external BCID in channel A
    wr(0, 0, 5, 4); wr(0, 0, 7, 4); wr(0, 0, 9, 4);
    wait_idle();
    capture = 1;
    pulses('{40, 300, 520, 410, 90}, '{0, 0, 0, 0, 0}, 13);   // ext rises with sample 410
    repeat (20) @(posedge clk);
    capture = 0;
    `CHECK(cp_vals.size() == 1 && has(cp_vals, 410 >> 2), "external BCID selects its crossing")
    if (has(cp_vals, 410 >> 2)) n_ext++;
    cp_vals.delete(); cp_flags.delete(); jp_vals.delete();
    wr(0, 0, 5, 1); wr(0, 0, 7, 1); wr(0, 0, 9, 2);

    // ---------------- E: Level-1 accepts and readout
    // FADC offset 19, LUT offset 12 centre the windows on the peak when
    // the accept is given 22 clocks after the peak sample (FIFO depth 0).
    for (int c = 0; c < 2; c++) begin
      wr(c, 0, 11, 19); wr(c, 0, 13, 12);
    end
    wr(0, 0, 15, 1); wr(1, 0, 15, 1);   // raw prescale: every second accept
    wait_idle();
    for (int e = 0; e < 4; e++) begin
      fork
        pulses('{40, 300, 520 + e, 410, 90}, '{50, 350, 600 + e, 420, 80}, -1);
        begin
          repeat (12 + 22) @(negedge clk);
          l1accept = 1; @(negedge clk); l1accept = 0;
        end
      join
      repeat (40) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    `CHECK(ev_list.size() == 4, $sformatf("4 events read out, got %0d", ev_list.size()))
    foreach (ev_list[k]) begin
      event_t ev;
      ev = ev_list[k];
      `CHECK(ev.evnum == k && ev.words[0].size() == 6 && ev.words[1].size() == 6, "event layout")
      if (ev.words[0].size() == 6 && ev.words[1].size() == 6) begin
        `CHECK((ev.words[0][0] & 8'hFF) == ((k == 0) ? 8'h77 : ((520 + k) >> 2))
               && (ev.words[0][0] >> 8) == 1, $sformatf("LUT word A %h", ev.words[0][0]))
        `CHECK((ev.words[1][0] & 8'hFF) == ((600 + k) >> 2), "LUT word B")
        if (k % 2 == 0) begin
          `CHECK(ev.words[0][1] == 40 && ev.words[0][2] == 300 && ev.words[0][3] == 520 + k
                 && ev.words[0][4] == 410 && ev.words[0][5] == 90, "raw samples A")
          `CHECK(ev.words[1][3] == 600 + k, "raw sample B")
          n_events++;
        end else begin
          `CHECK(ev.words[0][1] == 0 && ev.words[0][3] == 0 && ev.words[1][3] == 0, "prescaled raw samples")
          n_prescaled++;
        end
      end
    end
    wr(0, 0, 15, 0); wr(1, 0, 15, 0);

    // ---------------- F: playback in A, histogram in B, rate meter
    target(1, 2); index(0);           // B: clear the histogram memory
    for (int a = 0; a < 256; a++) cmd_q.push_back({2'b01, 11'd0});
    wr(1, 0, 16, (1 << 10) | (0 << 8) | (10 << 1));   // B: histogram on, full binning, thr 10
    // playback memory of A: 25 pulses of 5 samples + 5 empty slices
    target(0, 2); index(0);
    for (int a = 0; a < 256; a++) begin
      int sm [5];
      sm = '{40, 300, 900, 410, 90};
      cmd_q.push_back({2'b01, 11'((a < 250 && a % 10 < 5) ? sm[a % 10] : 0)});
    end
    wr(0, 0, 0, 3);                   // A: playback mode, rising edge
    wr(0, 0, 16, 1);                  // A: run
    wr(0, 0, 17, 100);                // A: 100 empty slices
    wait_idle();
    capture = 1;
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    fork
      for (int p = 0; p < 3; p++) pulses('{0, 0, 0, 0, 0}, '{20, 30, 600, 30, 20}, -1);
    join_none
    begin
      int n1, n2;
      repeat (360) @(posedge clk);
      n1 = 0;
      foreach (cp_vals[i]) if (cp_vals[i] == (900 >> 2)) n1++;
      cp_vals.delete();
      repeat (256 + 100) @(posedge clk);
      n2 = 0;
      foreach (cp_vals[i]) if (cp_vals[i] == (900 >> 2)) n2++;
      `CHECK(n1 == 25, $sformatf("first playback pass: 25 pulses identified, seen %0d", n1))
      `CHECK(n2 == 25, $sformatf("second pass after 100 empty slices: 25 pulses, seen %0d", n2))
      if (n1 == 25) n_playback++;
    end
    capture = 0;
    cp_vals.delete(); cp_flags.delete(); jp_vals.delete();
    wr(0, 0, 0, 1); wr(0, 0, 16, 0);
    wr(1, 0, 16, 0);                  // histogram off
    wait_idle();
    // bins: 600 -> 150 (3 pulses here + ... only while enabled), 30 -> 7, 20 -> 5
    rd(1, 2, 150, v);
    `CHECK(v == 3, $sformatf("histogram bin 150 = %0d", v))
    if (v == 3) n_hist++;
    rd(1, 2, 7, v);
    `CHECK(v == 6, $sformatf("histogram bin 7 = %0d", v))
    rd(1, 2, 2, v);
    `CHECK(v == 0, "below threshold not counted")
    rd(1, 4, 2, v);
    `CHECK(v == 1, "rate meter interval 1 x 25 us")
    rd(1, 4, 0, v);
    `CHECK(v <= 1000, "rate count within one interval")
    n_rate++;

    // ---------------- G: by-pass to the BC-mux, channel B
    wr(0, 3, 1, 3);
    wait_idle();
    begin
      int ok, seen;
      ok = 0; seen = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); fadc_b = 10'(4 * (i + 1) + 3);
        @(posedge clk); #1;
        if (to_cp[8] == 1'b1 && to_cp[7:0] != 0) begin
          seen++;
          if (int'(to_cp[7:0]) >= 1 && int'(to_cp[7:0]) <= 40) ok++;
        end
      end
      `CHECK(seen > 20 && ok == seen, "by-pass passes channel B with flag 1")
      if (seen > 20) n_bypass++;
    end
    fadc_b = 0;
    wr(0, 3, 1, 0);
    wait_idle();

    // ---------------- H: soft reset clears pending readout
    @(negedge clk); l1accept = 1; @(negedge clk); l1accept = 0;
    @(negedge clk); reset = 1; @(negedge clk); reset = 0;
    begin
      int n0;
      n0 = ev_list.size();
      repeat (2000) @(posedge clk);
      `CHECK(ev_list.size() == n0, "no event after soft reset")
      if (ev_list.size() == n0) n_softreset++;
    end

    // readout bandwidth: with 1 LUT and 5 raw samples per channel every
    // output sequence is 1 + 2 * (1 + 1 + 5) = 15 words = 195 serial bits,
    // i.e. 4.875 us per event at a 40 MHz serial clock (the first two
    // sequences after reset are skipped: the output register still holds
    // its reset value when the first frame arrives)
    begin
      int bad;
      bad = 0;
      foreach (seq_lens[i]) if (i > 1 && seq_lens[i] != 15) begin bad++; $display("seq %0d len %0d", i, seq_lens[i]); end
      `CHECK(seq_lens.size() > 50 && bad == 0, $sformatf("%0d sequences, %0d not 15 words", seq_lens.size(), bad))
    end

    // every mechanism must have happened
    `CHECK(n_peak > 0,      "mechanism: FIR peak finder BCID")
    `CHECK(n_pair > 0,      "mechanism: BC-mux pair")
    `CHECK(n_sat > 0,       "mechanism: saturated BCID")
    `CHECK(n_cp_ovf > 0,    "mechanism: CP overflow")
    `CHECK(n_jet_ovf > 0,   "mechanism: jet overflow")
    `CHECK(n_add4 > 0,      "mechanism: ADD4 active")
    `CHECK(n_ext > 0,       "mechanism: external BCID")
    `CHECK(n_events > 0,    "mechanism: L1A readout")
    `CHECK(n_prescaled > 0, "mechanism: raw prescale")
    `CHECK(n_playback > 0,  "mechanism: playback")
    `CHECK(n_hist > 0,      "mechanism: histogram")
    `CHECK(n_rate > 0,      "mechanism: rate meter")
    `CHECK(n_bypass > 0,    "mechanism: by-pass")
    `CHECK(n_softreset > 0, "mechanism: soft reset")
    `CHECK(n_lutload > 0,   "mechanism: LUT load")
    `CHECK(n_readback > 0,  "mechanism: register readback")
    $display("mechanisms: peak=%0d pair=%0d sat=%0d cpovf=%0d jetovf=%0d add4=%0d ext=%0d events=%0d prescaled=%0d playback=%0d hist=%0d rate=%0d bypass=%0d softreset=%0d lutload=%0d readback=%0d",
             n_peak, n_pair, n_sat, n_cp_ovf, n_jet_ovf, n_add4, n_ext, n_events, n_prescaled,
             n_playback, n_hist, n_rate, n_bypass, n_softreset, n_lutload, n_readback);
    `TB_DONE
  end
endmodule
