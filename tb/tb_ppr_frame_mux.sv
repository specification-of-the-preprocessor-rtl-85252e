// tb_ppr_frame_mux: derandomizers are modelled as queues. Events with
// random words (some with raw data prescaled away) are queued for both
// channels; frames are strobed and every output word is compared with the
// expected fixed sequence: readback/status word, then per channel the
// header {1,0,valid,event number}, the LUT words and the raw words, zeros
// where no data. Readback words must take the readback slot once.
`include "tb/tb_util.svh"
module tb_ppr_frame_mux;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, evcnt_reset = 0, frame_stb = 0, rb_valid = 0;
  logic [12:0] tx_word;
  logic [5:0] nlut [2], nraw [2];
  logic [10:0] rb_data = 0, status_word = 11'h2A5;
  logic rb_take;
  logic [5:0] lut_desc [2], fadc_desc [2];
  logic lut_desc_valid [2], fadc_desc_valid [2];
  logic lut_desc_pop [2], fadc_desc_pop [2], lut_pop [2], fadc_pop [2];
  logic [10:0] lut_word [2], fadc_word [2];
  ppr_frame_mux dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; `TB_DONE
  end
  int lq [2][$], rq [2][$], ldq [2][$], rdq [2][$];
  task automatic refresh();
    for (int c = 0; c < 2; c++) begin
      lut_desc_valid[c]  = ldq[c].size() > 0;
      fadc_desc_valid[c] = rdq[c].size() > 0;
      lut_desc[c]  = lut_desc_valid[c]  ? 6'(ldq[c][0]) : '0;
      fadc_desc[c] = fadc_desc_valid[c] ? 6'(rdq[c][0]) : '0;
      lut_word[c]  = lq[c].size() > 0 ? 11'(lq[c][0]) : '0;
      fadc_word[c] = rq[c].size() > 0 ? 11'(rq[c][0]) : '0;
    end
  endtask
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (lut_desc_pop[c])  void'(ldq[c].pop_front());
      if (fadc_desc_pop[c]) void'(rdq[c].pop_front());
      if (lut_pop[c])       void'(lq[c].pop_front());
      if (fadc_pop[c])      void'(rq[c].pop_front());
    end
    #1 refresh();
  end
  logic [12:0] exp_q [$];
  task automatic frame();
    logic [12:0] e;
    repeat (3) @(negedge clk);
    frame_stb = 1; @(negedge clk); frame_stb = 0; #1;
    e = exp_q.pop_front();
    `CHECK(tx_word == e, $sformatf("word %h exp %h", tx_word, e))
  endtask
  initial begin
    int evn = 0, events = 0;
    nlut[0] = 1; nraw[0] = 5; nlut[1] = 2; nraw[1] = 3;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int seq = 0; seq < 40; seq++) begin
      logic has_ev;
      int ev_lut [2][$], ev_raw [2][$];
      has_ev = (seq % 3 != 2);
      for (int c = 0; c < 2; c++) begin ev_lut[c].delete(); ev_raw[c].delete(); end
      if (seq == 5) begin rb_valid = 1; rb_data = 11'h4CD; end
      if (has_ev)
        for (int c = 0; c < 2; c++) begin
          int nr;
          nr = (seq % 4 == 1) ? 0 : int'(nraw[c]);
          ldq[c].push_back(int'(nlut[c])); rdq[c].push_back(nr);
          for (int k = 0; k < nlut[c]; k++) begin
            int w = int'($urandom_range(0, 2047)); lq[c].push_back(w); ev_lut[c].push_back(w); end
          for (int k = 0; k < nr; k++) begin
            int w = int'($urandom_range(0, 2047)); rq[c].push_back(w); ev_raw[c].push_back(w); end
        end
      refresh();
      // expected sequence
      exp_q.push_back(rb_valid ? {2'b01, rb_data} : {2'b00, status_word});
      for (int c = 0; c < 2; c++) begin
        exp_q.push_back({2'b10, has_ev, 10'(evn)});
        for (int k = 0; k < nlut[c]; k++)
          exp_q.push_back({2'b11, has_ev ? 11'(ev_lut[c][k]) : 11'd0});
        for (int k = 0; k < nraw[c]; k++)
          exp_q.push_back({2'b11, (has_ev && k < ev_raw[c].size()) ? 11'(ev_raw[c][k]) : 11'd0});
      end
      if (has_ev) begin evn++; events++; end
      frame();
      `CHECK(!(seq == 5) || rb_take == 0, "readback taken")
      if (seq == 5) rb_valid = 0;
      while (exp_q.size() > 0) frame();
    end
    `CHECK(events > 20 && lq[0].size() == 0 && rq[1].size() == 0, "all data sent")
    `TB_DONE
  end
endmodule
