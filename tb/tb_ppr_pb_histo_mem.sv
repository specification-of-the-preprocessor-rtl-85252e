// tb_ppr_pb_histo_mem: (1) loads a ramp into the playback memory, starts
// playback with sync and checks the cyclic output with the preset number
// of empty slices between passes; (2) fills a histogram with random FADC
// values in each binning mode, with threshold and bunch range, and checks
// every bin against a model; (3) checks that filling stops when one bin
// reaches 0x3FF.
`include "tb/tb_util.svh"
module tb_ppr_pb_histo_mem;
  import ppr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, playback_mode = 1, pb_run = 0, hist_en = 0;
  logic [15:0] pb_empty = 16'd5;
  logic [6:0] hist_thresh = 0;
  hist_bin_e hist_bin = BIN_FULL;
  logic [11:0] bc_lo = 0, bc_hi = 12'hFFF, bcn = 0;
  logic [9:0] fadc = 0;
  logic wr_en = 0, hist_full;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [10:0] wr_data = 0, rd_data, pb_out;
  int model [256];
  ppr_pb_histo_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; `TB_DONE
  end
  task automatic clear_mem();
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(a); wr_data = 0; model[a] = 0;
    end
    @(negedge clk); wr_en = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- playback ----
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(a); wr_data = 11'(a * 5 + 1);
    end
    @(negedge clk); wr_en = 0; pb_run = 1;
    repeat (3) @(negedge clk);
    `CHECK(pb_out == 0, "idle before sync")
    sync = 1; @(negedge clk); sync = 0;
    // after sync edge, one clock to first word
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 256; a++) begin
        @(posedge clk); #1;
        `CHECK(pb_out == 11'(a * 5 + 1), $sformatf("pass %0d word %0d = %0d", pass, a, pb_out))
      end
      for (int e = 0; e < 5; e++) begin
        @(posedge clk); #1;
        `CHECK(pb_out == 0, "empty slice")
      end
    end
    // ---- histogram ----
    playback_mode = 0; pb_run = 0;
    for (int mode = 0; mode < 3; mode++) begin
      hist_bin = hist_bin_e'(mode);
      hist_thresh = 7'($urandom_range(0, 100));
      bc_lo = 12'd100; bc_hi = 12'd2000;
      clear_mem();
      hist_en = 1;
      for (int i = 0; i < 3000; i++) begin
        int b; logic inr;
        @(negedge clk);
        fadc = (mode == 0) ? 10'($urandom) : 10'($urandom_range(0, mode == 1 ? 600 : 300));
        bcn = 12'($urandom_range(0, 3563));
        case (mode) 0: begin b = fadc >> 2; inr = 1; end
                    1: begin b = fadc >> 1; inr = fadc < 512; end
                    default: begin b = fadc; inr = fadc < 256; end endcase
        if (inr && fadc > 10'(hist_thresh) && bcn >= bc_lo && bcn <= bc_hi) model[b]++;
      end
      @(negedge clk); hist_en = 0;
      for (int a = 0; a < 256; a++) begin
        rd_addr = 8'(a); #1;
        `CHECK(int'(rd_data) == model[a], $sformatf("mode %0d bin %0d = %0d exp %0d", mode, a, rd_data, model[a]))
      end
    end
    // ---- stop on overflow ----
    hist_bin = BIN_FULL; hist_thresh = 0; bc_lo = 0; bc_hi = 12'hFFF;
    clear_mem();
    hist_en = 1;
    for (int i = 0; i < 1100; i++) begin
      @(negedge clk); fadc = 10'd40;     // bin 10
    end
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); fadc = 10'd80;     // bin 20, must not count
    end
    @(negedge clk); hist_en = 0;
    `CHECK(hist_full, "hist_full set")
    rd_addr = 8'd10; #1; `CHECK(rd_data == 11'h3FF, $sformatf("bin 10 stops at 0x3FF: %h", rd_data))
    rd_addr = 8'd20; #1; `CHECK(rd_data == 0, "no filling after overflow")
    `TB_DONE
  end
endmodule
