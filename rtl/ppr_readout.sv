// ppr_readout: scrolling memory, read-pointer management and derandomizer.
//
// Every LHC clock the pipeline word is written into a circular scrolling
// memory. On a Level-1 Accept the controller takes the location that is
// `offset` clocks behind the newest written word (the read pointer) and
// copies `nsamp` words centred on it, (nsamp-1)/2 ... and nsamp/2 after,
// into the derandomizing FIFO, one word per clock. Accepts that arrive
// while a copy is running wait in a 4-entry queue of start pointers, so the
// data copied are those of the accepted crossing. A prescaler keeps the
// samples only on every (prescale+1)-th accept; for the others nothing is
// copied. For each accept the number of words copied is pushed into a
// descriptor queue once the copy is complete; the readout formatter uses
// it to pull exactly that event's words.
// Scrolling memory (128 x 11), derandomizer (64 x 11), the offset from the
// write pointer, the symmetric sample window and the 8-bit prescaler follow
// the specification; the queues and the copy order are this design's.
//
// Timing: the word written in the clock of the accept is the newest one;
// offset 0 therefore reads the crossing written one clock before the accept.
module ppr_readout
  import ppr_pkg::*;
#(
  parameter int unsigned SCROLL_WORDS = 128,
  parameter int unsigned DERAND_WORDS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [PATH_W-1:0] wdata,
  input  logic              l1a,
  input  logic [6:0]        offset,
  input  logic [5:0]        nsamp,
  input  logic [7:0]        prescale,
  // derandomizer read side
  input  logic              pop,
  output logic [PATH_W-1:0] rdata,
  output logic              empty,
  // event descriptors
  input  logic              desc_pop,
  output logic [5:0]        desc,
  output logic              desc_valid,
  output logic              overflow
);

  localparam int unsigned SAW = $clog2(SCROLL_WORDS);

  logic [SAW-1:0]    wp, raddr;
  logic [PATH_W-1:0] sdata;

  ppr_scroll_mem #(.WORDS(SCROLL_WORDS)) u_scroll (
    .clk, .rst_n, .wdata, .wp, .raddr, .rdata(sdata)
  );

  // accept -> start pointer and word count
  logic [7:0]     pcnt;
  logic           keep;
  logic [5:0]     n_eff;
  logic [SAW-1:0] start;
  always_comb begin
    keep  = (pcnt == 8'd0);
    n_eff = keep ? nsamp : 6'd0;
    start = wp - SAW'(1) - SAW'(offset) - SAW'((nsamp - 6'd1) >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pcnt <= '0;
    else if (clear)  pcnt <= '0;
    else if (l1a)    pcnt <= (pcnt >= prescale) ? 8'd0 : pcnt + 1'b1;
  end

  logic            q_empty, q_full, q_ovf, q_pop;
  logic [SAW+5:0]  q_data;
  logic [2:0]      q_level;
  ppr_derand_fifo #(.WIDTH(SAW + 6), .DEPTH(4)) u_queue (
    .clk, .rst_n, .clear, .push(l1a), .wdata({start, n_eff}),
    .pop(q_pop), .rdata(q_data), .empty(q_empty), .full(q_full),
    .level(q_level), .overflow(q_ovf)
  );

  // copy engine
  logic           busy;
  logic [SAW-1:0] cptr;
  logic [5:0]     left, total;
  logic           d_push, d_full, d_ovf, dsc_push, dsc_full, dsc_ovf;
  logic [$clog2(DERAND_WORDS):0] d_level;
  logic [4:0]     dsc_level;
  logic           dsc_empty;

  assign q_pop    = !busy && !q_empty;
  assign raddr    = cptr;
  assign d_push   = busy && left != '0;
  assign dsc_push = busy && left == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cptr <= '0; left <= '0; total <= '0;
    end else if (clear) begin
      busy <= 1'b0; left <= '0;
    end else if (!busy) begin
      if (!q_empty) begin
        busy  <= 1'b1;
        cptr  <= q_data[SAW+5:6];
        left  <= q_data[5:0];
        total <= q_data[5:0];
      end
    end else if (left != '0) begin
      cptr <= cptr + 1'b1;
      left <= left - 1'b1;
    end else begin
      busy <= 1'b0;
    end
  end

  ppr_derand_fifo #(.WIDTH(PATH_W), .DEPTH(DERAND_WORDS)) u_derand (
    .clk, .rst_n, .clear, .push(d_push), .wdata(sdata), .pop,
    .rdata, .empty, .full(d_full), .level(d_level), .overflow(d_ovf)
  );

  ppr_derand_fifo #(.WIDTH(6), .DEPTH(16)) u_desc (
    .clk, .rst_n, .clear, .push(dsc_push), .wdata(total), .pop(desc_pop),
    .rdata(desc), .empty(dsc_empty), .full(dsc_full), .level(dsc_level),
    .overflow(dsc_ovf)
  );

  assign desc_valid = !dsc_empty;
  assign overflow   = q_ovf || d_ovf || dsc_ovf;

endmodule
