// ppr_derand_fifo: synchronous first-word-fall-through FIFO.
//
// Used as the 64 x 11 derandomizing buffer behind each scrolling memory
// (size from the specification), and, with other sizes, for small event
// descriptor queues. rdata shows the oldest word whenever empty is low; pop
// removes it. A push into a full FIFO is dropped and sets the sticky
// overflow flag. clear (soft reset) empties the FIFO.
module ppr_derand_fifo #(
  parameter int unsigned WIDTH = 11,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (level == '0);
  assign full    = (level == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr];

  always_ff @(posedge clk) if (do_push) mem[wptr] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; level <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wptr <= '0; rptr <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && full) overflow <= 1'b1;
    end
  end

endmodule
