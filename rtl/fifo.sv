// fifo: first-word-fall-through FIFO used for the source and backtrace FIFOs.
//
// DEPTH words of WIDTH bits. `rdata` always shows the oldest word while
// `empty` is low; `pop` removes it, `push` appends `wdata`. A push when full
// and a pop when empty are ignored. `almost_full` is high when ALMOST_FULL or
// more words are stored; the backtrace FIFO uses it to ask for unloading.
//
// The original FIFOs are off-the-shelf parts that decouple subsystems with
// independent clocks; this implementation is single-clock, which is this
// design's choice. Defaults: the stated 64 x 32 source FIFO.
//
// Timing: rising-edge clock, synchronous active-high reset; push and pop in
// the same cycle are both carried out (also when full, as the pop makes room).
module fifo #(
  parameter int unsigned DEPTH       = 64,
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned ALMOST_FULL = DEPTH - 8,
  parameter int unsigned AW          = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (reset) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + AW'(1);
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  assign rdata       = mem[rptr];
  assign empty       = (count == '0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(ALMOST_FULL));

endmodule
