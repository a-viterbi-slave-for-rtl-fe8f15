// scan_reg: one scanpath register of the backtrace processor.
//
// Every register on the chip is a scanpath register (a mux-D flip-flop with a
// serial path). In a cycle with `shift` high the register moves its contents
// one bit along the scan chain; otherwise, with `load` high, it takes its
// functional input `d`; with both low it holds (this is how the chip stalls).
//
// LSB_FIRST selects the bit order along the chain. With LSB_FIRST = 1 the bit
// arriving on `si` enters the least significant bit and `so` is the most
// significant bit; with LSB_FIRST = 0 the order is reversed. The chip
// alternates the two orders from register to register along its chains.
//
// W must be at least 2 (the chip's registers are 4 and 18 bits wide).
//
// Timing: single rising-edge clock. The two-phase master/slave clocks and the
// separate shift clock of the original latch-based register are folded into
// one edge with two enables; that is this design's choice.
module scan_reg #(
  parameter int unsigned W         = 18,
  parameter bit          LSB_FIRST = 1'b1
) (
  input  logic         clk,
  input  logic         load,   // functional load enable
  input  logic         shift,  // scan shift enable, overrides load
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  input  logic         si,
  output logic         so
);

  always_ff @(posedge clk) begin
    if (shift) begin
      if (LSB_FIRST) q <= {q[W-2:0], si};
      else           q <= {si, q[W-1:1]};
    end else if (load) begin
      q <= d;
    end
  end

  assign so = LSB_FIRST ? q[W-1] : q[0];

endmodule
