// addcounter: state address counter of the wordprocessing subsystem.
//
// Holds the 18-bit state address shared by the output lookup memory, the
// topology memory and the state probability memories (256K states). It is
// cleared by `reset` (end of frame), starts counting up by one per cycle when
// `startcount` (the Viterbi processor's newframe) is high, and then keeps
// counting until the next reset. `stall` freezes it.
//
// Timing: rising-edge clock; `addr` changes on the edge that ends a counting
// cycle, including the cycle in which `startcount` is high. Reset is
// synchronous and has priority.
module addcounter #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          startcount,
  input  logic          stall,
  output logic [AW-1:0] addr,
  output logic          running
);

  always_ff @(posedge clk) begin
    if (reset) begin
      addr    <= '0;
      running <= 1'b0;
    end else if (!stall && (running || startcount)) begin
      addr    <= addr + AW'(1);
      running <= 1'b1;
    end
  end

endmodule
