// scan_clkdrv: register enable driver of the backtrace processor.
//
// On the chip, each scanpath register is driven by a standard-cell module that
// derives its load, shift and slave clocks from the master clock, the slave
// clock, `stall` and `scantest`. Functionally: a register loads its data input
// only in a master-clock phase when the chip is neither stalled (for example
// during a DRAM refresh) nor being scanned, and it shifts along the scan chain
// only in a master-clock phase while `scantest` is high.
//
// In this single-clock implementation the driver produces the two enables
// used with the rising edge of `clk`:
//   load  = ~stall & ~scantest
//   shift =  scantest
// The enables are registered-free combinational functions of the pins and
// are valid for the edge that ends the current cycle.
module scan_clkdrv (
  input  logic stall,     // hold every register (DRAM refresh, FIFO waits)
  input  logic scantest,  // scan chains active
  output logic load,
  output logic shift
);

  always_comb begin
    load  = ~stall & ~scantest;
    shift = scantest;
  end

endmodule
