// dpram: dual-port tag RAM (one write port, one read port).
//
// Holds WORDS words of WIDTH bits. Reading and writing are independent: the
// read port is combinational from `raddr`, the write port stores `wdata` at
// `waddr` on the rising clock edge when the write enable `write` is high and
// the active-low write strobe `pre_n` is low (the two are ANDed, as in the
// original RAM). When the read and write
// addresses are equal during a write, `rdata` shows the data being written
// (write-through), as the specification of the original RAM demands.
//
// The original is a clockless dynamic 3-transistor-cell RAM written with a
// low-going strobe; here the strobe `pre_n` qualifies the clock edge, which
// is this design's choice. The defaults, 16 words of 32 bits, are the
// specified size; the backtrace processor instantiates it 18 bits wide.
module dpram #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             write,
  input  logic             pre_n,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];
  logic             we;

  assign we = write && !pre_n;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    if (we && (raddr == waddr)) rdata = wdata;
    else                        rdata = mem[raddr];
  end

endmodule
