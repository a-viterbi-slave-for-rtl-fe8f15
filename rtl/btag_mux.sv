// btag_mux: selects the backtrace tag passed on to the grammar subsystem.
//
// An 18-bit 2:1 multiplexer. When the finished word is being stored in the
// backtrace FIFO (`store` high) the tag is the FIFO location it is stored at
// (`btaddr`); otherwise it is the tag of the best predecessor of the word's
// destination grammarnode (`gnbtrace11`) from the backtrace processor, so
// that the linked list skips words that were not stored. Combinational.
module btag_mux
  import bt_pkg::*;
(
  input  logic             store,
  input  logic [TAG_W-1:0] btaddr,
  input  logic [TAG_W-1:0] gnbtrace11,
  output logic [TAG_W-1:0] tag
);

  assign tag = store ? btaddr : gnbtrace11;

endmodule
