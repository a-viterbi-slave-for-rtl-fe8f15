// predsel: predecessor selector of the backtrace processor.
//
// Three identical 16 x 18-bit dual-port RAMs hold the same data: the backtrace
// tags of the most recent states, written one per cycle at `writeadd_data`
// from the stage-1 input register stprobin1. Each RAM is read at its own
// address, so the tags of three different predecessors of the current state
// come out at once (firstpred2_data, seconpred2_data, thirdpred2_data).
//
// Timing: stprobin_data is registered on a loaded edge; the registered tag is
// written on the next loaded edge, and the RAM outputs follow their read
// addresses combinationally (write-through when a read address equals the
// write address). RAM writes happen only in loaded cycles, so a stall or a
// scan leaves the RAMs unchanged; that gating is this design's choice.
// The one scan register, stprobin1, is shifted LSB first.
module predsel
  import bt_pkg::*;
(
  input  logic               clk,
  input  logic               load,
  input  logic               shift,
  input  logic [TAG_W-1:0]   stprobin_data,
  input  logic [RADDR_W-1:0] writeadd_data,
  input  logic [RADDR_W-1:0] firstpredadd2_data,
  input  logic [RADDR_W-1:0] seconpredadd2_data,
  input  logic [RADDR_W-1:0] thirdpredadd2_data,
  output logic [TAG_W-1:0]   firstpred2_data,
  output logic [TAG_W-1:0]   seconpred2_data,
  output logic [TAG_W-1:0]   thirdpred2_data,
  input  logic               scanin,
  output logic               scanout
);

  logic [TAG_W-1:0] stprobin1_data;

  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_stprobin1 (
    .clk, .load, .shift, .d(stprobin_data), .q(stprobin1_data), .si(scanin), .so(scanout));

  dpram #(.WORDS(16), .WIDTH(TAG_W)) u_dpram_first (
    .clk, .write(1'b1), .pre_n(!load), .waddr(writeadd_data), .wdata(stprobin1_data),
    .raddr(firstpredadd2_data), .rdata(firstpred2_data));
  dpram #(.WORDS(16), .WIDTH(TAG_W)) u_dpram_secon (
    .clk, .write(1'b1), .pre_n(!load), .waddr(writeadd_data), .wdata(stprobin1_data),
    .raddr(seconpredadd2_data), .rdata(seconpred2_data));
  dpram #(.WORDS(16), .WIDTH(TAG_W)) u_dpram_third (
    .clk, .write(1'b1), .pre_n(!load), .waddr(writeadd_data), .wdata(stprobin1_data),
    .raddr(thirdpredadd2_data), .rdata(thirdpred2_data));

endmodule
