// predadd: predecessor address datapath of the backtrace processor.
//
// Generates the addresses of the three on-chip tag RAMs. The write address is
// a 4-bit counter (inaddcounter_reg1) that steps by one every loaded cycle and
// is cleared while `startcounter` is high; it therefore walks the 16-word RAMs
// as a circular buffer, one word per state. Each read address is the write
// address plus one 4-bit relative predecessor position taken from the
// topology memory (predecessor_data[11:8], [7:4] and [3:0] for the first,
// second and third predecessor), computed modulo 16.
//
// Pipeline: the counter and the three positions are registered in stage 1
// (inaddcounter_reg1, topology_reg1_1..3); the sums are registered in stage 2
// (firstpredadd_reg2, seconpredadd_reg2, thirdpredadd_reg2). A state whose
// data is written at counter value c is therefore read back, one cycle later,
// by position value 0; older states need the positions that reach back to
// them. The adders take no carry-in: the chip's scan test vector (counter A,
// positions A, sums 4) shows the plain modulo-16 sum.
//
// Scan chain order (scan-in first): inaddcounter_reg1, topology_reg1_1,
// topology_reg1_2, topology_reg1_3, firstpredadd_reg2, seconpredadd_reg2,
// thirdpredadd_reg2, with the bit orders of the chip.
module predadd
  import bt_pkg::*;
(
  input  logic               clk,
  input  logic               load,
  input  logic               shift,
  input  logic               startcounter,
  input  logic [11:0]        predecessor_data,
  output logic [RADDR_W-1:0] writeadd_data,
  output logic [RADDR_W-1:0] firstpredadd2_data,
  output logic [RADDR_W-1:0] seconpredadd2_data,
  output logic [RADDR_W-1:0] thirdpredadd2_data,
  input  logic               scanin,
  output logic               scanout
);

  logic [RADDR_W-1:0] inaddmux;
  logic [OFF_W-1:0]   topo1, topo2, topo3;
  logic [6:0]         sc;  // scan links

  // inaddmux: clear at frame start, otherwise count up by one
  assign inaddmux = startcounter ? '0 : RADDR_W'(writeadd_data + RADDR_W'(1));

  scan_reg #(.W(RADDR_W), .LSB_FIRST(1'b0)) u_inaddcounter_reg1 (
    .clk, .load, .shift, .d(inaddmux), .q(writeadd_data), .si(scanin), .so(sc[0]));
  scan_reg #(.W(OFF_W), .LSB_FIRST(1'b1)) u_topology_reg1_1 (
    .clk, .load, .shift, .d(predecessor_data[11:8]), .q(topo1), .si(sc[0]), .so(sc[1]));
  scan_reg #(.W(OFF_W), .LSB_FIRST(1'b0)) u_topology_reg1_2 (
    .clk, .load, .shift, .d(predecessor_data[7:4]), .q(topo2), .si(sc[1]), .so(sc[2]));
  scan_reg #(.W(OFF_W), .LSB_FIRST(1'b1)) u_topology_reg1_3 (
    .clk, .load, .shift, .d(predecessor_data[3:0]), .q(topo3), .si(sc[2]), .so(sc[3]));

  scan_reg #(.W(RADDR_W), .LSB_FIRST(1'b0)) u_firstpredadd_reg2 (
    .clk, .load, .shift, .d(RADDR_W'(writeadd_data + topo1)), .q(firstpredadd2_data),
    .si(sc[3]), .so(sc[4]));
  scan_reg #(.W(RADDR_W), .LSB_FIRST(1'b1)) u_seconpredadd_reg2 (
    .clk, .load, .shift, .d(RADDR_W'(writeadd_data + topo2)), .q(seconpredadd2_data),
    .si(sc[4]), .so(sc[5]));
  scan_reg #(.W(RADDR_W), .LSB_FIRST(1'b0)) u_thirdpredadd_reg2 (
    .clk, .load, .shift, .d(RADDR_W'(writeadd_data + topo3)), .q(thirdpredadd2_data),
    .si(sc[5]), .so(sc[6]));

  assign scanout = sc[6];

endmodule
