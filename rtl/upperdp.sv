// upperdp: upper datapath of the backtrace processor.
//
// Joins the predecessor address datapath (predadd) and the predecessor
// selector (predsel). Every loaded cycle one state's backtrace tag
// (stbtrace_data, read from the previous frame's state probability memory)
// enters the tag RAMs, and the tags of up to three predecessors of a state,
// located by the relative positions in predecessor_data, come out for the
// backtrace datapath. A tag entering in cycle n is readable by the state
// whose positions enter in cycle n (position 0 = the state itself) and by
// later states of the same word, up to 15 entries back.
//
// Scan chain (UDP): scanin -> stprobin1 -> predadd registers -> scanout.
module upperdp
  import bt_pkg::*;
(
  input  logic             clk,
  input  logic             load,
  input  logic             shift,
  input  logic             startcounter,
  input  logic [TAG_W-1:0] stbtrace_data,
  input  logic [11:0]      predecessor_data,
  output logic [TAG_W-1:0] firstbtrace_data,
  output logic [TAG_W-1:0] seconbtrace_data,
  output logic [TAG_W-1:0] thirdbtrace_data,
  input  logic             scanin,
  output logic             scanout
);

  logic [RADDR_W-1:0] writeadd_data, firstpredadd2_data, seconpredadd2_data, thirdpredadd2_data;
  logic               scan_mid;

  predsel u_predsel (
    .clk, .load, .shift,
    .stprobin_data(stbtrace_data),
    .writeadd_data, .firstpredadd2_data, .seconpredadd2_data, .thirdpredadd2_data,
    .firstpred2_data(firstbtrace_data),
    .seconpred2_data(seconbtrace_data),
    .thirdpred2_data(thirdbtrace_data),
    .scanin, .scanout(scan_mid));

  predadd u_predadd (
    .clk, .load, .shift, .startcounter, .predecessor_data,
    .writeadd_data, .firstpredadd2_data, .seconpredadd2_data, .thirdpredadd2_data,
    .scanin(scan_mid), .scanout);

endmodule
