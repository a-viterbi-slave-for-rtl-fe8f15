// backtrace_processor: the backtrace chip, a slave of the Viterbi processor.
//
// For every HMM state processed by the Viterbi processor, this chip forwards
// the backtrace tag (a pointer to the previous word on the best path) of the
// state's most likely predecessor, so that the tag can be written back with
// the state's new probability. It also keeps the tag of the best predecessor
// of each word's destination grammarnode (gnbtrace11_out), held stable for
// the whole of the following word.
//
// Structure: upperdp (tag RAMs and their address datapath) feeds btracedp (the
// selection pipeline). All decisions (sela, selb, morepredmux7, gndmux9,
// newword9, gnselect2, popsourceinv) come from the Viterbi processor.
//
// Pins: the 102 signal pins of the chip, with the four clocks and control
// lines folded into one clock:
//   stbtrace_data[17:0]     tag of the state read from the t-1 memory
//   predecessor_data[11:0]  relative positions of three predecessors
//   srcndbtrace2_data[17:0] tag of the word's source grammarnode (source FIFO)
//   newframe                start of frame, clears the RAM write counter
//   stall                   hold all registers
//   scantest                scan chains shift instead of loading
//   three scan chains: UDP (upper datapath), BDPUP, BDPLO.
//
// Latency: a state whose stbtrace_data/predecessor_data are presented in
// loaded cycle n has its selected tag on btrace11_out after loaded edge n+10
// (eleven register stages). sela/selb apply 5 loaded cycles after the state
// is presented, morepredmux7 7 cycles after, gndmux9 9, newword9 10,
// gnselect2 2 and a pop of the source tag (popsourceinv low) must be at or
// before cycle n+1 for the tag to be used by that state.
module backtrace_processor
  import bt_pkg::*;
(
  input  logic             clk,
  input  logic             stall,
  input  logic             scantest,
  input  logic             newframe,
  input  logic [TAG_W-1:0] stbtrace_data,
  input  logic [11:0]      predecessor_data,
  input  logic [TAG_W-1:0] srcndbtrace2_data,
  input  logic             popsourceinv,
  input  logic             gnselect2,
  input  logic             sela,
  input  logic             selb,
  input  logic             morepredmux7,
  input  logic             gndmux9,
  input  logic             newword9,
  output logic [TAG_W-1:0] btrace11_out,
  output logic [TAG_W-1:0] gnbtrace11_out,
  input  logic             scaninudp,
  output logic             scanoutudp,
  input  logic             scaninbdpup,
  output logic             scanoutbdpup,
  input  logic             scaninbdplo,
  output logic             scanoutbdplo
);

  logic load, shift;
  logic [TAG_W-1:0] firstbtrace_data, seconbtrace_data, thirdbtrace_data;

  scan_clkdrv u_clkdrv (.stall, .scantest, .load, .shift);

  upperdp u_upperdp (
    .clk, .load, .shift,
    .startcounter(newframe),
    .stbtrace_data, .predecessor_data,
    .firstbtrace_data, .seconbtrace_data, .thirdbtrace_data,
    .scanin(scaninudp), .scanout(scanoutudp));

  btracedp u_btracedp (
    .clk, .load, .shift,
    .srcndbtrace2_data,
    .firstbtrace2_out(firstbtrace_data),
    .seconbtrace2_out(seconbtrace_data),
    .thirdbtrace2_out(thirdbtrace_data),
    .popsourceinv, .gnselect2, .sela, .selb, .morepredmux7, .gndmux9, .newword9,
    .btrace11_out, .gnbtrace11_out,
    .scanin_up(scaninbdpup), .scanout_up(scanoutbdpup),
    .scanin_lo(scaninbdplo), .scanout_lo(scanoutbdplo));

endmodule
