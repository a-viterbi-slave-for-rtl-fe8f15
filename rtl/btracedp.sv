// btracedp: backtrace datapath of the backtrace processor.
//
// Chooses, state by state, the backtrace tag of the most likely predecessor,
// following decisions made by the Viterbi processor, and keeps the best tag
// for the word's destination grammarnode. It is an 18-bit, eleven-stage
// pipeline of eighteen scan registers and seven 2:1 multiplexers (predmux
// counts as two), split as on the chip into an upper and a lower half with a
// scan chain each.
//
// Upper half (chain BDPUP):
//   MUX1/srcndbtrace_reg2 : loads the source grammarnode tag srcndbtrace2_data
//                           while popsourceinv is low, otherwise recirculates
//                           (a static register loaded once per word).
//   MUX2                  : first predecessor path takes the source tag
//                           instead of RAM output when gnselect2 is high.
//   *btrace_reg3..5       : three 3-deep delay lines for the three candidates.
// Lower half (chain BDPLO):
//   predmux -> btrace_reg6: {selb,sela} = 00 first, 01 second, 1x third.
//   btrace_reg7
//   bestmux -> btrace_reg8: morepredmux7 high keeps btrace_reg8 (the best tag
//                           of the earlier predecessor group of this state).
//   btrace_reg9
//   btrace_reg10, btrace_reg11 -> btrace11_out: tag written back with the state.
//   gndmux -> gnbtrace_reg10: gndmux9 high takes btrace_reg9 (new best
//                           predecessor of the destination grammarnode).
//   newmux -> gnbtrace_reg11 -> gnbtrace11_out: newword9 high copies
//                           gnbtrace_reg10, which then holds for the next word.
//
// Timing: all registers load together on a loaded edge (`load`) and shift on a
// scan edge (`shift`); each select input is used combinationally in the cycle
// in which its mux feeds the next register. A candidate leaving the RAMs in
// cycle k reaches btrace11_out after eight more loaded edges.
module btracedp
  import bt_pkg::*;
(
  input  logic             clk,
  input  logic             load,
  input  logic             shift,
  input  logic [TAG_W-1:0] srcndbtrace2_data,
  input  logic [TAG_W-1:0] firstbtrace2_out,
  input  logic [TAG_W-1:0] seconbtrace2_out,
  input  logic [TAG_W-1:0] thirdbtrace2_out,
  input  logic             popsourceinv,
  input  logic             gnselect2,
  input  logic             sela,
  input  logic             selb,
  input  logic             morepredmux7,
  input  logic             gndmux9,
  input  logic             newword9,
  output logic [TAG_W-1:0] btrace11_out,
  output logic [TAG_W-1:0] gnbtrace11_out,
  input  logic             scanin_up,
  output logic             scanout_up,
  input  logic             scanin_lo,
  output logic             scanout_lo
);

  logic [TAG_W-1:0] srcnd2, first3, first4, first5, secon3, secon4, secon5;
  logic [TAG_W-1:0] third3, third4, third5;
  logic [TAG_W-1:0] bt6, bt7, bt8, bt9, bt10, gn10;
  logic [TAG_W-1:0] mux1, mux2, predmux, bestmux, gndmux, newmux;
  logic [9:0]       su;  // upper chain links
  logic [7:0]       sl;  // lower chain links

  always_comb begin
    mux1    = popsourceinv ? srcnd2 : srcndbtrace2_data;
    mux2    = gnselect2 ? srcnd2 : firstbtrace2_out;
    predmux = selb ? third5 : (sela ? secon5 : first5);
    bestmux = morepredmux7 ? bt8 : bt7;
    gndmux  = gndmux9 ? bt9 : gn10;
    newmux  = newword9 ? gn10 : gnbtrace11_out;
  end

  // ---- btracedpupper, chain order as on the chip ----
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_srcndbtrace_reg2 (
    .clk, .load, .shift, .d(mux1), .q(srcnd2), .si(scanin_up), .so(su[0]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_firstbtrace_reg3 (
    .clk, .load, .shift, .d(mux2), .q(first3), .si(su[0]), .so(su[1]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_firstbtrace_reg4 (
    .clk, .load, .shift, .d(first3), .q(first4), .si(su[1]), .so(su[2]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_firstbtrace_reg5 (
    .clk, .load, .shift, .d(first4), .q(first5), .si(su[2]), .so(su[3]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_seconbtrace_reg3 (
    .clk, .load, .shift, .d(seconbtrace2_out), .q(secon3), .si(su[3]), .so(su[4]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_seconbtrace_reg4 (
    .clk, .load, .shift, .d(secon3), .q(secon4), .si(su[4]), .so(su[5]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_seconbtrace_reg5 (
    .clk, .load, .shift, .d(secon4), .q(secon5), .si(su[5]), .so(su[6]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_thirdbtrace_reg3 (
    .clk, .load, .shift, .d(thirdbtrace2_out), .q(third3), .si(su[6]), .so(su[7]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_thirdbtrace_reg4 (
    .clk, .load, .shift, .d(third3), .q(third4), .si(su[7]), .so(su[8]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_thirdbtrace_reg5 (
    .clk, .load, .shift, .d(third4), .q(third5), .si(su[8]), .so(su[9]));
  assign scanout_up = su[9];

  // ---- btracedplower, chain order as on the chip ----
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_btrace_reg6 (
    .clk, .load, .shift, .d(predmux), .q(bt6), .si(scanin_lo), .so(sl[0]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_btrace_reg7 (
    .clk, .load, .shift, .d(bt6), .q(bt7), .si(sl[0]), .so(sl[1]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_btrace_reg8 (
    .clk, .load, .shift, .d(bestmux), .q(bt8), .si(sl[1]), .so(sl[2]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_btrace_reg9 (
    .clk, .load, .shift, .d(bt8), .q(bt9), .si(sl[2]), .so(sl[3]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_gnbtrace_reg10 (
    .clk, .load, .shift, .d(gndmux), .q(gn10), .si(sl[3]), .so(sl[4]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_gnbtrace_reg11 (
    .clk, .load, .shift, .d(newmux), .q(gnbtrace11_out), .si(sl[4]), .so(sl[5]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b0)) u_btrace_reg10 (
    .clk, .load, .shift, .d(bt9), .q(bt10), .si(sl[5]), .so(sl[6]));
  scan_reg #(.W(TAG_W), .LSB_FIRST(1'b1)) u_btrace_reg11 (
    .clk, .load, .shift, .d(bt10), .q(btrace11_out), .si(sl[6]), .so(sl[7]));
  assign scanout_lo = sl[7];

endmodule
