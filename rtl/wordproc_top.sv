// wordproc_top: the wordprocessing subsystem of the speech recognizer.
//
// Every 10 ms frame the subsystem runs the Viterbi recursion over all HMM
// states of the vocabulary, word by word, in state-address order. This module
// holds the digital logic of the subsystem around the Viterbi processor's
// probability datapath:
//   * viterbi_fsm          frame/word sequencing, FIFO handshakes, stalls
//   * addcounter           state address for all state-indexed memories
//   * backtrace_processor  per-state backtrace tag selection (the slave chip)
//   * source FIFO (64x32)  source grammarnode cost + tag from the grammar side
//   * backtrace FIFOs      64x18 (tag) and 64x26 (word ID, cost) side by side
//   * bt_mem_proc          beam threshold and numbering of stored words
//   * dgn, btag_mux        grammarnode decoder and tag selector
//   * outmem_addr          output memory bank addressing and adder
//
// Not inside: the DRAM memories (output lookup, output, topology and the two
// state probability banks), the Viterbi processor's probability datapath and
// the destination FIFO of the grammar subsystem. Their signals are ports:
// `addr` drives the memories, their read data come back combinationally in
// the same cycle, and the per-state decisions of the probability datapath
// (sela, selb, morepredmux7, gndmux9, newword9, gnselect2) and its
// per-word results (gnprob11, wordmin11) are inputs.
//
// Timing: one clock (5 MHz in the original system). A word's destination
// grammarnode value is pushed in the FSM's push states; in that cycle the
// backtrace memory processor evaluates the word and the tag selector forms
// the tag sent with it. Synchronous active-high reset for the FSM, counters
// and FIFOs; the backtrace processor, like the chip, has no reset.
module wordproc_top
  import bt_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  // microprocessor / system control
  input  logic                 startframe,
  input  logic                 memorystall,
  input  logic                 newsentence,
  input  logic [15:0]          offset,
  input  logic                 outmem_mode,
  // state-indexed memories
  output logic [SADDR_W-1:0]   addr,
  input  topo_word_t           topo,
  input  stprob_word_t         stprob_prev,   // state probability memory, t-1
  output logic [TAG_W-1:0]     btrace11,      // tag written to memory t
  input  logic [15:0]          lookup,
  input  logic [7:0]           feature   [4],
  output logic [20:0]          outmem_addr_o [4],
  input  logic [7:0]           outmem_data   [4],
  // to / from the Viterbi processor's probability datapath
  output logic [7:0]           outprob2,
  output logic                 dgnenable,
  output logic [PROB_W-1:0]    srcndprob2,
  output logic                 stall,
  output logic [3:0]           fsm_state,
  input  logic                 gnselect2,
  input  logic                 sela,
  input  logic                 selb,
  input  logic                 morepredmux7,
  input  logic                 gndmux9,
  input  logic                 newword9,
  input  logic [PROB_W-1:0]    gnprob11,
  input  logic [PROB_W-1:0]    wordmin11,
  // source FIFO, written by the grammar subsystem
  input  logic                 src_push,
  input  stprob_word_t         src_wdata,
  output logic                 src_full,
  // destination FIFO of the grammar subsystem
  output logic                 dest_push,
  output stprob_word_t         dest_wdata,
  input  logic                 dest_full,
  // backtrace FIFO, read by the host
  input  logic                 bt_pop,
  output bt_entry_t            bt_rdata,
  output logic                 bt_empty,
  output logic                 bt_almost_full,
  output logic                 btmemoflow,
  output logic [PROB_W-1:0]    threshold,     // current beam threshold
  // backtrace processor scan chains
  input  logic                 scantest,
  input  logic                 scaninudp,
  output logic                 scanoutudp,
  input  logic                 scaninbdpup,
  output logic                 scanoutbdpup,
  input  logic                 scaninbdplo,
  output logic                 scanoutbdplo
);

  logic         startcounter, newframe, popsourceinv, pushdest, endframe;
  logic         src_empty;
  stprob_word_t src_rdata;
  logic [TAG_W-1:0] gnbtrace11, btaddr, dest_tag;
  logic         wsenable, btwritestrobe;
  logic [WORDID_W+PROB_W-1:0] btdata;
  logic         bt1_full, bt2_full, bt1_empty, bt2_empty, bt1_af, bt2_af;
  // status outputs of the FIFOs and the counter that this top does not use
  logic         running;
  logic [6:0]   bt1_count, bt2_count;
  logic [6:0]   src_count;
  logic         src_af;

  viterbi_fsm u_fsm (
    .clk, .reset, .startframe,
    .eow(topo.eow), .eof(topo.eof),
    .empty(src_empty), .full(dest_full), .memorystall,
    .startcounter, .newframe, .stall, .popsourceinv, .pushdest, .endframe,
    .state_o(fsm_state));

  addcounter #(.AW(SADDR_W)) u_addcounter (
    .clk, .reset(reset || endframe), .startcount(newframe), .stall,
    .addr, .running);

  fifo #(.DEPTH(64), .WIDTH(32)) u_source_fifo (
    .clk, .reset, .push(src_push), .wdata(src_wdata), .pop(!popsourceinv),
    .rdata(src_rdata), .empty(src_empty), .full(src_full), .almost_full(src_af),
    .count(src_count));

  assign srcndprob2 = src_rdata.prob;

  backtrace_processor u_btp (
    .clk, .stall, .scantest,
    .newframe(startcounter),
    .stbtrace_data(stprob_prev.tag),
    .predecessor_data({topo.pos1, topo.pos2, topo.pos3}),
    .srcndbtrace2_data(src_rdata.tag),
    .popsourceinv, .gnselect2, .sela, .selb, .morepredmux7, .gndmux9, .newword9,
    .btrace11_out(btrace11), .gnbtrace11_out(gnbtrace11),
    .scaninudp, .scanoutudp, .scaninbdpup, .scanoutbdpup, .scaninbdplo, .scanoutbdplo);

  dgn u_dgn (.gn_transprob(topo.gntprob), .dgnenable);

  outmem_addr u_outmem (
    .mode(outmem_mode), .lookup, .feature, .bank_addr(outmem_addr_o),
    .bank_data(outmem_data), .outprob(outprob2));

  bt_mem_proc u_bmp (
    .clk, .reset, .newsentence, .newframe(newframe && !memorystall), .offset,
    .newword(pushdest), .gnprob(gnprob11), .wordmin_data(wordmin11),
    .btfifo_full(bt1_full || bt2_full),
    .wsenable, .btwritestrobe, .btaddr, .btdata, .btmemoflow, .threshold);

  btag_mux u_mux (.store(wsenable), .btaddr, .gnbtrace11, .tag(dest_tag));

  assign dest_push  = pushdest;
  assign dest_wdata = '{tag: dest_tag, prob: gnprob11};

  // backtrace FIFO 1: the 18-bit tag of the best predecessor word
  fifo #(.DEPTH(64), .WIDTH(TAG_W)) u_btfifo1 (
    .clk, .reset, .push(btwritestrobe), .wdata(gnbtrace11), .pop(bt_pop),
    .rdata(bt_rdata.tag), .empty(bt1_empty), .full(bt1_full), .almost_full(bt1_af),
    .count(bt1_count));

  // backtrace FIFO 2: word ID and destination grammarnode cost
  fifo #(.DEPTH(64), .WIDTH(WORDID_W+PROB_W)) u_btfifo2 (
    .clk, .reset, .push(btwritestrobe), .wdata(btdata), .pop(bt_pop),
    .rdata({bt_rdata.gnprob, bt_rdata.wordid}), .empty(bt2_empty), .full(bt2_full),
    .almost_full(bt2_af), .count(bt2_count));

  assign bt_empty       = bt1_empty || bt2_empty;
  assign bt_almost_full = bt1_af || bt2_af;

endmodule
