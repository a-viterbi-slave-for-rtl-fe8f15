// bt_pkg: widths and record layouts shared by the backtrace processor and the
// wordprocessing subsystem around it.
//
// Numbers that the design description states are marked as such; the rest are
// this design's choices. A backtrace tag is 18 bits and the tag RAM holds 16
// words (stated). State probabilities are 14 bits, the state address 18 bits
// (256K states) and a topology word 48 bits (stated). The word ID width (12)
// is chosen so that the 18-bit tag, the word ID and the 14-bit probability fill
// the 44 used bits of the backtrace FIFO.
package bt_pkg;

  localparam int unsigned TAG_W    = 18;  // backtrace tag (stated)
  localparam int unsigned RADDR_W  = 4;   // tag RAM address, 16 words (stated)
  localparam int unsigned OFF_W    = 4;   // relative predecessor position (stated, bits 43-32 as 3x4)
  localparam int unsigned PROB_W   = 14;  // state / grammarnode probability (stated)
  localparam int unsigned TPROB_W  = 8;   // transition probability (stated)
  localparam int unsigned SADDR_W  = 18;  // state address, 256K states (stated)
  localparam int unsigned TOPO_W   = 48;  // topology memory word (stated)
  localparam int unsigned WORDID_W = 12;  // word ID in the backtrace FIFO (chosen, see README)

  // Topology memory word, bit positions as stated:
  //  7-0 gn transition prob, 15-8 / 23-16 / 31-24 predecessor transition probs,
  //  35-32 / 39-36 / 43-40 relative predecessor positions, 44 eow, 45 eof,
  //  46 a predecessor is the source grammarnode, 47 more predecessors follow.
  typedef struct packed {
    logic               morepred;   // bit 47
    logic               gnsource;   // bit 46
    logic               eof;        // bit 45
    logic               eow;        // bit 44
    logic [OFF_W-1:0]   pos1;       // bits 43-40, first predecessor
    logic [OFF_W-1:0]   pos2;       // bits 39-36, second predecessor
    logic [OFF_W-1:0]   pos3;       // bits 35-32, third predecessor
    logic [TPROB_W-1:0] tprob1;     // bits 31-24
    logic [TPROB_W-1:0] tprob2;     // bits 23-16
    logic [TPROB_W-1:0] tprob3;     // bits 15-8
    logic [TPROB_W-1:0] gntprob;    // bits 7-0
  } topo_word_t;

  // State probability memory word: 14-bit probability in the low bits and the
  // 18-bit backtrace tag above it.
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [PROB_W-1:0] prob;
  } stprob_word_t;

  // Backtrace FIFO entry, 44 used bits: tag in the low 18 bits, then word ID,
  // then the destination grammarnode probability.
  typedef struct packed {
    logic [PROB_W-1:0]   gnprob;
    logic [WORDID_W-1:0] wordid;
    logic [TAG_W-1:0]    tag;
  } bt_entry_t;

endpackage
