// viterbi_fsm: the frame/word sequencer of the Viterbi processor.
//
// This finite state machine drives the whole wordprocessing subsystem. Per
// frame it waits for `startframe`, pulses `startcounter` (clearing counters on
// the custom chips), waits for the first end-of-word marker, starts the state
// address counter (`newframe`), pops the first source grammarnode value from
// the source FIFO and then processes the words of the vocabulary one after
// another. At each word end it pops the next word's source grammarnode value
// and pushes the finished word's destination grammarnode value into the
// destination FIFO; at the end of the frame it pushes the last word's value
// and returns to idle. An empty source FIFO or a full destination FIFO stalls
// the subsystem (`stall`) in the states the diagram marks as stall states
// (2, 6, 9); state 12 waits without stalling, as drawn. A DRAM refresh
// (`memorystall`) freezes the machine, raises `stall` and suppresses the
// pop and push strobes so that a frozen pop or push state acts only once.
//
// States carry the numbers of the original state diagram:
//   0 idle, 1 startcounter, 14 wait for eow, 15 newframe, 2 stall on empty,
//   3 pop, 4 process word, 5 word end / check source FIFO, 6 stall on empty,
//   7 pop, 8 check destination FIFO, 9 stall on full, 10 push,
//   11 end of frame / check destination FIFO, 12 stall on full, 13 push.
// Outputs are decoded from the state (Moore). popsourceinv is active low.
// In state 4 `eof` has priority over `eow` (the last word of a frame carries
// both); this priority is this design's choice.
//
// Timing: one transition per rising clock edge; synchronous active-high reset
// to state 0.
module viterbi_fsm (
  input  logic clk,
  input  logic reset,
  input  logic startframe,
  input  logic eow,          // end of word, from the topology memory
  input  logic eof,          // end of frame, from the topology memory
  input  logic empty,        // source FIFO empty
  input  logic full,         // destination FIFO full
  input  logic memorystall,  // DRAM refresh: freeze the machine and stall
  output logic startcounter,
  output logic newframe,
  output logic stall,
  output logic popsourceinv, // low: pop the source FIFO
  output logic pushdest,     // push the destination FIFO
  output logic endframe,     // state 11: the frame's last word has ended
  output logic [3:0] state_o
);

  typedef enum logic [3:0] {
    S_IDLE     = 4'd0,
    S_STARTCNT = 4'd1,
    S_STALL0   = 4'd2,
    S_POP0     = 4'd3,
    S_PROCESS  = 4'd4,
    S_WORDEND  = 4'd5,
    S_STALLS   = 4'd6,
    S_POP      = 4'd7,
    S_DCHECK   = 4'd8,
    S_STALLD   = 4'd9,
    S_PUSH     = 4'd10,
    S_FCHECK   = 4'd11,
    S_STALLF   = 4'd12,
    S_PUSHF    = 4'd13,
    S_WAITEOW  = 4'd14,
    S_NEWFRAME = 4'd15
  } state_t;

  state_t state, next;

  always_ff @(posedge clk) begin
    if (reset)             state <= S_IDLE;
    else if (!memorystall) state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE:     if (startframe) next = S_STARTCNT;
      S_STARTCNT: next = S_WAITEOW;
      S_WAITEOW:  if (eow) next = S_NEWFRAME;
      S_NEWFRAME: next = empty ? S_STALL0 : S_POP0;
      S_STALL0:   if (!empty) next = S_POP0;
      S_POP0:     next = S_PROCESS;
      S_PROCESS:  if (eof) next = S_FCHECK;
                  else if (eow) next = S_WORDEND;
      S_WORDEND:  next = empty ? S_STALLS : S_POP;
      S_STALLS:   if (!empty) next = S_POP;
      S_POP:      next = S_DCHECK;
      S_DCHECK:   next = full ? S_STALLD : S_PUSH;
      S_STALLD:   if (!full) next = S_PUSH;
      S_PUSH:     next = S_PROCESS;
      S_FCHECK:   next = full ? S_STALLF : S_PUSHF;
      S_STALLF:   if (!full) next = S_PUSHF;
      S_PUSHF:    next = S_IDLE;
      default:    next = S_IDLE;
    endcase
  end

  always_comb begin
    startcounter = (state == S_STARTCNT);
    newframe     = (state == S_NEWFRAME);
    stall        = memorystall || (state == S_STALL0) || (state == S_STALLS) ||
                   (state == S_STALLD);
    popsourceinv = !(((state == S_POP0) || (state == S_POP)) && !memorystall);
    pushdest     = ((state == S_PUSH) || (state == S_PUSHF)) && !memorystall;
    endframe     = (state == S_FCHECK);
    state_o      = state;
  end

endmodule
