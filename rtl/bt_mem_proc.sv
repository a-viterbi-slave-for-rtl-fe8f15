// bt_mem_proc: backtrace memory processor.
//
// Decides which finished words are worth remembering for the backtrace at the
// end of the sentence, and numbers them. Probabilities are handled as costs
// (negative log probabilities): a smaller number is a more likely
// hypothesis, the encoding in which all-ones means "very unlikely".
//
//  * Beam threshold: during a frame the unit keeps the best (smallest) of the
//    per-word best state costs `wordmin_data`. At each `newframe` that value
//    becomes the previous-frame best, and the threshold for the new frame is
//    previous-frame best + `offset` (saturating at all ones). This is the
//    log-domain form of subtracting an offset from the best frame probability.
//  * At each word end (`newword` high for one cycle) the word is stored when
//    its destination grammarnode cost `gnprob` is not above the threshold and
//    the backtrace FIFO is not full: `wsenable` and `btwritestrobe` go high,
//    `btaddr` is the location it is stored at and `btdata` holds the word ID
//    and cost. A word that passes but finds the FIFO full raises `btmemoflow`.
//  * Tags: `btaddr` counts stored words since `newsentence`.
//  * Word IDs: count words since `newframe` (the vocabulary is processed in
//    the same order every frame).
//
// Timing: `wsenable`, `btaddr` and `btdata` are combinational in the cycle of
// `newword`; counters and the frame best update on its rising edge.
// Synchronous active-high reset.
module bt_mem_proc
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                newsentence,
  input  logic                newframe,
  input  logic [15:0]         offset,        // uPbus_data
  input  logic                newword,
  input  logic [PROB_W-1:0]   gnprob,
  input  logic [PROB_W-1:0]   wordmin_data,
  input  logic                btfifo_full,
  output logic                wsenable,
  output logic                btwritestrobe,
  output logic [TAG_W-1:0]    btaddr,
  output logic [WORDID_W+PROB_W-1:0] btdata,
  output logic                btmemoflow,
  output logic [PROB_W-1:0]   threshold
);

  logic [PROB_W-1:0]   cur_best, prev_best;
  logic [WORDID_W-1:0] wordid;
  logic [16:0]         thr_sum;

  always_comb begin
    thr_sum   = 17'(prev_best) + 17'(offset);
    threshold = (thr_sum > 17'((1 << PROB_W) - 1)) ? '1 : thr_sum[PROB_W-1:0];
    wsenable  = newword && (gnprob <= threshold);
    btwritestrobe = wsenable && !btfifo_full;
    btdata    = {gnprob, wordid};
  end

  always_ff @(posedge clk) begin
    if (reset || newsentence) begin
      cur_best   <= '1;
      prev_best  <= '1;
      wordid     <= '0;
      btaddr     <= '0;
      btmemoflow <= 1'b0;
    end else begin
      if (newframe) begin
        prev_best <= cur_best;
        cur_best  <= '1;
        wordid    <= '0;
      end else if (newword) begin
        if (wordmin_data < cur_best) cur_best <= wordmin_data;
        wordid <= wordid + WORDID_W'(1);
      end
      if (btwritestrobe) btaddr <= btaddr + TAG_W'(1);
      if (wsenable && btfifo_full) btmemoflow <= 1'b1;
    end
  end

endmodule
