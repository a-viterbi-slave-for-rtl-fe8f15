// tb_wordproc_top: end-to-end test of the wordprocessing subsystem at its
// default parameters: twelve frames of an eight-word vocabulary (words of 7 to
// 12 states) with late source values, a destination FIFO that is often full
// and random DRAM refresh stalls, run in tb_wordproc_env. Every state's
// backtrace tag, every word push and every backtrace FIFO entry is checked,
// and every mechanism (both FIFO waits, refresh stalls, extra predecessor
// groups, source grammarnode predecessors, stored and rejected words, the
// almost-full backtrace FIFO, both output memory modes) must occur.
module tb_wordproc_top;
  int checks, failures, max_frame_cycles, states;
  bit done;

  tb_wordproc_env #(.FRAMES(12), .NWORDS(8), .MINLEN(7), .MAXLEN(12), .STRESS(1'b1)) env (
    .checks, .failures, .max_frame_cycles, .states, .done);

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
