// tb_realtime_frame: the real-time workload. One vocabulary of 3000 words of
// 14 to 19 states (about 50,000 states) is run for two frames at the default
// parameters, with the source FIFO kept supplied and no refresh, as in
// steady real-time operation. Besides all the per-state and per-word checks
// of tb_wordproc_env, the frame must take at most one clock per state plus a
// fixed overhead of 20 cycles, and at the 5 MHz system clock the frame must
// fit in the 10 ms frame period when the vocabulary has 50,000 states.
module tb_realtime_frame;
  int checks, failures, max_frame_cycles, states;
  bit done;
  int extra;

  tb_wordproc_env #(.FRAMES(2), .NWORDS(3000), .MINLEN(14), .MAXLEN(19), .STRESS(1'b0)) env (
    .checks, .failures, .max_frame_cycles, .states, .done);

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    extra = 0;
    if (max_frame_cycles > states + 20) begin
      extra++; $display("frame took %0d cycles for %0d states", max_frame_cycles, states);
    end
    // 50,000 states at one per 200 ns clock must fit in 10 ms
    if ((50000 + (max_frame_cycles - states)) * 200 > 10_000_000 + 20 * 200) begin
      extra++; $display("50,000-state frame would not fit in 10 ms");
    end
    $display("states=%0d frame_cycles=%0d time_at_5MHz=%0d ns", states, max_frame_cycles, max_frame_cycles * 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 2, failures + extra);
    $finish;
  end
endmodule
