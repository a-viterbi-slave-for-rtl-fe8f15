// tb_viterbi_fsm: checks the Viterbi processor's state machine.
// Part 1 walks one frame of two words with a FIFO that is empty and full at
// chosen moments and compares the visited state numbers with the sequence
// read off the state diagram. Part 2 drives random inputs for many cycles
// and compares state and outputs with a transition list written as data
// (from-state, condition, to-state), and requires every state to be visited.
module tb_viterbi_fsm;
  logic clk = 0;
  always #5 clk = ~clk;
  logic reset, startframe, eow, eof, empty, full, memorystall;
  logic startcounter, newframe, stall, popsourceinv, pushdest, endframe;
  logic [3:0] st;
  int checks = 0, failures = 0;
  int visits [16];

  viterbi_fsm dut (.clk, .reset, .startframe, .eow, .eof, .empty, .full, .memorystall,
    .startcounter, .newframe, .stall, .popsourceinv, .pushdest, .endframe, .state_o(st));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // condition codes: 0 always, 1 startframe, 2 eow, 3 eof, 4 empty, 5 !empty, 6 full, 7 !full,
  // 8 !startframe, 9 !eow & !eof
  typedef struct { int from; int cond; int to; } tr_t;
  tr_t trs [] = '{
    '{0,1,1}, '{0,8,0}, '{1,0,14}, '{14,2,15}, '{14,0,14}, '{15,4,2}, '{15,5,3},
    '{2,4,2}, '{2,5,3}, '{3,0,4}, '{4,3,11}, '{4,2,5}, '{4,9,4}, '{5,4,6}, '{5,5,7},
    '{6,4,6}, '{6,5,7}, '{7,0,8}, '{8,6,9}, '{8,7,10}, '{9,6,9}, '{9,7,10}, '{10,0,4},
    '{11,6,12}, '{11,7,13}, '{12,6,12}, '{12,7,13}, '{13,0,0}
  };

  function automatic bit cond(int c);
    case (c)
      0: return 1; 1: return startframe; 2: return eow; 3: return eof; 4: return empty;
      5: return !empty; 6: return full; 7: return !full; 8: return !startframe;
      9: return !eow && !eof; default: return 0;
    endcase
  endfunction

  function automatic int next_of(int s);
    foreach (trs[i]) if (trs[i].from == s && cond(trs[i].cond)) return trs[i].to;
    return -1;
  endfunction

  task automatic step(logic sf, logic w, logic f, logic em, logic fu);
    startframe = sf; eow = w; eof = f; empty = em; full = fu;
    @(posedge clk); #1;
  endtask

  task automatic expect_state(int s);
    checks++;
    if (st != 4'(s)) begin failures++; $display("state %0d expected %0d", st, s); end
  endtask

  initial begin
    int model;
    memorystall = 0;
    reset = 1; step(0, 0, 0, 1, 0); reset = 0;
    expect_state(0);
    // one frame: startframe, wait for eow, empty source FIFO once, two words
    step(1, 0, 0, 1, 0); expect_state(1);
    checks++; if (!startcounter) begin failures++; $display("startcounter missing"); end
    step(0, 0, 0, 1, 0); expect_state(14);
    step(0, 0, 0, 1, 0); expect_state(14);
    step(0, 1, 0, 1, 0); expect_state(15);
    checks++; if (!newframe) begin failures++; $display("newframe missing"); end
    step(0, 0, 0, 1, 0); expect_state(2);
    checks++; if (!stall) begin failures++; $display("stall missing in 2"); end
    step(0, 0, 0, 0, 0); expect_state(3);
    checks++; if (popsourceinv) begin failures++; $display("pop missing in 3"); end
    step(0, 0, 0, 0, 0); expect_state(4);
    step(0, 0, 0, 0, 0); expect_state(4);
    step(0, 1, 0, 0, 0); expect_state(5);
    step(0, 0, 0, 1, 0); expect_state(6);
    step(0, 0, 0, 0, 0); expect_state(7);
    step(0, 0, 0, 0, 1); expect_state(8);
    step(0, 0, 0, 0, 1); expect_state(9);
    step(0, 0, 0, 0, 0); expect_state(10);
    checks++; if (!pushdest) begin failures++; $display("push missing in 10"); end
    step(0, 0, 0, 0, 0); expect_state(4);
    step(0, 1, 1, 0, 1); expect_state(11);
    checks++; if (!endframe) begin failures++; $display("endframe missing"); end
    step(0, 0, 0, 0, 1); expect_state(12);
    step(0, 0, 0, 0, 0); expect_state(13);
    step(0, 0, 0, 0, 0); expect_state(0);
    // a refresh stall freezes the machine and suppresses the pop
    step(1, 0, 0, 0, 0); step(0, 0, 0, 0, 0); step(0, 1, 0, 0, 0); step(0, 0, 0, 0, 0);
    expect_state(3);
    memorystall = 1; #1;
    checks++; if (!popsourceinv || !stall) begin failures++; $display("memorystall gating wrong"); end
    step(0, 0, 0, 0, 0); expect_state(3);
    memorystall = 0;
    // random walk against the transition list
    model = st;
    repeat (20000) begin
      logic sf, w, f, em, fu, ms;
      sf = ($urandom_range(0, 3) == 0); w = ($urandom_range(0, 3) == 0);
      f = w && ($urandom_range(0, 3) == 0); em = ($urandom_range(0, 2) == 0);
      fu = ($urandom_range(0, 2) == 0); ms = ($urandom_range(0, 9) == 0);
      startframe = sf; eow = w; eof = f; empty = em; full = fu; memorystall = ms;
      #1;
      checks++;
      if (stall !== (ms || model == 2 || model == 6 || model == 9) ||
          popsourceinv !== !((model == 3 || model == 7) && !ms) ||
          pushdest !== ((model == 10 || model == 13) && !ms) ||
          startcounter !== (model == 1) || newframe !== (model == 15)) begin
        failures++; $display("outputs wrong in state %0d", model);
      end
      if (!ms) model = next_of(model);
      @(posedge clk); #1;
      visits[st]++;
      checks++;
      if (st != 4'(model)) begin failures++; $display("random: state %0d expected %0d", st, model); model = st; end
    end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
