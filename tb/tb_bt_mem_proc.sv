// tb_bt_mem_proc: checks the backtrace memory processor over several frames
// of random words. The testbench keeps its own frame best, threshold, word
// counter and tag counter, and checks for every word end whether it is
// stored, with which tag and word ID, and that a full FIFO raises the
// overflow flag instead of storing.
module tb_bt_mem_proc;
  logic clk = 0;
  always #5 clk = ~clk;
  logic reset, newsentence, newframe, newword, full;
  logic [15:0] offset;
  logic [13:0] gnprob, wordmin, threshold;
  logic wsenable, btwritestrobe, btmemoflow;
  logic [17:0] btaddr;
  logic [25:0] btdata;
  int checks = 0, failures = 0, n_store = 0, n_reject = 0, n_oflow = 0;

  bt_mem_proc dut (.clk, .reset, .newsentence, .newframe, .offset, .newword, .gnprob,
    .wordmin_data(wordmin), .btfifo_full(full), .wsenable, .btwritestrobe, .btaddr, .btdata,
    .btmemoflow, .threshold);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask

  initial begin
    int prev_best = 16383, cur_best = 16383, tag = 0, wid = 0, thr;
    bit oflow = 0;
    reset = 1; newsentence = 0; newframe = 0; newword = 0; full = 0; offset = 0;
    gnprob = 0; wordmin = 0;
    @(posedge clk); #1; reset = 0;
    for (int f = 0; f < 30; f++) begin
      offset = 16'($urandom_range(0, 3000));
      newframe = 1; @(posedge clk); #1; newframe = 0;
      prev_best = cur_best; cur_best = 16383; wid = 0;
      repeat ($urandom_range(5, 40)) begin
        wordmin = 14'($urandom_range(0, 16383));
        gnprob  = 14'(((int'(wordmin) + $urandom_range(0, 4000)) > 16383) ? 16383 : int'(wordmin) + $urandom_range(0, 4000));
        full = ($urandom_range(0, 19) == 0);
        newword = 1;
        #1;
        thr = prev_best + int'(offset); if (thr > 16383) thr = 16383;
        chk(int'(threshold) == thr, "threshold wrong");
        chk(wsenable == (int'(gnprob) <= thr), "store decision wrong");
        chk(btwritestrobe == (int'(gnprob) <= thr && !full), "write strobe wrong");
        chk(int'(btaddr) == tag, "tag wrong");
        chk(btdata == {gnprob, 12'(wid)}, "btdata wrong");
        if (int'(gnprob) <= thr) begin
          if (full) begin oflow = 1; n_oflow++; end else begin tag++; n_store++; end
        end else n_reject++;
        if (int'(wordmin) < cur_best) cur_best = int'(wordmin);
        wid++;
        @(posedge clk); #1;
        newword = 0;
        chk(btmemoflow == oflow, "overflow flag wrong");
        @(posedge clk); #1;
      end
    end
    newsentence = 1; @(posedge clk); #1; newsentence = 0;
    chk(btaddr == 0 && !btmemoflow && threshold == 14'h3FFF, "new sentence does not clear");
    chk(n_store > 0 && n_reject > 0 && n_oflow > 0, "store/reject/overflow not all exercised");
    $display("stored=%0d rejected=%0d overflow=%0d", n_store, n_reject, n_oflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
