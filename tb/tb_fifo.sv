// tb_fifo: checks the FIFO at its 64 x 32 default against a queue model:
// fill to full (pushes refused), drain to empty (pops ignored), then random
// traffic with simultaneous push and pop, checking data order, flags and the
// almost-full level.
module tb_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  logic reset, push, pop, empty, full, af;
  logic [31:0] wdata, rdata;
  logic [6:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  fifo dut (.clk, .reset, .push, .wdata, .pop, .rdata, .empty, .full, .almost_full(af), .count);
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic cyc(bit pu, bit po);
    push = pu; pop = po; wdata = $urandom;
    #1;
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == 64) || af !== (q.size() >= 56) ||
        int'(count) != q.size()) begin
      failures++; $display("flags wrong at size %0d", q.size());
    end
    if (q.size() > 0) begin
      checks++;
      if (rdata !== q[0]) begin failures++; $display("data %h expected %h", rdata, q[0]); end
    end
    if (full) n_full++;
    if (empty) n_empty++;
    @(posedge clk);
    begin
      bit dopop, dopush;
      dopop = po && q.size() > 0;
      dopush = pu && (q.size() < 64 || dopop);
      if (dopop) void'(q.pop_front());
      if (dopush) q.push_back(wdata);
    end
    #1;
  endtask
  initial begin
    reset = 1; push = 0; pop = 0; @(posedge clk); #1; reset = 0;
    repeat (70) cyc(1, 0);
    cyc(1, 1);
    repeat (70) cyc(0, 1);
    repeat (5000) cyc(1'($urandom_range(0, 9) < 6), 1'($urandom_range(0, 9) < 5));
    repeat (5000) cyc(1'($urandom_range(0, 9) < 4), 1'($urandom_range(0, 9) < 5));
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
