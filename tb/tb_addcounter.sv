// tb_addcounter: checks the state address counter: idle after reset, counts
// from the cycle startcount is high, holds while stalled, wraps at 2^18 and
// clears on reset. The expected address is kept by the testbench.
module tb_addcounter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic reset, startcount, stall, running;
  logic [17:0] addr;
  int checks = 0, failures = 0;
  addcounter dut (.clk, .reset, .startcount, .stall, .addr, .running);
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(int exp, string what);
    checks++;
    if (int'(addr) != exp) begin failures++; $display("%s: %0d expected %0d", what, addr, exp); end
  endtask
  initial begin
    int exp = 0;
    bit run = 0;
    reset = 1; startcount = 0; stall = 0; @(posedge clk); #1; reset = 0;
    chk(0, "reset");
    repeat (5) begin @(posedge clk); #1; end
    chk(0, "idle before start");
    startcount = 1; @(posedge clk); #1; startcount = 0; exp = 1; chk(1, "first count");
    repeat (3000) begin
      stall = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (!stall) exp = (exp + 1) % (1 << 18);
      chk(exp, "count");
    end
    // run to the wrap
    stall = 0;
    while (addr != 18'h3FFFF) begin @(posedge clk); #1; end
    @(posedge clk); #1; chk(0, "wrap");
    reset = 1; @(posedge clk); #1; reset = 0; chk(0, "clear");
    @(posedge clk); #1; chk(0, "stopped after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
