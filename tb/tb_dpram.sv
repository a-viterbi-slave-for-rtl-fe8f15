// tb_dpram: checks the dual-port RAM at its default 16 x 32 size.
// Writes every word, reads them back in many orders (as the original chip test
// did, reading repeatedly), writes and reads one address in the same cycle to
// check write-through, and checks that a cycle without a write (enable low,
// or enable high with the strobe high) changes nothing.
// A shadow array computed in the testbench is the reference.
module tb_dpram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we, write, pre_n;
  bit          wonly;     // enable high while the strobe stays high: no write
  logic [3:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  dpram dut (.clk, .write, .pre_n, .waddr, .wdata, .raddr, .rdata);

  // a write happens only when both the enable and the low strobe are present
  always_comb begin
    write = we || wonly;
    pre_n = !we || wonly;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [31:0] exp, string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: read %h expected %h", what, rdata, exp); end
  endtask

  initial begin
    we = 0; wonly = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill sequentially
    for (int a = 0; a < 16; a++) begin
      we = 1; waddr = 4'(a); wdata = $urandom; shadow[a] = wdata;
      raddr = 4'(a); #1; chk(wdata, "write-through during fill");
      @(posedge clk); #1;
    end
    we = 0;
    // repeated reads
    for (int r = 0; r < 200; r++) begin
      raddr = 4'($urandom); #1; chk(shadow[raddr], "read");
      @(posedge clk); #1;
    end
    // random simultaneous traffic
    for (int r = 0; r < 500; r++) begin
      we = 1'($urandom); wonly = !we && 1'($urandom); waddr = 4'($urandom); wdata = $urandom;
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 4'($urandom);
      #1;
      if (we && raddr == waddr) chk(wdata, "same-address write-through");
      else                      chk(shadow[raddr], "independent read");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
