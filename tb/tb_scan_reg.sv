// tb_scan_reg: checks load, hold and both scan bit orders of scan_reg.
// Two 18-bit registers, one LSB-first and one MSB-first, are chained; a
// random word is shifted through them bit by bit and compared with a
// bit-list model, then the functional load and the hold are checked.
module tb_scan_reg;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load, shift, si, mid, so;
  logic [17:0] d, qa, qb;
  int checks = 0, failures = 0;

  scan_reg #(.W(18), .LSB_FIRST(1'b1)) ra (.clk, .load, .shift, .d, .q(qa), .si, .so(mid));
  scan_reg #(.W(18), .LSB_FIRST(1'b0)) rb (.clk, .load, .shift, .d(~d), .q(qb), .si(mid), .so);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [17:0] got, logic [17:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [17:0] a, b, va, vb;
    logic [35:0] stream;
    load = 0; shift = 0; si = 0; d = 0;
    repeat (20) begin
      // functional load
      d = 18'($urandom); load = 1; @(posedge clk); #1;
      chk(qa, d, "load a"); chk(qb, ~d, "load b");
      // hold
      a = qa; b = qb; load = 0; d = 18'($urandom); @(posedge clk); #1;
      chk(qa, a, "hold a"); chk(qb, b, "hold b");
      // shift 36 bits in: the chain from scan-in is ra[0..17] then rb[17..0]
      va = 18'($urandom); vb = 18'($urandom);
      for (int i = 0; i < 18; i++) stream[i] = va[i];
      for (int i = 0; i < 18; i++) stream[18 + i] = vb[17 - i];
      shift = 1; load = 1;  // shift has priority
      for (int k = 35; k >= 0; k--) begin
        si = stream[k];
        @(posedge clk); #1;
      end
      shift = 0; load = 0;
      chk(qa, va, "scan a"); chk(qb, vb, "scan b");
      checks++; if (so !== vb[0]) begin failures++; $display("so wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
