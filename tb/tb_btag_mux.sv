// tb_btag_mux: random check of the backtrace tag selector.
module tb_btag_mux;
  logic s; logic [17:0] a, g, t;
  int checks = 0, failures = 0;
  btag_mux dut (.store(s), .btaddr(a), .gnbtrace11(g), .tag(t));
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (200) begin
      s = 1'($urandom); a = 18'($urandom); g = 18'($urandom); #1; checks++;
      if (t !== (s ? a : g)) begin failures++; $display("tag wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
