// tb_dgn: exhaustive check of the destination grammarnode decoder.
module tb_dgn;
  logic [7:0] g; logic en;
  int checks = 0, failures = 0;
  dgn dut (.gn_transprob(g), .dgnenable(en));
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      g = 8'(i); #1; checks++;
      if (en !== (i == 255)) begin failures++; $display("dgnenable wrong for %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
