// tb_scan_clkdrv: exhaustive check of the register enable driver:
// load only when neither stalled nor scanning, shift whenever scanning.
module tb_scan_clkdrv;
  logic stall, scantest, load, shift;
  int checks = 0, failures = 0;
  scan_clkdrv dut (.stall, .scantest, .load, .shift);
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {stall, scantest} = 2'(i); #1;
      checks += 2;
      if (load  !== (i == 0)) begin failures++; $display("load wrong for %0d", i); end
      if (shift !== (i[0] == 1)) begin failures++; $display("shift wrong for %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
