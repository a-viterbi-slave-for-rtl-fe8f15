// tb_predsel: checks the predecessor selector.
// The testbench plays predadd: it steps a write address and picks read
// addresses at random. Each RAM output must equal the tag most recently
// written at its read address (the tag presented on stprobin_data one loaded
// cycle before it is written), or the tag being written when the addresses
// match. Stalled cycles must not write.
module tb_predsel;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load, shift, si, so;
  logic [17:0] tin, o1, o2, o3;
  logic [3:0] wa, a1, a2, a3;
  logic [17:0] shadow [16];
  bit known [16];
  int checks = 0, failures = 0, n_bypass = 0;

  predsel dut (.clk, .load, .shift, .stprobin_data(tin), .writeadd_data(wa),
               .firstpredadd2_data(a1), .seconpredadd2_data(a2), .thirdpredadd2_data(a3),
               .firstpred2_data(o1), .seconpred2_data(o2), .thirdpred2_data(o3),
               .scanin(si), .scanout(so));

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [17:0] expv(logic [3:0] a, logic [17:0] wdat);
    return (load && a == wa) ? wdat : shadow[a];
  endfunction

  initial begin
    logic [17:0] reg1;  // model of stprobin1
    shift = 0; si = 0; load = 1; wa = 0; a1 = 0; a2 = 0; a3 = 0;
    tin = 18'($urandom); reg1 = tin;
    @(posedge clk); #1;
    repeat (1500) begin
      bit st;
      st = ($urandom_range(0, 4) == 0);
      load = !st;
      a1 = 4'($urandom); a2 = 4'($urandom); a3 = ($urandom_range(0, 3) == 0) ? wa : 4'($urandom);
      tin = 18'($urandom);
      #1;
      if (load && known[wa] == 0) known[wa] = 1;
      begin
        logic [3:0] ad [3];
        logic [17:0] ov [3];
        ad = '{a1, a2, a3}; ov = '{o1, o2, o3};
        for (int k = 0; k < 3; k++) begin
          if ((load && ad[k] == wa) || known[ad[k]]) begin
            checks++;
            if (load && ad[k] == wa) n_bypass++;
            if (ov[k] !== expv(ad[k], reg1)) begin
              failures++; $display("port %0d addr %0d: %h expected %h", k, ad[k], ov[k], expv(ad[k], reg1));
            end
          end
        end
      end
      @(posedge clk); #1;
      if (load) begin
        shadow[wa] = reg1;
        reg1 = tin;
        wa = wa + 4'd1;
      end
    end
    checks++; if (n_bypass == 0) begin failures++; $display("write-through never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
