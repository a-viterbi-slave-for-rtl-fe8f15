// tb_outmem_addr: checks output memory addressing and the output adder in
// both modes against arithmetic done in the testbench: in mode 0 the 23-bit
// address {lookup[14:0], feature0} is split into bank and bank address; in
// mode 1 each bank gets {lookup[12:0], feature k} and the four bytes are
// summed with saturation at 255.
module tb_outmem_addr;
  logic mode; logic [15:0] lookup; logic [7:0] feature [4]; logic [20:0] bank_addr [4];
  logic [7:0] bank_data [4]; logic [7:0] outprob;
  int checks = 0, failures = 0, n_sat = 0;
  outmem_addr dut (.mode, .lookup, .feature, .bank_addr, .bank_data, .outprob);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (500) begin
      int unsigned full, sum, exp;
      mode = 1'($urandom); lookup = 16'($urandom);
      for (int k = 0; k < 4; k++) begin
        feature[k] = 8'($urandom);
        bank_data[k] = ($urandom_range(0, 1) == 1) ? 8'($urandom_range(0, 60)) : 8'($urandom);
      end
      #1;
      full = (int'(lookup) % 32768) * 256 + int'(feature[0]);
      sum = 0;
      for (int k = 0; k < 4; k++) sum += int'(bank_data[k]);
      for (int k = 0; k < 4; k++) begin
        int unsigned ea;
        ea = mode ? (int'(lookup) % 8192) * 256 + int'(feature[k]) : full % (1 << 21);
        checks++;
        if (int'(bank_addr[k]) != ea) begin failures++; $display("bank %0d addr %h expected %h", k, bank_addr[k], ea); end
      end
      if (mode) begin exp = (sum > 255) ? 255 : sum; if (sum > 255) n_sat++; end
      else exp = int'(bank_data[full >> 21]);
      checks++;
      if (int'(outprob) != exp) begin failures++; $display("outprob %0d expected %0d", outprob, exp); end
    end
    checks++; if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
