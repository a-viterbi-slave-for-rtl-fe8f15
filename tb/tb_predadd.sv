// tb_predadd: checks the predecessor address datapath.
// Random positions and stalls: the write address must count up by one per
// loaded cycle (cleared by startcounter) and each read address must equal the
// previous cycle's write address plus the registered position, modulo 16,
// one loaded cycle after the position entered. A stalled cycle must change
// nothing.
module tb_predadd;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load, shift, startcounter, si, so;
  logic [11:0] pd;
  logic [3:0] wa, r1, r2, r3;
  int checks = 0, failures = 0, n_clear = 0, n_stall = 0;

  predadd dut (.clk, .load, .shift, .startcounter, .predecessor_data(pd), .writeadd_data(wa),
               .firstpredadd2_data(r1), .seconpredadd2_data(r2), .thirdpredadd2_data(r3),
               .scanin(si), .scanout(so));

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int wexp, pos [3], prev_w, r1exp;
    bit primed = 0;
    shift = 0; si = 0; load = 1; startcounter = 1; pd = 0;
    @(posedge clk); #1;
    wexp = 0; prev_w = 0; pos = '{0, 0, 0};
    chk(wa, 0, "cleared");
    repeat (1000) begin
      logic [11:0] npd;
      bit st, clr;
      st = ($urandom_range(0, 4) == 0);
      clr = ($urandom_range(0, 50) == 0);
      npd = 12'($urandom);
      load = !st; startcounter = clr; pd = npd;
      @(posedge clk); #1;
      if (st) begin
        n_stall++;
        chk(wa, wexp, "stall holds counter");
        if (primed) chk(r1, r1exp, "stall holds r1");
        continue;
      end
      if (clr) n_clear++;
      // sums use pre-edge counter and positions
      r1exp = (wexp + pos[0]) % 16;
      chk(r1, r1exp, "first read address");
      chk(r2, (wexp + pos[1]) % 16, "second read address");
      chk(r3, (wexp + pos[2]) % 16, "third read address");
      prev_w = wexp;
      wexp = clr ? 0 : (wexp + 1) % 16;
      chk(wa, wexp, "write address");
      pos = '{int'(npd[11:8]), int'(npd[7:4]), int'(npd[3:0])};
      primed = 1;
    end
    checks++; if (n_clear == 0 || n_stall == 0) begin failures++; $display("clear/stall not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
