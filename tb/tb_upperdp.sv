// tb_upperdp: checks the upper datapath end to end.
// A stream of tags enters with random relative positions reaching 0..14
// entries back; two loaded cycles after an entry is presented, the three
// outputs must carry the tags of the entries its positions point at
// (position p = (16 - k) mod 16 points k entries back). Random stalls.
module tb_upperdp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load, shift, startcounter, si, so;
  logic [17:0] tin, o1, o2, o3;
  logic [11:0] pd;
  localparam int N = 2000;
  logic [17:0] tags [N];
  int back [N][3];
  int checks = 0, failures = 0, n_stall = 0;

  upperdp dut (.clk, .load, .shift, .startcounter, .stbtrace_data(tin), .predecessor_data(pd),
               .firstbtrace_data(o1), .seconbtrace_data(o2), .thirdbtrace_data(o3),
               .scanin(si), .scanout(so));

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lc = 0;
    shift = 0; si = 0;
    for (int n = 0; n < N; n++) begin
      tags[n] = 18'($urandom);
      for (int k = 0; k < 3; k++) back[n][k] = $urandom_range(0, (n < 14) ? n : 14);
    end
    while (lc < N + 2) begin
      bit st;
      st = ($urandom_range(0, 3) == 0);
      load = !st;
      startcounter = (lc == 0);
      if (lc < N) begin
        tin = tags[lc];
        pd = {4'((16 - back[lc][0]) % 16), 4'((16 - back[lc][1]) % 16), 4'((16 - back[lc][2]) % 16)};
      end else begin tin = 18'($urandom); pd = 12'($urandom); end
      // outputs in this cycle belong to entry lc-2
      #1;
      if (!st && lc >= 2 && lc - 2 < N) begin
        int m;
        logic [17:0] ov [3];
        m = lc - 2; ov = '{o1, o2, o3};
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (ov[k] !== tags[m - back[m][k]]) begin
            failures++;
            if (failures < 10) $display("entry %0d port %0d: %h expected %h", m, k, ov[k], tags[m - back[m][k]]);
          end
        end
      end
      @(posedge clk); #1;
      if (st) n_stall++; else lc++;
    end
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
