// tb_btracedp: checks the backtrace datapath with the tag RAMs replaced by the
// testbench. Each entry presents three candidate tags in one loaded cycle;
// the Viterbi decisions follow at their pipeline positions (gnselect2 with the
// candidates, sela/selb 3 loaded cycles later, morepredmux7 5, gndmux9 7,
// newword9 8 after a word's last entry). A behavioural model gives the tag
// each entry must leave with, 9 loaded edges after it entered, and the
// destination grammarnode tag held on gnbtrace11_out. Random stalls.
module tb_btracedp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load, shift;
  logic [17:0] src_in, c1, c2, c3, bt, gn;
  logic popsourceinv, gnselect2, sela, selb, morepredmux7, gndmux9, newword9;
  logic siu, sou, sil, sol;
  int checks = 0, failures = 0;
  int n_stall = 0, n_more = 0, n_keep = 0, n_gnsel = 0, n_words = 0, n_gnd = 0;

  btracedp dut (.clk, .load, .shift, .srcndbtrace2_data(src_in), .firstbtrace2_out(c1),
    .seconbtrace2_out(c2), .thirdbtrace2_out(c3), .popsourceinv, .gnselect2, .sela, .selb,
    .morepredmux7, .gndmux9, .newword9, .btrace11_out(bt), .gnbtrace11_out(gn),
    .scanin_up(siu), .scanout_up(sou), .scanin_lo(sil), .scanout_lo(sol));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int N = 2000;
  typedef struct { logic [17:0] c [3]; logic [17:0] src; bit first, last, gnsel, more, gnd; int sel;
                   logic [17:0] best; } ent_t;
  ent_t e [N];
  function automatic bit v(int i); return i >= 0 && i < N; endfunction

  initial begin
    int lc = 0, left = 0;
    logic [17:0] src = 0, gn10_m = 0, gn11_m = 0;
    bit gn_known = 0;
    shift = 0; siu = 0; sil = 0;
    for (int n = 0; n < N; n++) begin
      if (left == 0) begin left = $urandom_range(1, 8); src = 18'($urandom); e[n].first = 1; end
      else e[n].first = 0;
      if (n == N - 1) left = 1;
      e[n].last = (left == 1); left--;
      for (int k = 0; k < 3; k++) e[n].c[k] = 18'($urandom);
      e[n].src = src;
      e[n].gnsel = (n > 0) && ($urandom_range(0, 3) == 0);  // no source tag before entry 0
      e[n].sel = $urandom_range(0, 2);
      e[n].more = !e[n].first && ($urandom_range(0, 3) == 0);
      e[n].gnd = e[n].first || ($urandom_range(0, 2) == 0);
      begin
        logic [17:0] ch;
        ch = (e[n].sel == 0 && e[n].gnsel) ? src : e[n].c[e[n].sel];
        e[n].best = e[n].more ? e[n-1].best : ch;
      end
    end
    while (lc < N + 10) begin
      bit st;
      st = ($urandom_range(0, 4) == 0);
      load = !st;
      {c1, c2, c3} = v(lc) ? {e[lc].c[0], e[lc].c[1], e[lc].c[2]} : 54'($urandom);
      popsourceinv = 1; src_in = 18'($urandom);
      if (v(lc + 1) && e[lc+1].first) begin popsourceinv = 0; src_in = e[lc+1].src; end
      gnselect2 = v(lc) ? e[lc].gnsel : 1'b0;
      {selb, sela} = v(lc - 3) ? 2'(e[lc-3].sel) : 2'b00;
      morepredmux7 = v(lc - 5) ? e[lc-5].more : 1'b0;
      gndmux9 = v(lc - 7) ? e[lc-7].gnd : 1'b0;
      newword9 = v(lc - 8) ? e[lc-8].last : 1'b0;
      @(posedge clk); #1;
      if (st) begin n_stall++; continue; end
      if (newword9) begin gn11_m = gn10_m; gn_known = 1; n_words++; end
      if (gndmux9) begin gn10_m = e[lc-7].best; n_gnd++; end
      if (morepredmux7) n_more++;
      if (gnselect2) n_gnsel++;
      lc++;
      if (v(lc - 9)) begin
        checks++;
        if (bt !== e[lc-9].best) begin failures++;
          if (failures < 10) $display("entry %0d: %h expected %h", lc - 9, bt, e[lc-9].best); end
      end
      if (gn_known) begin
        checks++;
        if (gn !== gn11_m) begin failures++;
          if (failures < 10) $display("gnbtrace11 %h expected %h", gn, gn11_m); end
      end
    end
    checks++;
    if (n_stall == 0 || n_more == 0 || n_gnsel == 0 || n_words == 0 || n_gnd == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
