// tb_backtrace_processor: self-checking test of the backtrace chip.
//
// Part 1 (scan test): loads the chip's three scan chains with a known vector,
// runs one functional clock with every control input high and all data pins
// low, scans the chains out and compares each register with the value the
// register transfer of the datapath predicts (independently worked out by
// hand: e.g. predadd 0xA + 0xA = 0x4, write-through RAM read of 0x3FFFF,
// 18-bit truncation of the loaded values).
//
// Part 2 (random streams): drives a stream of states grouped in words and
// frames, with random tags, relative predecessor positions, Viterbi decisions
// (sela/selb, source-grammarnode selection, extra predecessor groups,
// destination-grammarnode updates) and random stalls. A behavioural model
// computes the tag every state must emerge with and the destination
// grammarnode tag of every word; outputs are checked every loaded cycle at the
// latency of eleven loaded edges.
module tb_backtrace_processor;
  import bt_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             stall, scantest, newframe;
  logic [TAG_W-1:0] stbtrace_data, srcndbtrace2_data;
  logic [11:0]      predecessor_data;
  logic popsourceinv, gnselect2, sela, selb, morepredmux7, gndmux9, newword9;
  logic [TAG_W-1:0] btrace11_out, gnbtrace11_out;
  logic si_udp, so_udp, si_up, so_up, si_lo, so_lo;

  backtrace_processor dut (
    .clk, .stall, .scantest, .newframe, .stbtrace_data, .predecessor_data,
    .srcndbtrace2_data, .popsourceinv, .gnselect2, .sela, .selb, .morepredmux7,
    .gndmux9, .newword9, .btrace11_out, .gnbtrace11_out,
    .scaninudp(si_udp), .scanoutudp(so_udp), .scaninbdpup(si_up), .scanoutbdpup(so_up),
    .scaninbdplo(si_lo), .scanoutbdplo(so_lo));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scan test tables ----------------
  // chain 0 = UDP, 1 = BDPLO, 2 = BDPUP; registers listed from scan-in.
  typedef struct { int chain; int w; bit lsb_first; logic [17:0] vin; logic [17:0] vexp; } sreg_t;
  sreg_t sregs [26] = '{
    '{0,18,1,18'h3FFFF,18'h00000}, // stprobin1
    '{0, 4,0,18'hA,18'h0},         // inaddcounter_reg1 (cleared by newframe)
    '{0, 4,1,18'hA,18'h0},         // topology_reg1_1
    '{0, 4,0,18'hA,18'h0},         // topology_reg1_2
    '{0, 4,1,18'hA,18'h0},         // topology_reg1_3
    '{0, 4,0,18'hA,18'h4},         // firstpredadd_reg2 = A + A
    '{0, 4,1,18'hA,18'h4},         // seconpredadd_reg2
    '{0, 4,0,18'hA,18'h4},         // thirdpredadd_reg2
    '{1,18,0,18'h11111,18'h22222}, // btrace_reg6   <- predmux (third path)
    '{1,18,1,18'h22222,18'h11111}, // btrace_reg7   <- reg6
    '{1,18,0,18'h33333,18'h33333}, // btrace_reg8   <- itself (morepred)
    '{1,18,1,18'h04444,18'h33333}, // btrace_reg9   <- reg8
    '{1,18,0,18'h15555,18'h04444}, // gnbtrace_reg10 <- reg9
    '{1,18,1,18'h26666,18'h15555}, // gnbtrace_reg11 <- gnbtrace_reg10
    '{1,18,0,18'h37777,18'h04444}, // btrace_reg10  <- reg9
    '{1,18,1,18'h08888,18'h37777}, // btrace_reg11  <- reg10
    '{2,18,0,18'h19999,18'h19999}, // srcndbtrace_reg2 <- itself
    '{2,18,1,18'h2AAAA,18'h19999}, // firstbtrace_reg3 <- srcndbtrace_reg2
    '{2,18,0,18'h3BBBB,18'h2AAAA}, // firstbtrace_reg4
    '{2,18,1,18'h0CCCC,18'h3BBBB}, // firstbtrace_reg5
    '{2,18,0,18'h1DDDD,18'h3FFFF}, // seconbtrace_reg3 <- RAM write-through
    '{2,18,1,18'h2EEEE,18'h1DDDD}, // seconbtrace_reg4
    '{2,18,0,18'h3FFFF,18'h2EEEE}, // seconbtrace_reg5
    '{2,18,1,18'h00000,18'h3FFFF}, // thirdbtrace_reg3 <- RAM write-through
    '{2,18,0,18'h11111,18'h00000}, // thirdbtrace_reg4
    '{2,18,1,18'h22222,18'h11111}  // thirdbtrace_reg5
  };

  bit chain_in  [3][$];
  bit chain_out [3][$];

  task automatic scan_test();
    int len [3];
    int n;
    // chain bit lists in order from scan-in
    for (int c = 0; c < 3; c++) chain_in[c].delete();
    foreach (sregs[i]) begin
      for (int b = 0; b < sregs[i].w; b++)
        chain_in[sregs[i].chain].push_back(sregs[i].lsb_first ? sregs[i].vin[b] : sregs[i].vin[sregs[i].w-1-b]);
    end
    for (int c = 0; c < 3; c++) len[c] = chain_in[c].size();
    n = 180;
    // shift in: the bit for the far end goes first
    scantest = 1; stall = 0;
    for (int k = 0; k < n; k++) begin
      si_udp = (k >= n - len[0]) ? chain_in[0][len[0]-1-(k-(n-len[0]))] : 1'b0;
      si_lo  = (k >= n - len[1]) ? chain_in[1][len[1]-1-(k-(n-len[1]))] : 1'b0;
      si_up  = (k >= n - len[2]) ? chain_in[2][len[2]-1-(k-(n-len[2]))] : 1'b0;
      @(posedge clk); #1;
    end
    // one functional clock, every control high, data pins low
    scantest = 0;
    {newword9, gndmux9, morepredmux7, sela, selb, gnselect2, popsourceinv, newframe} = 8'hFF;
    stbtrace_data = '0; predecessor_data = '0; srcndbtrace2_data = '0;
    @(posedge clk); #1;
    // shift out
    scantest = 1;
    for (int c = 0; c < 3; c++) chain_out[c].delete();
    for (int k = 0; k < n; k++) begin
      chain_out[0].push_front(so_udp);
      chain_out[1].push_front(so_lo);
      chain_out[2].push_front(so_up);
      si_udp = 0; si_lo = 0; si_up = 0;
      @(posedge clk); #1;
    end
    scantest = 0;
    // chain_out[c] now holds, for the last len[c] entries, the chain from scan-in
    begin
      int pos [3] = '{0, 0, 0};
      foreach (sregs[i]) begin
        int c = sregs[i].chain;
        logic [17:0] v = '0;
        for (int b = 0; b < sregs[i].w; b++) begin
          bit bitv = chain_out[c][n - len[c] + pos[c] + b];
          if (sregs[i].lsb_first) v[b] = bitv; else v[sregs[i].w-1-b] = bitv;
        end
        pos[c] += sregs[i].w;
        checks++;
        if (v !== sregs[i].vexp) begin
          failures++;
          $display("scan: register %0d read %h expected %h", i, v, sregs[i].vexp);
        end
      end
    end
  endtask

  // ---------------- random stream test ----------------
  localparam int N = 3000;
  typedef struct {
    logic [17:0] tag;       // tag entering from the t-1 memory
    int          back [3];  // how many entries back each predecessor is
    bit          first;     // first entry of a word
    bit          last;      // last entry of a word
    bit          frame;     // first entry of a frame (newframe)
    bit          gnsel;     // first candidate is the source grammarnode
    int          sel;       // 0,1,2 chosen candidate
    bit          morepred;  // continuation entry: keep the earlier best?
    bit          gnd;       // update the destination grammarnode tag
    logic [17:0] src;       // source grammarnode tag of the word
    logic [17:0] best;      // model result
  } ent_t;
  ent_t e [N];

  int n_stall = 0, n_more = 0, n_gnsel = 0, n_newword = 0, n_frames = 0, n_keep = 0;

  task automatic build_stream();
    int idx_in_word = 0, wlen = 0, words_in_frame = 0;
    int w = 0;  // RAM write address of the previous entry
    logic [17:0] src = '0;
    for (int n = 0; n < N; n++) begin
      if (idx_in_word == wlen) begin
        idx_in_word = 0;
        wlen = 1 + $urandom_range(0, 9);
        src = 18'($urandom);
        // A frame start clears the RAM write counter to 0. The entry just
        // before it is still read one cycle later, so a frame may start only
        // where none of that entry's predecessors sits at address 0.
        e[n].frame = (n == 0) || (words_in_frame >= 4 && $urandom_range(0, 3) == 0 &&
                      ((w - e[n-1].back[0]) % 16 != 0) && ((w - e[n-1].back[1]) % 16 != 0) &&
                      ((w - e[n-1].back[2]) % 16 != 0));
        words_in_frame = e[n].frame ? 0 : words_in_frame + 1;
      end else e[n].frame = 0;
      if (n + wlen - idx_in_word > N) wlen = N - n + idx_in_word; // close the last word
      w = e[n].frame ? 0 : (w + 1) % 16;
      e[n].first = (idx_in_word == 0);
      e[n].last  = (idx_in_word == wlen - 1);
      e[n].tag   = 18'($urandom);
      e[n].src   = src;
      for (int k = 0; k < 3; k++) e[n].back[k] = $urandom_range(0, (idx_in_word < 14) ? idx_in_word : 14);
      e[n].gnsel = ($urandom_range(0, 3) == 0);
      e[n].sel   = $urandom_range(0, 2);
      e[n].morepred = !e[n].first && ($urandom_range(0, 4) == 0);
      e[n].gnd   = e[n].first || ($urandom_range(0, 2) == 0);
      idx_in_word++;
    end
    // model
    for (int n = 0; n < N; n++) begin
      logic [17:0] cand [3];
      logic [17:0] chosen;
      for (int k = 0; k < 3; k++) cand[k] = e[n - e[n].back[k]].tag;
      if (e[n].gnsel) cand[0] = e[n].src;
      chosen = cand[e[n].sel];
      e[n].best = e[n].morepred ? e[n-1].best : chosen;
    end
  endtask

  // decision of the entry occupying a pipeline position in loaded cycle lc
  function automatic bit valid(int i); return (i >= 0) && (i < N); endfunction

  logic [17:0] gn10_m, gn11_m;
  bit          gn11_known = 0;

  task automatic stream_test();
    int lc = 0;   // loaded edges so far
    int total = N + 12;
    build_stream();
    while (lc < total) begin
      bit st = ($urandom_range(0, 4) == 0);
      stall = st;
      // inputs of entry lc
      if (valid(lc)) begin
        stbtrace_data    = e[lc].tag;
        predecessor_data = {4'((16 - e[lc].back[0]) % 16), 4'((16 - e[lc].back[1]) % 16), 4'((16 - e[lc].back[2]) % 16)};
        newframe         = e[lc].frame;
      end else begin
        stbtrace_data = 18'($urandom); predecessor_data = 12'($urandom); newframe = 0;
      end
      // source tag popped in the cycle after the word's first entry
      popsourceinv = 1;
      srcndbtrace2_data = 18'($urandom);
      if (valid(lc - 1) && e[lc-1].first) begin
        popsourceinv = 0;
        srcndbtrace2_data = e[lc-1].src;
      end
      gnselect2    = valid(lc - 2) ? e[lc-2].gnsel : 1'b0;
      {selb, sela} = valid(lc - 5) ? 2'(e[lc-5].sel) : 2'b00;
      if (valid(lc - 5) && e[lc-5].sel == 2 && $urandom_range(0, 1) == 1) {selb, sela} = 2'b11;
      morepredmux7 = valid(lc - 7) ? e[lc-7].morepred : 1'b0;
      gndmux9      = valid(lc - 9) ? e[lc-9].gnd : 1'b0;
      newword9     = valid(lc - 10) ? e[lc-10].last : 1'b0;
      @(posedge clk); #1;
      if (st) begin
        n_stall++;
        continue;
      end
      // model of the destination grammarnode registers (pre-edge values)
      if (newword9) begin gn11_m = gn10_m; gn11_known = 1; n_newword++; end
      if (gndmux9) gn10_m = e[lc-9].best;
      if (valid(lc) && e[lc].frame) n_frames++;
      if (morepredmux7) n_more++;
      if (gnselect2) n_gnsel++;
      lc++;
      if (valid(lc - 11)) begin
        checks++;
        if (btrace11_out !== e[lc-11].best) begin
          failures++;
          if (failures < 10) begin
            automatic int m = lc - 11;
            $display("entry %0d: btrace11 %h expected %h", m, btrace11_out, e[m].best);
            for (int j = m - 3; j <= m; j++)
              $display("  e%0d tag %h back %0d %0d %0d first %0d last %0d frame %0d gnsel %0d sel %0d more %0d src %h best %h",
                j, e[j].tag, e[j].back[0], e[j].back[1], e[j].back[2], e[j].first, e[j].last, e[j].frame,
                e[j].gnsel, e[j].sel, e[j].morepred, e[j].src, e[j].best);
          end
        end
      end
      if (gn11_known) begin
        checks++;
        if (gnbtrace11_out !== gn11_m) begin
          failures++;
          if (failures < 10) $display("lc %0d: gnbtrace11 %h expected %h", lc, gnbtrace11_out, gn11_m);
        end
      end
    end
  endtask

  initial begin
    stall = 0; scantest = 0; newframe = 0; si_udp = 0; si_up = 0; si_lo = 0;
    popsourceinv = 1; gnselect2 = 0; sela = 0; selb = 0; morepredmux7 = 0; gndmux9 = 0; newword9 = 0;
    stbtrace_data = 0; predecessor_data = 0; srcndbtrace2_data = 0;
    @(posedge clk); #1;
    scan_test();
    stream_test();
    // every mechanism must have been exercised
    checks++; if (n_stall == 0)   begin failures++; $display("no stall seen"); end
    checks++; if (n_more == 0)    begin failures++; $display("no extra predecessor group"); end
    checks++; if (n_gnsel == 0)   begin failures++; $display("no source grammarnode selection"); end
    checks++; if (n_newword == 0) begin failures++; $display("no word end"); end
    checks++; if (n_frames < 2)   begin failures++; $display("fewer than two frames"); end
    $display("stalls=%0d morepred=%0d gnselect=%0d words=%0d frames=%0d", n_stall, n_more, n_gnsel, n_newword, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
