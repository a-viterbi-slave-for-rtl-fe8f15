// tb_wordproc_env: test environment of the wordprocessing subsystem, shared
// by the end-to-end test and the real-time frame test.
//
// The testbench plays every part outside the subsystem: the DRAM memories
// (combinational models indexed by the state address), the grammar
// subsystem (it feeds the source FIFO one value per word, sometimes late, and
// sometimes holds the destination FIFO full), the host (it empties the
// backtrace FIFO when it reports almost full) and the Viterbi processor's
// probability datapath (it issues the per-state decisions sela/selb,
// gnselect2, morepredmux7, gndmux9, newword9 at their pipeline positions and
// the per-word gnprob11/wordmin11). DRAM refresh stalls are injected at
// random.
//
// Vocabulary: address 0 holds a header word with eow set (the state machine
// waits for it); words of MINLEN to MAXLEN states follow, the last state of the frame
// carries eof. Several frames are run with new tags each frame. The
// vocabulary size, word lengths and the stress traffic are parameters.
//
// Checked: the tag leaving the backtrace processor for every state (against
// a model of the Viterbi decisions), the tag and cost sent to the
// destination FIFO at every word end, the number of pushes per frame, every
// backtrace FIFO entry, the output-memory probability in both modes, the
// scan chain lengths, and that every mechanism occurred: both FIFO stalls,
// refresh stalls, extra predecessor groups, source grammarnode predecessors,
// stored and rejected words, the almost-full backtrace FIFO (the stall and
// stored/rejected counts only when STRESS is set). The outputs report the
// check counts, the longest frame in cycles and the states per frame; done
// rises when the last frame has been checked. The caller prints the result.
module tb_wordproc_env
  import bt_pkg::*;
#(
  parameter int FRAMES = 12,       // frames to run
  parameter int NWORDS = 8,        // words in the vocabulary
  parameter int MINLEN = 7,        // states per word, lower bound
  parameter int MAXLEN = 12,       // states per word, upper bound
  parameter bit STRESS = 1'b1      // late source values, full destination FIFO, refreshes
) (
  output int  checks,
  output int  failures,
  output int  max_frame_cycles,    // longest frame, startframe to idle
  output int  states,              // states per frame
  output bit  done
);

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset, startframe, memorystall, newsentence, outmem_mode;
  logic [15:0] offset;
  logic [SADDR_W-1:0] addr;
  topo_word_t topo;
  stprob_word_t stprob_prev;
  logic [TAG_W-1:0] btrace11;
  logic [15:0] lookup;
  logic [7:0] feature [4];
  logic [20:0] outmem_addr_o [4];
  logic [7:0] outmem_data [4];
  logic [7:0] outprob2;
  logic dgnenable, stall;
  logic [PROB_W-1:0] srcndprob2, threshold;
  logic [3:0] fsm_state;
  logic gnselect2, sela, selb, morepredmux7, gndmux9, newword9;
  logic [PROB_W-1:0] gnprob11, wordmin11;
  logic src_push, src_full, dest_push, dest_full, bt_pop, bt_empty, bt_almost_full, btmemoflow;
  stprob_word_t src_wdata, dest_wdata;
  bt_entry_t bt_rdata;
  logic scantest, siu, sou, sibu, sobu, sibl, sobl;

  wordproc_top dut (.*, .scaninudp(siu), .scanoutudp(sou), .scaninbdpup(sibu),
    .scanoutbdpup(sobu), .scaninbdplo(sibl), .scanoutbdplo(sobl));

  initial begin checks = 0; failures = 0; done = 0; max_frame_cycles = 0; end

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("%0t: %s", $time, s);
  endtask

  // ---------------- vocabulary and per-frame data ----------------
    localparam int MAXS = NWORDS * MAXLEN + 2;
  int S;                              // states in the vocabulary (addresses 1..S)
  int nwords;
  int word_of [MAXS], idx_of [MAXS];
  bit last_of [MAXS];
  int back [MAXS][3];
  int sel [MAXS];
  bit gnsel [MAXS], more [MAXS], gnd [MAXS];
  logic [17:0] tagmem [MAXS];         // t-1 tags of the current frame
  logic [17:0] best [MAXS];
  logic [17:0] srctag [NWORDS];
  logic [13:0] srcprob [NWORDS];
  logic [13:0] wgnprob [NWORDS], wmin [NWORDS];

  function automatic topo_word_t topo_of(int a);
    topo_word_t t;
    t = '0;
    if (a == 0) begin t.eow = 1; return t; end
    if (a > S) return t;
    t.pos1 = 4'((16 - back[a][0]) % 16);
    t.pos2 = 4'((16 - back[a][1]) % 16);
    t.pos3 = 4'((16 - back[a][2]) % 16);
    t.eow = last_of[a];
    t.eof = (a == S);
    t.gnsource = gnsel[a];
    t.morepred = more[a];
    t.gntprob = (a % 5 == 0) ? 8'hFF : 8'(a);
    return t;
  endfunction

  task automatic build_vocab();
    int a = 1;
    nwords = NWORDS;
    for (int w = 0; w < nwords; w++) begin
      int len;
      len = $urandom_range(MINLEN, MAXLEN);
      for (int i = 0; i < len; i++) begin
        word_of[a] = w; idx_of[a] = i; last_of[a] = (i == len - 1);
        for (int k = 0; k < 3; k++) back[a][k] = $urandom_range(0, (i < 14) ? i : 14);
        sel[a] = $urandom_range(0, 2);
        gnsel[a] = (i < 3) && ($urandom_range(0, 1) == 1);
        more[a] = (i > 0) && ($urandom_range(0, 4) == 0);
        gnd[a] = (i == 0) || ($urandom_range(0, 2) == 0);
        a++;
      end
    end
    S = a - 1;
    states = S;
  endtask

  task automatic new_frame_data();
    for (int a = 0; a <= S; a++) tagmem[a] = 18'($urandom);
    for (int w = 0; w < nwords; w++) begin
      srctag[w] = 18'($urandom); srcprob[w] = 14'($urandom);
      wmin[w] = 14'($urandom_range(0, 8000));
      wgnprob[w] = 14'(int'(wmin[w]) + $urandom_range(0, 3000));
    end
    for (int a = 1; a <= S; a++) begin
      logic [17:0] c [3];
      for (int k = 0; k < 3; k++) c[k] = tagmem[a - back[a][k]];
      if (gnsel[a]) c[0] = srctag[word_of[a]];
      best[a] = more[a] ? best[a-1] : c[sel[a]];
    end
  endtask

  // memories: combinational reads
  always_comb begin
    topo = topo_of(int'(addr));
    stprob_prev.tag  = (int'(addr) <= S) ? tagmem[addr] : 18'h0;
    stprob_prev.prob = 14'(addr);
    lookup = 16'(int'(addr) * 40503);
    for (int k = 0; k < 4; k++) outmem_data[k] = 8'((int'(outmem_addr_o[k]) * 7 + k * 13) % 256);
  end

  // ---------------- pipeline bookkeeping for the Viterbi decisions ----------------
  int hist [$];   // address presented in each loaded cycle
  function automatic int h(int back_n);
    if (back_n > hist.size()) return -1;
    return hist[hist.size() - back_n];
  endfunction
  function automatic bit real_a(int a); return a >= 1 && a <= S; endfunction

  logic [17:0] gn10_m, gn11_m;
  int gn11_word = 0;
  int n_loaded = 0;

  // counters of mechanisms
  int n_src_stall = 0, n_dest_stall = 0, n_mem_stall = 0, n_more = 0, n_gnsel = 0;
  int n_store = 0, n_reject = 0, n_af = 0, n_pushes = 0, n_states_checked = 0, n_dgn = 0;
  int n_mode [2];

  // model of the backtrace memory processor and backtrace FIFO
  int prev_best = 16383, cur_best = 16383, tagcnt = 0, wid = 0;
  bt_entry_t btq [$];
  bit btq_known [$];
  bit gn11_known = 0;
  int frame_pushes = 0;

  // drive decisions for the current cycle from the loaded-cycle history;
  // hist holds the addresses presented in the previous loaded cycles.
  always @(negedge clk) begin
    int a2, a5, a7, a9, a10;
    a2 = h(2); a5 = h(5); a7 = h(7); a9 = h(9); a10 = h(10);
    gnselect2    = real_a(a2) ? gnsel[a2] : 1'b0;
    {selb, sela} = real_a(a5) ? 2'(sel[a5]) : 2'b00;
    morepredmux7 = real_a(a7) ? more[a7] : 1'b0;
    gndmux9      = real_a(a9) ? gnd[a9] : 1'b0;
    newword9     = real_a(a10) ? last_of[a10] : 1'b0;
    gnprob11     = wgnprob[gn11_word];
    wordmin11    = wmin[gn11_word];
    for (int k = 0; k < 4; k++) feature[k] = 8'($urandom);
  end

  // checks at the end of each cycle, model updates at the edge
  always @(posedge clk) begin
    if (!reset && !scantest) begin
      // output memory probability
      begin
        int full, sum, exp;
        full = (int'(lookup) % 32768) * 256 + int'(feature[0]);
        sum = 0;
        for (int k = 0; k < 4; k++) sum += (((outmem_mode ? (int'(lookup) % 8192) * 256 + int'(feature[k])
                                                           : full % (1 << 21)) * 7 + k * 13) % 256);
        exp = outmem_mode ? ((sum > 255) ? 255 : sum)
                          : ((((full % (1 << 21)) * 7 + (full >> 21) * 13)) % 256);
        checks++; n_mode[outmem_mode]++;
        if (int'(outprob2) != exp) fail($sformatf("outprob2 %0d expected %0d", outprob2, exp));
      end
      if (dgnenable) n_dgn++;
      if (fsm_state == 2 || fsm_state == 6) n_src_stall++;
      if (fsm_state == 9 || fsm_state == 12) n_dest_stall++;
      if (memorystall) n_mem_stall++;
      if (bt_almost_full) n_af++;
      // destination push
      if (dest_push) begin
        int thr;
        bit stored;
        thr = prev_best + int'(offset); if (thr > 16383) thr = 16383;
        stored = (int'(gnprob11) <= thr);
        checks += 2;
        if (dest_wdata.prob !== gnprob11) fail("dest prob wrong");
        if ((stored || gn11_known) && dest_wdata.tag !== (stored ? 18'(tagcnt) : gn11_m))
          fail($sformatf("dest tag %h expected %h (stored %0d)", dest_wdata.tag, stored ? 18'(tagcnt) : gn11_m, stored));
        if (stored && btq.size() < 64) begin
          btq.push_back('{gnprob: gnprob11, wordid: 12'(wid), tag: gn11_m});
          btq_known.push_back(gn11_known);
          tagcnt++; n_store++;
        end else n_reject++;
        if (int'(wordmin11) < cur_best) cur_best = int'(wordmin11);
        wid++; frame_pushes++; n_pushes++;
      end
      if (fsm_state == 15 && !memorystall) begin
        prev_best = cur_best; cur_best = 16383; wid = 0;
      end
      // backtrace FIFO read by the host
      if (bt_pop && !bt_empty) begin
        checks++;
        if (btq.size() == 0) fail("backtrace FIFO has an unexpected entry");
        else begin
          // before the first word end the chip's gnbtrace11 holds its power-up value
          if (btq_known[0] ? (bt_rdata !== btq[0]) : (bt_rdata[43:18] !== btq[0][43:18]))
            fail($sformatf("bt entry %h expected %h", bt_rdata, btq[0]));
          void'(btq.pop_front());
          void'(btq_known.pop_front());
        end
      end
      // backtrace processor pipeline
      if (!stall) begin
        if (newword9) begin gn11_m = gn10_m; gn11_word = word_of[h(10)]; gn11_known = 1; end
        if (gndmux9) gn10_m = best[h(9)];
        if (morepredmux7) n_more++;
        if (gnselect2) n_gnsel++;
        hist.push_back(int'(addr));
        n_loaded++;
      end
    end
  end

  // check the tag of each state 11 loaded edges after it entered
  always @(posedge clk) begin
    #1;
    if (!reset && !scantest && !stall_d) begin
      int a;
      a = h(11);
      if (real_a(a) && hist_valid) begin
        checks++; n_states_checked++;
        if (btrace11 !== best[a]) fail($sformatf("state %0d: btrace11 %h expected %h", a, btrace11, best[a]));
      end
    end
  end
  logic stall_d = 1;
  bit hist_valid = 0;
  always @(posedge clk) stall_d <= stall || reset || scantest;

  // grammar subsystem: feed one source value per word, sometimes late
  int src_sent = 0;
  bit feeding = 0;
  always @(negedge clk) begin
    src_push = 0;
    if (feeding && src_sent < nwords && !src_full && (!STRESS || $urandom_range(0, 9) < 3)) begin
      src_push = 1;
      src_wdata = '{tag: srctag[src_sent], prob: srcprob[src_sent]};
      src_sent++;
    end
    dest_full   = STRESS && ($urandom_range(0, 9) < 2);
    memorystall = STRESS && ($urandom_range(0, 19) == 0);
    bt_pop      = bt_almost_full || (draining && !bt_empty);
  end
  bit draining = 0;

  // ---------------- scan chain lengths ----------------
  task automatic scan_lengths();
    bit s0 [$], s1 [$], s2 [$];
    scantest = 1;
    for (int k = 0; k < 400; k++) begin
      siu = 1'($urandom); sibu = 1'($urandom); sibl = 1'($urandom);
      s0.push_back(siu); s1.push_back(sibu); s2.push_back(sibl);
      @(posedge clk); #1;
      if (k >= 46)  begin checks++; if (sou  !== s0[k - 45])  fail("UDP chain length"); end
      if (k >= 180) begin checks++; if (sobu !== s1[k - 179]) fail("BDPUP chain length"); end
      if (k >= 144) begin checks++; if (sobl !== s2[k - 143]) fail("BDPLO chain length"); end
    end
    scantest = 0;
  endtask

  initial begin
    reset = 1; startframe = 0; newsentence = 0; outmem_mode = 0; offset = 16'd1500;
    scantest = 0; siu = 0; sibu = 0; sibl = 0;
    src_wdata = '0;
    build_vocab();
    new_frame_data();
    repeat (3) @(posedge clk);
    scan_lengths();
    @(negedge clk); reset = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int t0;
      outmem_mode = 1'(f % 2);
      offset = (f % 3 == 2) ? 16'd800 : 16'd12000;   // narrow and wide beams
      if (f > 0) new_frame_data();
      src_sent = 0; feeding = 1; frame_pushes = 0;
      // hold startframe until the state machine takes it (a refresh may freeze it)
      @(negedge clk); startframe = 1;
      do @(negedge clk); while (fsm_state == 0);
      startframe = 0;
      hist_valid = 1;
      t0 = 1;
      while (fsm_state != 0) begin @(negedge clk); t0++; end
      if (t0 > max_frame_cycles) max_frame_cycles = t0;
      feeding = 0;
      checks++;
      if (frame_pushes != nwords) fail($sformatf("frame %0d: %0d pushes for %0d words", f, frame_pushes, nwords));
      repeat (12) @(negedge clk);   // let the pipeline drain with junk states
    end
    draining = 1;
    repeat (80) @(negedge clk);
    while (!bt_empty) @(negedge clk);
    checks++;
    if (btq.size() != 0) fail($sformatf("%0d backtrace entries never came out", btq.size()));
    // mechanisms
    if (STRESS) begin
      checks++; if (n_src_stall == 0) fail("source FIFO empty stall never happened");
      checks++; if (n_dest_stall == 0) fail("destination FIFO full wait never happened");
      checks++; if (n_mem_stall == 0) fail("refresh stall never happened");
    end
    checks++; if (n_more == 0) fail("extra predecessor group never happened");
    checks++; if (n_gnsel == 0) fail("source grammarnode predecessor never happened");
    if (STRESS) begin
      checks++; if (n_store == 0 || n_reject == 0) fail("stored and rejected words not both seen");
    end
    checks++; if (n_af == 0) fail("backtrace FIFO never almost full");
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0) fail("output memory modes not both used");
    checks++; if (n_dgn == 0) fail("dgnenable never high");
    $display("states=%0d pushes=%0d stored=%0d rejected=%0d src_stall=%0d dest_wait=%0d refresh=%0d morepred=%0d gnsel=%0d almost_full=%0d",
             n_states_checked, n_pushes, n_store, n_reject, n_src_stall, n_dest_stall, n_mem_stall, n_more, n_gnsel, n_af);
    done = 1;
  end
endmodule
