// End-to-end test of the regex matcher with every parameter at its default (64 engines).
//
// A random D2FA with default chains longer than one is written into every engine's table
// through the broadcast write port. Then three runs, each checked symbol by symbol against a
// reference model of the D2FA, per lane and in lane order (state, match bitmap, end flag):
//   1. rate: words full of one-symbol packets must be taken one per cycle, all engines busy;
//   2. hop: one long packet that never leaves the root must move one engine per cycle;
//   3. random traffic: packets of random length packed across lanes and words, gaps, random
//      input stalls and table rewrites during traffic.
// The test counts and requires: default transitions, chained default transitions (radius
// above one), engine stalls for lack of FIFO room, input back-pressure, packets that continue
// from the last engine to the first, words holding several packets, and table writes that
// hold an engine.
module tb_regex_matcher_full;
  import regex_pkg::*;
  import tb_d2fa_pkg::*;

  localparam int NME = 64;
  localparam int NS  = 40;
  localparam int ALPHA = 6;
  localparam bit NEED_BP = 0;  // the full-size packet buffer does not fill here

  typedef struct {
    sym_t [NME-1:0] sym;
    logic [NME-1:0] v, sop, eop;
  } word_t;
  typedef struct { int st; bit m; bit eop; } exp_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid, in_ready;
  sym_t   [NME-1:0]      in_sym;
  logic   [NME-1:0]      in_lane_valid, in_sop, in_eop;
  logic   [NME-1:0]      match_valid, match_eop;
  state_t [NME-1:0]      match_state;
  match_t [NME-1:0]      match_bitmap;
  logic                  cfg_we, cfg_sel;
  state_t                cfg_addr, cfg_default;
  tt_item_t              cfg_item;
  logic   [NME-1:0]      ev_default, ev_chain, ev_stall;

  regex_matcher dut (.*);

  int checks = 0, failures = 0;
  d2fa_model m;
  word_t words [$];
  exp_t  expq [NME][$];
  word_t cur;
  int    lane = 0;
  longint cyc = 0;
  int n_default = 0, n_chain = 0, n_stall = 0, n_backpressure = 0, n_wrap = 0, n_multi = 0,
      n_cfg_hold = 0, n_reports = 0;
  bit traffic = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---- stimulus construction ----
  function automatic void flush_word();
    if (lane != 0) begin
      int starts = 0;
      for (int i = 0; i < NME; i++) if (cur.v[i] && cur.sop[i]) starts++;
      if (starts > 1) n_multi++;
      words.push_back(cur);
    end
    lane = 0;
  endfunction

  function automatic void add_packet(int len, bit root_only);
    int s = 0, nd;
    exp_t e;
    for (int k = 0; k < len; k++) begin
      int c = root_only ? $urandom_range(ALPHA, 255) : m.rand_sym();
      if (lane == 0) begin
        cur.v = '0; cur.sop = '0; cur.eop = '0; cur.sym = '0;
      end
      if (lane == NME - 1 && k != len - 1) n_wrap++;
      cur.sym[lane] = sym_t'(c);
      cur.v[lane]   = 1'b1;
      cur.sop[lane] = (k == 0);
      cur.eop[lane] = (k == len - 1);
      s = m.step(s, c, nd);
      e.st  = m.num[s];
      e.m   = m.acc[s];
      e.eop = (k == len - 1);
      expq[lane].push_back(e);
      lane++;
      if (lane == NME) begin
        int starts = 0;
        for (int i = 0; i < NME; i++) if (cur.sop[i]) starts++;
        if (starts > 1) n_multi++;
        words.push_back(cur);
        lane = 0;
      end
    end
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NME; i++) if (expq[i].size() != 0) return 0;
    return 1;
  endfunction

  // ---- drive words; returns when all are taken ----
  task automatic drive(int stall_pct, int cfg_pct);
    int idx = 0;
    @(posedge clk); #1;
    while (idx < words.size()) begin
      in_valid      = ($urandom_range(0, 99) >= stall_pct);
      in_sym        = words[idx].sym;
      in_lane_valid = words[idx].v;
      in_sop        = words[idx].sop;
      in_eop        = words[idx].eop;
      cfg_we = 0;
      if ($urandom_range(0, 99) < cfg_pct) begin
        // rewrite an entry with the value it already holds
        wr_t w;
        w = m.writes[$urandom_range(0, m.writes.size() - 1)];
        cfg_we = 1; cfg_sel = w.sel; cfg_addr = w.addr; cfg_item = w.item; cfg_default = w.dflt;
      end
      @(negedge clk);
      if (in_valid && !in_ready) n_backpressure++;
      if (cfg_we && (dut.lane_valid != '0)) n_cfg_hold++;
      if (in_valid && in_ready) idx++;
      @(posedge clk); #1;
    end
    in_valid = 0; cfg_we = 0;
    words.delete();
  endtask

  task automatic wait_done(int limit);
    int t = 0;
    while (!all_done() && t < limit) begin @(posedge clk); t++; end
    check(all_done(), "all reports arrived");
  endtask

  // ---- monitor ----
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NME; i++) begin
      if (match_valid[i]) begin
        n_reports++;
        if (expq[i].size() == 0) check(0, $sformatf("unexpected report lane %0d", i));
        else begin
          exp_t e;
          e = expq[i].pop_front();
          check(match_state[i] == state_t'(e.st) && match_bitmap[i] == match_t'(e.m)
                && match_eop[i] == e.eop,
                $sformatf("lane %0d state %0d/%0d match %0d/%0d eop %0d/%0d", i,
                          match_state[i], e.st, match_bitmap[i], e.m, match_eop[i], e.eop));
        end
      end
    end
    n_default += $countones(ev_default);
    n_chain   += $countones(ev_chain);
    n_stall   += $countones(ev_stall);
  end

  // ---- watchdog ----
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint t0, t1;
    int nw;
    in_valid = 0; in_sym = '0; in_lane_valid = '0; in_sop = '0; in_eop = '0;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_item = '0; cfg_default = '0;
    m = new(NS, ALPHA, 45);
    m.build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (m.writes[k]) begin
      cfg_we = 1; cfg_sel = m.writes[k].sel; cfg_addr = m.writes[k].addr;
      cfg_item = m.writes[k].item; cfg_default = m.writes[k].dflt;
      @(posedge clk); #1;
    end
    cfg_we = 0;

    // 1. rate: one-symbol packets fill every lane of every word
    for (int k = 0; k < 20 * NME; k++) add_packet(1, 0);
    nw = words.size();
    t0 = cyc;
    drive(0, 0);
    t1 = cyc;
    check(t1 - t0 <= longint'(nw) + 2, $sformatf("rate: %0d words took %0d cycles", nw, t1 - t0));
    wait_done(1000);

    // 2. hop: a long root-only packet moves one engine per cycle
    add_packet(3 * NME, 1);
    t0 = cyc;
    drive(0, 0);
    while (!all_done() && cyc - t0 < 1000) @(posedge clk);
    t1 = cyc;
    check(all_done() && t1 - t0 <= 3 * NME + 4,
          $sformatf("hop: %0d symbols took %0d cycles", 3 * NME, t1 - t0));

    // 3. random traffic
    for (int r = 0; r < 6; r++) begin
      for (int p = 0; p < 60; p++) begin
        int len;
        len = ($urandom_range(0, 3) == 0) ? $urandom_range(NME, 4 * NME) : $urandom_range(1, NME);
        add_packet(len, 0);
        if ($urandom_range(0, 9) == 0) flush_word();
      end
      flush_word();
      drive(r * 10, 5);
      wait_done(20000);
    end
    repeat (20) @(posedge clk);

    $display("events: reports=%0d default=%0d chained=%0d stall=%0d backpressure=%0d wrap=%0d multi=%0d cfg_hold=%0d",
             n_reports, n_default, n_chain, n_stall, n_backpressure, n_wrap, n_multi, n_cfg_hold);
    check(n_default > 0, "default transitions happened");
    check(n_chain > 0, "chained default transitions happened");
    check(n_stall > 0, "engine stalls happened");
    if (NEED_BP) check(n_backpressure > 0, "input back-pressure happened");
    check(n_wrap > 0, "last-to-first engine hand-over happened");
    check(n_multi > 0, "words with several packets happened");
    check(n_cfg_hold > 0, "table writes during traffic happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
