// Throughput of the 400 Gbit/s variant of the matcher: 256 engines, 2048-bit bus.
//
// Minimum-size packets of 64 symbols, four to a word, are offered without pause, for two
// D2FAs with about 1 % and about 4 % of the symbols needing a default transition. Every report
// is checked against the reference D2FA, and the rate is measured in the steady state, as the
// middle half of the reports over the cycles they took. Required in both cases: at least 250
// symbols per cycle, i.e. 400 Gbit/s at 200 MHz.
module tb_workload_400g;
  import regex_pkg::*;
  import tb_d2fa_pkg::*;

  localparam int NME = 256;

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

  regex_matcher #(.NUM_ME(NME)) dut (.*);

  int checks = 0, failures = 0;
  d2fa_model m;
  word_t words [$];
  exp_t  expq [NME][$];
  word_t cur;
  int    lane = 0;
  longint cyc = 0;
  longint n_default = 0, n_reports = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic void add_packet(int len);
    int s = 0, nd, c;
    exp_t e;
    for (int k = 0; k < len; k++) begin
      c = m.rand_sym();
      if (lane == 0) begin
        cur.v = '0; cur.sop = '0; cur.eop = '0; cur.sym = '0;
      end
      cur.sym[lane] = sym_t'(c);
      cur.v[lane]   = 1'b1;
      cur.sop[lane] = (k == 0);
      cur.eop[lane] = (k == len - 1);
      s = m.step(s, c, nd);
      e.st = m.num[s]; e.m = m.acc[s]; e.eop = (k == len - 1);
      expq[lane].push_back(e);
      lane++;
      if (lane == NME) begin
        words.push_back(cur);
        lane = 0;
      end
    end
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NME; i++) if (expq[i].size() != 0) return 0;
    return 1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    exp_t e;
    for (int i = 0; i < NME; i++) begin
      if (match_valid[i]) begin
        n_reports++;
        if (expq[i].size() == 0) check(0, $sformatf("unexpected report lane %0d", i));
        else begin
          e = expq[i].pop_front();
          check(match_state[i] == state_t'(e.st) && match_bitmap[i] == match_t'(e.m)
                && match_eop[i] == e.eop, $sformatf("lane %0d report", i));
        end
      end
    end
    n_default += $countones(ev_default);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int label_pct, int npkts, int minlen, int maxlen, real need_rate);
    int idx = 0, nw, tot_sym = 0;
    longint t25 = 0, t75 = 0, def0, rep0;
    real rate, pdef;
    m = new(60, 6, label_pct);
    m.other_pct = 0;
    m.build();
    // program the table: clear the previous rows, then write the new ones
    for (int a = 0; a < TT_DEPTH; a++) begin
      cfg_we = 1; cfg_sel = 0; cfg_addr = state_t'(a); cfg_item = '0; cfg_default = '0;
      @(posedge clk); #1;
    end
    foreach (m.writes[k]) begin
      cfg_we = 1; cfg_sel = m.writes[k].sel; cfg_addr = m.writes[k].addr;
      cfg_item = m.writes[k].item; cfg_default = m.writes[k].dflt;
      @(posedge clk); #1;
    end
    cfg_we = 0;
    lane = 0;
    for (int p = 0; p < npkts; p++) begin
      int len;
      len = $urandom_range(minlen, maxlen);
      tot_sym += len;
      add_packet(len);
    end
    if (lane != 0) words.push_back(cur);
    lane = 0;
    nw = words.size();
    def0 = n_default;
    rep0 = n_reports;
    // time stamps at a quarter and three quarters of the reports
    fork
      begin
        while (n_reports - rep0 < longint'(tot_sym) / 4) @(posedge clk);
        t25 = cyc;
        while (n_reports - rep0 < longint'(3 * tot_sym) / 4) @(posedge clk);
        t75 = cyc;
      end
    join_none
    @(posedge clk); #1;
    while (idx < nw) begin
      in_valid = 1;
      in_sym = words[idx].sym; in_lane_valid = words[idx].v;
      in_sop = words[idx].sop; in_eop = words[idx].eop;
      @(negedge clk);
      if (in_ready) begin
        idx++;
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    words.delete();
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    rate = real'(3 * tot_sym / 4 - tot_sym / 4) / real'(t75 - t25);
    pdef = real'(n_default - def0) / real'(tot_sym);
    $display("labelled %0d%%, packets of %0d..%0d: %0d packets, %0d symbols, default use %0.4f, %0.2f symbols/cycle = %0.1f Gbit/s at 200 MHz",
             label_pct, minlen, maxlen, npkts, tot_sym, pdef, rate, rate * 8.0 * 0.2);
    if (need_rate > 0.0) check(rate >= need_rate, $sformatf("throughput %0.2f symbols/cycle", rate));
    check(n_default > def0, "default transitions used");
  endtask

  initial begin
    in_valid = 0; in_sym = '0; in_lane_valid = '0; in_sop = '0; in_eop = '0;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_item = '0; cfg_default = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(99, 4000, 64, 64, 250.0);
    run(96, 4000, 64, 64, 250.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
