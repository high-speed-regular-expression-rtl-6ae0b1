// Self-checking test of one matching engine, with the test bench playing the packet-buffer
// lane, the previous engine (incoming states) and the next engine (random out_ready).
//
// The lane carries symbols of many packets; for a symbol that does not start a packet the
// test offers, after a random delay, a random D2FA state as the incoming state. The reference
// D2FA gives the expected state and match flag after every symbol. Checked: every match
// report in lane order; every state handed to the next engine, in order, and only for symbols
// that do not end a packet; a hit from an idle engine is reported in the cycle after its table
// read. Required to happen: default transitions, chained defaults, a hit waiting behind an
// older miss (reordering by the order queue), FIFO_standard full, and engine stalls.
module tb_matching_engine;
  import regex_pkg::*;
  import tb_d2fa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      lane_valid, lane_pop, in_valid, in_ready, out_valid, out_ready;
  lane_sym_t lane_data;
  state_t    in_state, out_state, match_state;
  logic      match_valid, match_eop;
  match_t    match_bitmap;
  logic      cfg_we, cfg_sel;
  state_t    cfg_addr, cfg_default;
  tt_item_t  cfg_item;
  logic      ev_default, ev_chain, ev_stall;

  matching_engine dut (.*);

  typedef struct { int sym; bit sop; bit eop; int from; } item_t;
  typedef struct { int st; bit m; bit eop; } exp_t;

  int checks = 0, failures = 0;
  int n_default = 0, n_chain = 0, n_stall = 0, n_wait_behind = 0, n_std_full = 0;
  d2fa_model m;
  item_t lane_q [$];
  exp_t  rep_q [$];
  int    out_q [$];
  longint cyc = 0;
  int    in_delay = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lane and incoming state follow the head of the lane queue
  function automatic void update_lane();
    lane_valid = (lane_q.size() != 0);
    lane_data  = '0;
    in_valid   = 0;
    in_state   = '0;
    if (lane_q.size() != 0) begin
      lane_data = '{sym: sym_t'(lane_q[0].sym), sop: lane_q[0].sop, eop: lane_q[0].eop};
      in_valid  = !lane_q[0].sop && (in_delay == 0);
      in_state  = state_t'(m.num[lane_q[0].from]);
    end
  endfunction

  // checker and lane advance, sampled before each rising edge
  always @(negedge clk) if (rst_n) begin
    exp_t e;
    if (match_valid) begin
      check(rep_q.size() != 0, "report expected");
      if (rep_q.size() != 0) begin
        e = rep_q.pop_front();
        check(match_state == state_t'(e.st) && match_bitmap == match_t'(e.m) && match_eop == e.eop,
              $sformatf("report state %0d/%0d", match_state, e.st));
      end
    end
    if (out_valid && out_ready) begin
      check(out_q.size() != 0, "hand-over expected");
      if (out_q.size() != 0) check(out_state == state_t'(out_q.pop_front()), "hand-over state");
    end
    if (lane_pop) begin
      check(lane_q.size() != 0 && (lane_q[0].sop || in_valid), "pop only with a state");
      if (lane_q.size() != 0) void'(lane_q.pop_front());
    end
    if (in_valid && in_ready) check(lane_pop, "incoming state taken with its symbol");
    if (ev_default) n_default++;
    if (ev_chain) n_chain++;
    if (ev_stall) n_stall++;
    if (dut.ord_valid && dut.ord_dout && dut.std_valid) n_wait_behind++;
    if (dut.std_full) n_std_full++;
  end

  always @(posedge clk) begin
    #1;
    out_ready = ($urandom_range(0, 9) < 6);
    in_delay  = (in_delay > 0) ? in_delay - 1 : ($urandom_range(0, 3) == 0 ? $urandom_range(1, 3) : 0);
    update_lane();
  end

  task automatic add_symbol(int c, bit sop, bit eop, int from);
    item_t it;
    exp_t  e;
    int    nd, nx;
    it.sym = c; it.sop = sop; it.eop = eop; it.from = sop ? 0 : from;
    nx = m.step(it.from, c, nd);
    e.st = m.num[nx]; e.m = m.acc[nx]; e.eop = eop;
    rep_q.push_back(e);
    if (!eop) out_q.push_back(m.num[nx]);
    lane_q.push_back(it);
    update_lane();
  endtask

  initial begin
    int t0;
    m = new(40, 6, 35);
    m.build();
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_item = '0; cfg_default = '0;
    out_ready = 1;
    update_lane();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (m.writes[k]) begin
      cfg_we = 1; cfg_sel = m.writes[k].sel; cfg_addr = m.writes[k].addr;
      cfg_item = m.writes[k].item; cfg_default = m.writes[k].dflt;
      @(posedge clk); #1;
    end
    cfg_we = 0;
    // latency: a packet start always hits at the root
    #2;
    add_symbol(3, 1, 1, 0);
    @(negedge clk);
    check(lane_pop, "idle engine starts at once");
    @(negedge clk);
    check(match_valid, "report in the cycle after the table read");
    repeat (3) @(posedge clk);
    #2;
    // random traffic
    for (int k = 0; k < 3000; k++)
      add_symbol(m.rand_sym(), ($urandom_range(0, 2) == 0), ($urandom_range(0, 2) == 0),
                 $urandom_range(0, m.num_states - 1));
    t0 = 0;
    while ((lane_q.size() != 0 || rep_q.size() != 0) && t0 < 50000) begin @(posedge clk); t0++; end
    check(lane_q.size() == 0 && rep_q.size() == 0 && out_q.size() == 0, "everything drained");
    $display("events: default=%0d chain=%0d stall=%0d wait_behind=%0d std_full=%0d",
             n_default, n_chain, n_stall, n_wait_behind, n_std_full);
    check(n_default > 0 && n_chain > 0 && n_stall > 0 && n_wait_behind > 0 && n_std_full > 0,
          "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
