// Self-checking test of d2fa0 with a transition table holding a random D2FA.
//
// Every cycle the lane head, the incoming state, the room signal and a table write are set at
// random. The test predicts from its own rules whether a symbol starts (a symbol waits for
// room, for a free port A and, unless it starts a packet, for an incoming state) and checks
// lane_pop and in_ready against that. One cycle after each start it checks the result against
// the reference D2FA: a hit gives the labelled target and its match flag, a miss gives the
// default target of the starting state together with the symbol and end flag.
module tb_d2fa0;
  import regex_pkg::*;
  import tb_d2fa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      lane_valid, lane_pop, in_valid, in_ready, space, cfg_busy;
  lane_sym_t lane_data;
  state_t    in_state;
  logic      a_en, b_en, cfg_sel;
  state_t    a_state, b_state, a_default, b_default, cfg_addr, cfg_default;
  sym_t      a_sym, b_sym;
  tt_item_t  a_item, b_item, cfg_item;
  logic      res_valid, res_hit, res_eop;
  state_t    res_state;
  match_t    res_match;
  sym_t      res_sym;

  transition_table u_tt (.clk, .a_en, .a_state, .a_sym, .a_item, .a_default,
                         .b_en, .b_state, .b_sym, .b_item, .b_default,
                         .cfg_we(cfg_busy), .cfg_sel, .cfg_addr, .cfg_item, .cfg_default);

  d2fa0 dut (.clk, .rst_n, .lane_valid, .lane_data, .lane_pop, .in_valid, .in_state, .in_ready,
             .space, .cfg_busy, .tt_en(a_en), .tt_state(a_state), .tt_sym(a_sym),
             .tt_item(a_item), .tt_default(a_default), .res_valid, .res_hit, .res_state,
             .res_match, .res_sym, .res_eop);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  d2fa_model m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_start, prev_start, exp_hit;
    int idx, c, prev_idx, prev_c, prev_eop;
    m = new(30, 6, 40);
    m.build();
    lane_valid = 0; lane_data = '0; in_valid = 0; in_state = '0; space = 0; cfg_busy = 0;
    cfg_sel = 0; cfg_addr = '0; cfg_item = '0; cfg_default = '0; b_en = 0; b_state = '0; b_sym = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (m.writes[k]) begin
      cfg_busy = 1; cfg_sel = m.writes[k].sel; cfg_addr = m.writes[k].addr;
      cfg_item = m.writes[k].item; cfg_default = m.writes[k].dflt;
      @(posedge clk); #1;
    end
    cfg_busy = 0;
    @(posedge clk); #1;
    check(!res_valid, "no result without a start");
    prev_start = 0;
    for (int t = 0; t < 5000; t++) begin
      wr_t w;
      idx = $urandom_range(0, m.num_states - 1);
      c   = m.rand_sym();
      lane_valid = ($urandom_range(0, 9) < 8);
      lane_data  = '{sym: sym_t'(c), sop: ($urandom_range(0, 3) == 0), eop: 1'($urandom)};
      in_valid   = ($urandom_range(0, 9) < 7);
      in_state   = state_t'(m.num[idx]);
      space      = ($urandom_range(0, 9) < 8);
      cfg_busy   = ($urandom_range(0, 19) == 0);
      w = m.writes[$urandom_range(0, m.writes.size() - 1)];
      cfg_sel = w.sel; cfg_addr = w.addr; cfg_item = w.item; cfg_default = w.dflt;
      #1;
      // result of the previous cycle's start
      check(res_valid == prev_start, "result one cycle after start");
      if (prev_start) begin
        exp_hit = (m.lab[prev_idx][prev_c] >= 0);
        check(res_hit == exp_hit, "hit/miss");
        check(res_sym == sym_t'(prev_c) && res_eop == 1'(prev_eop), "symbol and end flag");
        if (exp_hit) begin
          n_hit++;
          check(res_state == state_t'(m.num[m.lab[prev_idx][prev_c]]), "labelled target");
          check(res_match == match_t'(m.acc[m.lab[prev_idx][prev_c]]), "match flag");
        end else begin
          n_miss++;
          check(res_state == state_t'(m.num[m.dflt[prev_idx]]), "default target");
        end
      end
      // this cycle's start
      exp_start = lane_valid && space && !cfg_busy && (lane_data.sop || in_valid);
      check(lane_pop == exp_start, "lane_pop");
      check(in_ready == (lane_valid && space && !cfg_busy && !lane_data.sop), "in_ready");
      prev_start = exp_start;
      prev_idx   = lane_data.sop ? 0 : idx;
      prev_c     = c;
      prev_eop   = int'(lane_data.eop);
      @(posedge clk); #1;
    end
    check(n_hit > 100 && n_miss > 100, "hits and misses both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
