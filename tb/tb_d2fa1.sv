// Self-checking test of d2fa1 with a transition table holding a random D2FA whose default
// chains are several transitions long.
//
// A producer offers random (state, symbol) entries as FIFO_default would; a consumer takes
// results with random back-pressure. Every result must equal the reference D2FA step from
// that state (target and match flag, end flag kept), results must come in entry order, and the
// unit must spend exactly one cycle per table read: a result is shown 1 + d cycles after its
// entry is taken, d being the number of further default transitions, which is also the number
// of iter pulses. A new entry may be taken in the cycle the previous result is.
module tb_d2fa1;
  import regex_pkg::*;
  import tb_d2fa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fifo_valid, fifo_pop, res_valid, res_eop, res_ready, iter;
  def_entry_t fifo_data;
  state_t     res_state;
  match_t     res_match;
  logic       a_en, b_en, cfg_we, cfg_sel;
  state_t     a_state, b_state, a_default, b_default, cfg_addr, cfg_default;
  sym_t       a_sym, b_sym;
  tt_item_t   a_item, b_item, cfg_item;

  transition_table u_tt (.*);

  d2fa1 dut (.clk, .rst_n, .fifo_valid, .fifo_data, .fifo_pop, .tt_en(b_en), .tt_state(b_state),
             .tt_sym(b_sym), .tt_item(b_item), .tt_default(b_default), .res_valid, .res_state,
             .res_match, .res_eop, .res_ready, .iter);

  typedef struct { int st; bit m; bit eop; int ndef; } exp_t;

  int checks = 0, failures = 0, n_iter = 0, n_multi = 0, n_done = 0;
  d2fa_model m;
  exp_t expq [$];
  longint cyc = 0, t_pop;

  always @(posedge clk) cyc <= cyc + 1;

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

  always @(negedge clk) if (rst_n) if (iter) n_iter++;

  initial begin
    int idx, c, nd, nx, iters_at_pop;
    exp_t e;
    m = new(40, 6, 35);
    m.build();
    fifo_valid = 0; fifo_data = '0; res_ready = 0; a_en = 0; a_state = '0; a_sym = '0;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_item = '0; cfg_default = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (m.writes[k]) begin
      cfg_we = 1; cfg_sel = m.writes[k].sel; cfg_addr = m.writes[k].addr;
      cfg_item = m.writes[k].item; cfg_default = m.writes[k].dflt;
      @(posedge clk); #1;
    end
    cfg_we = 0;
    // new entry offered
    idx = $urandom_range(0, m.num_states - 1);
    c   = m.rand_sym();
    for (int t = 0; t < 6000; t++) begin
      fifo_valid = ($urandom_range(0, 9) < 7);
      fifo_data  = '{state: state_t'(m.num[idx]), sym: sym_t'(c), eop: 1'(t & 1)};
      res_ready  = ($urandom_range(0, 9) < 6);
      #1;
      if (res_valid && res_ready) begin
        check(expq.size() != 0, "result expected");
        if (expq.size() != 0) begin
          e = expq.pop_front();
          check(res_state == state_t'(e.st) && res_match == match_t'(e.m) && res_eop == e.eop,
                "result value");
          // 1 + ndef reads, one cycle each
          check(n_iter - iters_at_pop == e.ndef, "one iter pulse per further default");
          n_done++;
        end
      end
      if (fifo_pop) begin
        check(fifo_valid && (expq.size() == 0), "takes an entry only when idle or finishing");
        nx = m.step(idx, c, nd);
        // the entry's state was reached by a default already; nd more defaults follow here
        e.st = m.num[nx]; e.m = m.acc[nx]; e.eop = 1'(t & 1); e.ndef = nd;
        if (nd > 1) n_multi++;
        expq.push_back(e);
        t_pop = cyc;
        iters_at_pop = n_iter;
        idx = $urandom_range(0, m.num_states - 1);
        c   = m.rand_sym();
      end
      if (expq.size() != 0 && !res_valid && cyc - t_pop > 0) begin
        // still searching: bounded by the chain length
        check(cyc - t_pop <= longint'(expq[0].ndef) + 1, "one table read per cycle");
      end
      @(posedge clk); #1;
    end
    check(n_done > 500 && n_multi > 0, "many entries, some with chains of several defaults");
    $display("done=%0d chained=%0d iter=%0d", n_done, n_multi, n_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
