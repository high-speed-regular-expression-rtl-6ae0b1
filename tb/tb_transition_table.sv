// Self-checking test of transition_table: random labelled items and default targets are
// written through the table-write port, then looked up through both ports at once; each
// read word must equal the model and must appear exactly one cycle after its address. A write
// cycle must not disturb the read word of port A.
module tb_transition_table;
  import regex_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic     a_en, b_en, cfg_we, cfg_sel;
  state_t   a_state, b_state, a_default, b_default, cfg_addr, cfg_default;
  sym_t     a_sym, b_sym;
  tt_item_t a_item, b_item, cfg_item;

  transition_table dut (.*);

  int checks = 0, failures = 0;
  tt_item_t lab [int];
  state_t   dfl [int];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic tt_item_t lab_at(int a);
    return lab.exists(a) ? lab[a] : '0;
  endfunction
  function automatic state_t dfl_at(int a);
    return dfl.exists(a) ? dfl[a] : '0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; cfg_we = 0; cfg_sel = 0; a_state = 0; b_state = 0; a_sym = 0; b_sym = 0;
    cfg_addr = 0; cfg_item = '0; cfg_default = '0;
    @(posedge clk); #1;
    // the table starts cleared
    a_en = 1; a_state = 13'd100; a_sym = 8'd7;
    @(posedge clk); #1;
    a_en = 0;
    check(a_item == '0 && a_default == '0, "cleared at start");
    // writes
    for (int k = 0; k < 600; k++) begin
      int a;
      a = $urandom_range(0, 1023);
      cfg_we = 1;
      cfg_sel = 1'($urandom_range(0, 1));
      cfg_addr = state_t'(a);
      cfg_item = tt_item_t'({$urandom, $urandom});
      cfg_default = state_t'($urandom);
      if (cfg_sel) dfl[a] = cfg_default; else lab[a] = cfg_item;
      @(posedge clk); #1;
    end
    cfg_we = 0;
    // reads on both ports
    for (int k = 0; k < 2000; k++) begin
      state_t sa, sb;
      sym_t   ca, cb;
      tt_item_t prev_a;
      state_t prev_ad;
      bit wr;
      sa = state_t'($urandom_range(0, 1023)); ca = sym_t'($urandom);
      sb = state_t'($urandom_range(0, 1023)); cb = sym_t'($urandom);
      wr = ($urandom_range(0, 9) == 0);
      prev_a = a_item; prev_ad = a_default;
      a_en = 1; a_state = sa; a_sym = ca;
      b_en = 1; b_state = sb; b_sym = cb;
      cfg_we = wr; cfg_sel = 0; cfg_addr = state_t'(2000 + k % 100); cfg_item = '0;
      @(posedge clk); #1;
      a_en = 0; b_en = 0; cfg_we = 0;
      if (wr) check(a_item == prev_a && a_default == prev_ad, "write keeps port A word");
      else begin
        check(a_item == lab_at((int'(sa) + int'(ca)) % TT_DEPTH), "port A labelled word");
        check(a_default == dfl_at(int'(sa)), "port A default");
      end
      check(b_item == lab_at((int'(sb) + int'(cb)) % TT_DEPTH), "port B labelled word");
      check(b_default == dfl_at(int'(sb)), "port B default");
    end
    // address wrap-around of the row
    cfg_we = 1; cfg_sel = 0; cfg_addr = 13'd5; cfg_item = '{valid: 1, sym: 8'd10, next: 13'd77, match: 1'b1};
    @(posedge clk); #1;
    cfg_we = 0; a_en = 1; a_state = state_t'(TT_DEPTH - 5); a_sym = 8'd10;
    @(posedge clk); #1;
    a_en = 0;
    check(a_item.valid && a_item.next == 13'd77, "row wraps around the table end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
