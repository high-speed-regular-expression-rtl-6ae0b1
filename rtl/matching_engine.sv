// Matching engine (ME): runs the D2FA over one lane of the packet buffer.
//
// D2FA_0 starts one symbol per cycle from the state handed over by the previous engine (or
// from START_STATE at the start of a packet) and looks up its labelled transition in port A of
// the transition table. A hit yields the next state, which goes to FIFO_standard; a miss
// yields the default-transition target, which goes with the symbol to FIFO_default, where
// D2FA_1 follows further default transitions through port B until the symbol is accepted.
// Both FIFOs hold FIFO_DEPTH entries and fall through when empty, so a hit reaches the next
// engine in the cycle after its table read (one engine per cycle, as in the processing
// schedule of the architecture).
//
// Symbols of different packets may finish out of order (a hit behind a miss), but the next
// engine needs the states in lane order. A one-bit order queue therefore records, per started
// symbol, whether its result comes from FIFO_standard (0) or D2FA_1 (1), and the output
// multiplexer takes results in that order. Every result leaves as a match report
// (match_valid, match_state, match_bitmap, match_eop); a result that is not the last symbol of
// its packet is also handed to the next engine (out_valid/out_ready) and waits for it. D2FA_0
// starts a symbol only when FIFO_standard, FIFO_default and the order queue all have room for
// the result in flight, counted from registers only. Events for statistics: ev_default (a
// symbol needed a default transition), ev_chain (D2FA_1 followed one more default) and
// ev_stall (a symbol was waiting but the engine had no room).
// The two automata, one shared dual-port table, the two FIFOs with three entries and the
// multiplexer producing state and match bitmap follow the original architecture; the order queue, the
// bypass and the handshakes are this design's own.
module matching_engine
  import regex_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 3,
  parameter state_t      START_STATE = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  // packet-buffer lane
  input  logic      lane_valid,
  input  lane_sym_t lane_data,
  output logic      lane_pop,
  // state from the previous engine
  input  logic      in_valid,
  input  state_t    in_state,
  output logic      in_ready,
  // state to the next engine
  output logic      out_valid,
  output state_t    out_state,
  input  logic      out_ready,
  // match report, one per symbol, in lane order
  output logic      match_valid,
  output state_t    match_state,
  output match_t    match_bitmap,
  output logic      match_eop,
  // table update (broadcast to all engines)
  input  logic      cfg_we,
  input  logic      cfg_sel,
  input  state_t    cfg_addr,
  input  tt_item_t  cfg_item,
  input  state_t    cfg_default,
  // events
  output logic      ev_default,
  output logic      ev_chain,
  output logic      ev_stall
);

  localparam int unsigned ORD_DEPTH = 2 * FIFO_DEPTH + 2;
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned OCW = $clog2(ORD_DEPTH + 1);

  // table ports
  logic     a_en, b_en;
  state_t   a_state, b_state, a_default, b_default;
  sym_t     a_sym, b_sym;
  tt_item_t a_item, b_item;

  // D2FA_0 result
  logic   r0_valid, r0_hit, r0_eop;
  state_t r0_state;
  match_t r0_match;
  sym_t   r0_sym;

  // FIFOs
  std_entry_t std_din, std_dout;
  def_entry_t def_din, def_dout;
  logic       std_push, std_pop, std_valid, std_full;
  logic       def_push, def_pop, def_valid, def_full;
  logic       ord_push, ord_pop, ord_valid, ord_full, ord_din, ord_dout;
  logic [FCW-1:0] std_count, def_count;
  logic [OCW-1:0] ord_count;

  // D2FA_1 result
  logic   r1_valid, r1_ready, r1_eop;
  state_t r1_state;
  match_t r1_match;

  logic space;
  logic sel_valid, sel_eop, emit;
  state_t sel_state;
  match_t sel_match;

  // Room for the result of a start made now, allowing for the result already in flight.
  assign space = (32'(std_count) + 32'(r0_valid) < FIFO_DEPTH)
              && (32'(def_count) + 32'(r0_valid) < FIFO_DEPTH)
              && (32'(ord_count) + 32'(r0_valid) < ORD_DEPTH);

  transition_table u_table (
    .clk,
    .a_en, .a_state, .a_sym, .a_item, .a_default,
    .b_en, .b_state, .b_sym, .b_item, .b_default,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_item, .cfg_default
  );

  d2fa0 #(.START_STATE(START_STATE)) u_d2fa0 (
    .clk, .rst_n,
    .lane_valid, .lane_data, .lane_pop,
    .in_valid, .in_state, .in_ready,
    .space, .cfg_busy(cfg_we),
    .tt_en(a_en), .tt_state(a_state), .tt_sym(a_sym), .tt_item(a_item), .tt_default(a_default),
    .res_valid(r0_valid), .res_hit(r0_hit), .res_state(r0_state), .res_match(r0_match),
    .res_sym(r0_sym), .res_eop(r0_eop)
  );

  assign std_push = r0_valid && r0_hit;
  assign std_din  = '{state: r0_state, match: r0_match, eop: r0_eop};
  assign def_push = r0_valid && !r0_hit;
  assign def_din  = '{state: r0_state, sym: r0_sym, eop: r0_eop};
  assign ord_push = r0_valid;
  assign ord_din  = !r0_hit;

  sync_fifo #(.T(std_entry_t), .DEPTH(FIFO_DEPTH), .BYPASS(1'b1)) u_fifo_standard (
    .clk, .rst_n, .push(std_push), .din(std_din), .pop(std_pop),
    .dout(std_dout), .valid(std_valid), .full(std_full), .count(std_count)
  );

  sync_fifo #(.T(def_entry_t), .DEPTH(FIFO_DEPTH), .BYPASS(1'b1)) u_fifo_default (
    .clk, .rst_n, .push(def_push), .din(def_din), .pop(def_pop),
    .dout(def_dout), .valid(def_valid), .full(def_full), .count(def_count)
  );

  sync_fifo #(.T(logic), .DEPTH(ORD_DEPTH), .BYPASS(1'b1)) u_order (
    .clk, .rst_n, .push(ord_push), .din(ord_din), .pop(ord_pop),
    .dout(ord_dout), .valid(ord_valid), .full(ord_full), .count(ord_count)
  );

  d2fa1 u_d2fa1 (
    .clk, .rst_n,
    .fifo_valid(def_valid), .fifo_data(def_dout), .fifo_pop(def_pop),
    .tt_en(b_en), .tt_state(b_state), .tt_sym(b_sym), .tt_item(b_item), .tt_default(b_default),
    .res_valid(r1_valid), .res_state(r1_state), .res_match(r1_match), .res_eop(r1_eop),
    .res_ready(r1_ready), .iter(ev_chain)
  );

  // Output multiplexer, in the order the symbols were started.
  always_comb begin
    if (!ord_dout) begin
      sel_valid = ord_valid && std_valid;
      sel_state = std_dout.state;
      sel_match = std_dout.match;
      sel_eop   = std_dout.eop;
    end else begin
      sel_valid = ord_valid && r1_valid;
      sel_state = r1_state;
      sel_match = r1_match;
      sel_eop   = r1_eop;
    end
  end

  assign emit     = sel_valid && (sel_eop || out_ready);
  assign ord_pop  = emit;
  assign std_pop  = emit && !ord_dout;
  assign r1_ready = emit && ord_dout;

  assign out_valid = sel_valid && !sel_eop;
  assign out_state = sel_state;

  assign match_valid  = emit;
  assign match_state  = sel_state;
  assign match_bitmap = sel_match;
  assign match_eop    = sel_eop;

  assign ev_default = def_push;
  assign ev_stall   = lane_valid && !space;

  a_std_room: assert property (@(posedge clk) disable iff (!rst_n) !(std_push && std_full));
  a_def_room: assert property (@(posedge clk) disable iff (!rst_n) !(def_push && def_full));
  a_ord_room: assert property (@(posedge clk) disable iff (!rst_n) !(ord_push && ord_full));

endmodule
