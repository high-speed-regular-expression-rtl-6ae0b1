// D2FA_0: the standard-transition unit of a matching engine.
//
// Each cycle it may start one symbol: the head of its packet-buffer lane together with the
// state to start from, which is START_STATE for the first symbol of a packet and otherwise the
// state handed over by the previous matching engine (in_valid/in_ready handshake). Starting a
// symbol reads port A of the transition table; one cycle later the unit reports the result
// (res_valid). On a hit (res_hit) res_state is the labelled target and res_match its match
// bitmap, bound for FIFO_standard. On a miss res_state is the default-transition target of
// the starting state, which together with res_sym goes to FIFO_default for D2FA_1. The
// engine allows a start with `space`, which it computes from registers only, so in_ready
// never depends on the next engine's ready and the ring of engines has no combinational loop.
// A table write (cfg_busy) holds the unit for that cycle because it takes port A.
// The split into hit and miss follows the original architecture; the timing and handshake are this
// design's own.
module d2fa0
  import regex_pkg::*;
#(
  parameter state_t START_STATE = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  // packet-buffer lane
  input  logic      lane_valid,
  input  lane_sym_t lane_data,
  output logic      lane_pop,
  // state from the previous matching engine
  input  logic      in_valid,
  input  state_t    in_state,
  output logic      in_ready,
  // room for one more result in the engine
  input  logic      space,
  input  logic      cfg_busy,
  // port A of the transition table
  output logic      tt_en,
  output state_t    tt_state,
  output sym_t      tt_sym,
  input  tt_item_t  tt_item,
  input  state_t    tt_default,
  // result, one cycle after the start
  output logic      res_valid,
  output logic      res_hit,
  output state_t    res_state,
  output match_t    res_match,
  output sym_t      res_sym,
  output logic      res_eop
);

  logic can_start, start;
  sym_t sym_q;
  logic eop_q;

  assign can_start = lane_valid && space && !cfg_busy;
  assign in_ready  = can_start && !lane_data.sop;
  assign start     = can_start && (lane_data.sop || in_valid);
  assign lane_pop  = start;

  assign tt_en    = start;
  assign tt_state = lane_data.sop ? START_STATE : in_state;
  assign tt_sym   = lane_data.sym;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
    end else begin
      res_valid <= start;
    end
    if (start) begin
      sym_q <= lane_data.sym;
      eop_q <= lane_data.eop;
    end
  end

  assign res_hit   = tt_item.valid && (tt_item.sym == sym_q);
  assign res_state = res_hit ? tt_item.next : tt_default;
  assign res_match = tt_item.match;
  assign res_sym   = sym_q;
  assign res_eop   = eop_q;

endmodule
