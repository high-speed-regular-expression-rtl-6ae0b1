// D2FA_1: the default-transition unit of a matching engine.
//
// It works on one FIFO_default entry at a time: a state reached through a default transition
// and the symbol still to be accepted. It looks the pair up through port B of the transition
// table; on a miss it follows the default transition of that state and looks up again, one
// table read per cycle, until a labelled transition accepts the symbol. The target state, its
// match bitmap and the entry's end-of-packet flag are then shown on res_* with res_valid,
// straight from the table output (which holds while no read is made), until the engine's
// output multiplexer takes them (res_ready). The next entry is read in that same cycle, so
// entries that need only one default transition pass at one per cycle, one cycle behind the
// hits of D2FA_0. The table must guarantee that every default chain ends in a state that
// labels the symbol (as the root of a D2FA labels all symbols). iter pulses for every table
// read after the first one of an entry, that is, for every further default transition.
// Following defaults with a second automaton on the second port follows the original architecture; the
// control and timing are this design's own.
module d2fa1
  import regex_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // FIFO_default
  input  logic       fifo_valid,
  input  def_entry_t fifo_data,
  output logic       fifo_pop,
  // port B of the transition table
  output logic       tt_en,
  output state_t     tt_state,
  output sym_t       tt_sym,
  input  tt_item_t   tt_item,
  input  state_t     tt_default,
  // result
  output logic       res_valid,
  output state_t     res_state,
  output match_t     res_match,
  output logic       res_eop,
  input  logic       res_ready,
  output logic       iter
);

  logic busy;        // the table output holds the word of the current entry
  sym_t sym_q;
  logic eop_q;
  logic hit, again, done;

  assign hit   = busy && tt_item.valid && (tt_item.sym == sym_q);
  assign again = busy && !hit;
  assign done  = hit && res_ready;

  // A new entry may start in the cycle its predecessor's result is taken.
  assign fifo_pop = fifo_valid && (!busy || done);
  assign tt_en    = fifo_pop || again;
  assign tt_state = again ? tt_default : fifo_data.state;
  assign tt_sym   = again ? sym_q : fifo_data.sym;
  assign iter     = again;

  // The result comes straight from the table output, which holds while no read is made.
  assign res_valid = hit;
  assign res_state = tt_item.next;
  assign res_match = tt_item.match;
  assign res_eop   = eop_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
    end else begin
      if (fifo_pop) begin
        busy  <= 1'b1;
        sym_q <= fifo_data.sym;
        eop_q <= fifo_data.eop;
      end else if (done) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
