// Transition table of one matching engine: a dual-port block memory shared by D2FA_0
// (port A) and D2FA_1 (port B).
//
// The table holds a delayed-input DFA (D2FA) in two arrays of TT_DEPTH words, read together
// by each port. The labelled array holds the labelled transitions in row-displacement form:
// the transition (s, c) lives at address (s + c) mod TT_DEPTH and carries the symbol c as its
// tag, so a state number is the base of its row and a lookup needs one read. The default
// array holds, at address s, the target of the default transition of state s. A lookup
// (s, c) is a hit when the labelled word is valid and its tag equals c; otherwise the caller
// follows the default. Reads are synchronous: the address is taken on a rising edge with
// a_en/b_en and the words appear one cycle later and stay until the next read of that port.
// Writes use port A, like a true dual-port block RAM: cfg_we writes one array (cfg_sel = 0
// labelled, 1 default) at cfg_addr and takes port A for that cycle. Both arrays start cleared,
// as FPGA block RAM does after configuration, so an unwritten labelled word is invalid.
// The depth and state width follow the original architecture; the row-displacement layout and the
// separate default array are this design's choices (the original architecture leaves the layout open).
module transition_table
  import regex_pkg::*;
(
  input  logic     clk,
  // port A: D2FA_0 lookups and table writes
  input  logic     a_en,
  input  state_t   a_state,
  input  sym_t     a_sym,
  output tt_item_t a_item,
  output state_t   a_default,
  // port B: D2FA_1 lookups
  input  logic     b_en,
  input  state_t   b_state,
  input  sym_t     b_sym,
  output tt_item_t b_item,
  output state_t   b_default,
  // table update through port A
  input  logic     cfg_we,
  input  logic     cfg_sel,
  input  state_t   cfg_addr,
  input  tt_item_t cfg_item,
  input  state_t   cfg_default
);

  tt_item_t lab_mem [TT_DEPTH];
  state_t   def_mem [TT_DEPTH];

  initial begin
    for (int i = 0; i < TT_DEPTH; i++) begin
      lab_mem[i] = '0;
      def_mem[i] = '0;
    end
  end

  // port A of the labelled array
  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (!cfg_sel) lab_mem[cfg_addr] <= cfg_item;
    end else if (a_en) begin
      a_item <= lab_mem[tt_addr(a_state, a_sym)];
    end
  end

  // port A of the default array
  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_sel) def_mem[cfg_addr] <= cfg_default;
    end else if (a_en) begin
      a_default <= def_mem[a_state];
    end
  end

  // port B, read only
  always_ff @(posedge clk) begin
    if (b_en) begin
      b_item    <= lab_mem[tt_addr(b_state, b_sym)];
      b_default <= def_mem[b_state];
    end
  end

endmodule
