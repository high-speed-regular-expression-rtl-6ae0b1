// Shared types and constants of the pipelined memory-based regular expression matcher.
//
// A state is 13 bits and a symbol 8 bits, as in the sample configuration of the design
// (transition table of 8192 items, FIFO_standard entries of 13 bits, FIFO_default entries of
// 13 + 8 bits). The table depth is 2**STATE_W because a state number is also the base address
// of that state's row in the table (row displacement, see transition_table). The width of the
// match bitmap carried by each labelled transition is this design's own choice (1 bit keeps a
// table item, labelled plus default part, at 36 bits, which is 9 BRAM36 blocks at 8192 x 4).
// The end-of-packet flag added to the FIFO entries is also this design's own.
package regex_pkg;

  localparam int unsigned SYM_W    = 8;
  localparam int unsigned STATE_W  = 13;
  localparam int unsigned TT_DEPTH = 1 << STATE_W;
  localparam int unsigned MATCH_W  = 1;

  typedef logic [SYM_W-1:0]   sym_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [MATCH_W-1:0] match_t;

  // Labelled-transition item. It is found at address (state + symbol) mod TT_DEPTH and belongs
  // to the lookup (state, symbol) when it is valid and its symbol tag equals the symbol.
  typedef struct packed {
    logic   valid;
    sym_t   sym;
    state_t next;
    match_t match;   // match bitmap of the target state
  } tt_item_t;

  // One symbol of a packet-buffer lane.
  typedef struct packed {
    sym_t sym;
    logic sop;       // first symbol of a packet: start from the initial state
    logic eop;       // last symbol of a packet: no state is passed on
  } lane_sym_t;

  // FIFO_standard entry: the state reached after a symbol.
  typedef struct packed {
    state_t state;
    match_t match;
    logic   eop;
  } std_entry_t;

  // FIFO_default entry: the state reached through a default transition and the symbol that is
  // still to be accepted.
  typedef struct packed {
    state_t state;
    sym_t   sym;
    logic   eop;
  } def_entry_t;

  // Row-displacement address of the labelled transition (state, symbol).
  function automatic logic [STATE_W-1:0] tt_addr(state_t s, sym_t c);
    return STATE_W'(s + STATE_W'(c));
  endfunction

endpackage
