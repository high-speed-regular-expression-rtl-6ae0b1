// Pipelined memory-based regular expression matcher (top).
//
// A packet buffer splits every input word of NUM_ME symbols into NUM_ME lanes, and matching
// engine i runs the D2FA over lane i. Packets are packed back to back across lanes, so
// consecutive symbols of a packet sit in consecutive lanes: engine i hands the state it
// reached to engine i+1, and the last engine hands its state back to engine 0 for the next
// word. A packet start needs no state and begins at once in whichever lane it falls, so
// while one packet's state travels along the engines, other packets keep the remaining
// engines busy. Each engine reports, per symbol and in lane order, the state reached and its
// match bitmap.
//
// The default of 64 engines with 8-bit symbols gives the 512-bit bus of the 100 Gbps
// configuration at 200 MHz; 256 engines give the 2048-bit, 400 Gbps one. Every engine has its
// own copy of the transition table; a table write (cfg_*) is broadcast to all copies and
// holds every engine's D2FA_0 for that cycle, so the rule set can be changed while running.
// The ring of engines, the packet buffer and the per-engine tables follow the original architecture; the
// flags, handshakes and table layout are this design's own. ev_* are per-engine event pulses
// (see matching_engine).
module regex_matcher
  import regex_pkg::*;
#(
  parameter int unsigned NUM_ME      = 64,
  parameter int unsigned FIFO_DEPTH  = 3,
  parameter int unsigned PB_DEPTH    = 2048,
  parameter state_t      START_STATE = '0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input bus: NUM_ME symbols per word
  input  logic                     in_valid,
  output logic                     in_ready,
  input  sym_t   [NUM_ME-1:0]      in_sym,
  input  logic   [NUM_ME-1:0]      in_lane_valid,
  input  logic   [NUM_ME-1:0]      in_sop,
  input  logic   [NUM_ME-1:0]      in_eop,
  // match reports, one per symbol, per engine
  output logic   [NUM_ME-1:0]      match_valid,
  output state_t [NUM_ME-1:0]      match_state,
  output match_t [NUM_ME-1:0]      match_bitmap,
  output logic   [NUM_ME-1:0]      match_eop,
  // table update
  input  logic                     cfg_we,
  input  logic                     cfg_sel,
  input  state_t                   cfg_addr,
  input  tt_item_t                 cfg_item,
  input  state_t                   cfg_default,
  // events
  output logic   [NUM_ME-1:0]      ev_default,
  output logic   [NUM_ME-1:0]      ev_chain,
  output logic   [NUM_ME-1:0]      ev_stall
);

  logic      [NUM_ME-1:0] lane_valid, lane_pop;
  lane_sym_t [NUM_ME-1:0] lane_data;
  logic      [NUM_ME-1:0] st_valid, st_ready;   // state link from engine i to engine i+1
  state_t    [NUM_ME-1:0] st_state;

  packet_buffer #(.NUM_LANES(NUM_ME), .PB_DEPTH(PB_DEPTH)) u_buffer (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym, .in_lane_valid, .in_sop, .in_eop,
    .lane_valid, .lane_data, .lane_pop
  );

  for (genvar i = 0; i < NUM_ME; i++) begin : g_me
    localparam int unsigned PREV = (i == 0) ? NUM_ME - 1 : i - 1;
    matching_engine #(.FIFO_DEPTH(FIFO_DEPTH), .START_STATE(START_STATE)) u_me (
      .clk, .rst_n,
      .lane_valid(lane_valid[i]), .lane_data(lane_data[i]), .lane_pop(lane_pop[i]),
      .in_valid(st_valid[PREV]), .in_state(st_state[PREV]), .in_ready(st_ready[PREV]),
      .out_valid(st_valid[i]), .out_state(st_state[i]), .out_ready(st_ready[i]),
      .match_valid(match_valid[i]), .match_state(match_state[i]),
      .match_bitmap(match_bitmap[i]), .match_eop(match_eop[i]),
      .cfg_we, .cfg_sel, .cfg_addr, .cfg_item, .cfg_default,
      .ev_default(ev_default[i]), .ev_chain(ev_chain[i]), .ev_stall(ev_stall[i])
    );
  end

endmodule
