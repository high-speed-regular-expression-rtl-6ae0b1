// Packet buffer: splits the wide input bus into one lane per matching engine.
//
// An input word carries NUM_LANES symbols of SYM_W bits (N = NUM_LANES * SYM_W bits in all),
// each with its own valid, start-of-packet and end-of-packet flag. Packets are packed
// back to back in lane order: a packet that does not end in the last lane continues in the
// next lane, and one that does continues in lane 0 of the next word. Every valid symbol is
// written into the FIFO of its lane (PB_DEPTH entries); invalid symbols are dropped. Each
// lane's FIFO is read by its own matching engine at its own pace, so the engines can run
// skewed in time, each one a cycle behind the engine that hands it a state. A word is taken
// (in_valid && in_ready) only when every lane FIFO has room, so in_ready depends on registers
// only. The per-lane buffering and the packing of packets across lanes follow the original architecture;
// the flags, the FIFO depth and the all-lanes-ready rule are this design's own.
module packet_buffer
  import regex_pkg::*;
#(
  parameter int unsigned NUM_LANES = 64,
  parameter int unsigned PB_DEPTH  = 2048
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  sym_t [NUM_LANES-1:0]   in_sym,
  input  logic [NUM_LANES-1:0]   in_lane_valid,
  input  logic [NUM_LANES-1:0]   in_sop,
  input  logic [NUM_LANES-1:0]   in_eop,
  output logic [NUM_LANES-1:0]   lane_valid,
  output lane_sym_t [NUM_LANES-1:0] lane_data,
  input  logic [NUM_LANES-1:0]   lane_pop
);

  localparam int unsigned CW = $clog2(PB_DEPTH + 1);

  logic [NUM_LANES-1:0] lane_full;

  assign in_ready = !(|lane_full);

  for (genvar i = 0; i < NUM_LANES; i++) begin : g_lane
    logic [CW-1:0] count;
    lane_sym_t     din;
    assign din = '{sym: in_sym[i], sop: in_sop[i], eop: in_eop[i]};
    sync_fifo #(.T(lane_sym_t), .DEPTH(PB_DEPTH), .BYPASS(1'b0)) u_fifo (
      .clk, .rst_n,
      .push(in_valid && in_ready && in_lane_valid[i]), .din(din),
      .pop(lane_pop[i]), .dout(lane_data[i]), .valid(lane_valid[i]),
      .full(lane_full[i]), .count(count)
    );
  end

endmodule
