// Synchronous FIFO, used for FIFO_standard, FIFO_default, the result-order queue of a
// matching engine and the lanes of the packet buffer.
//
// DEPTH entries of type T in a circular buffer; DEPTH need not be a power of two (the matching
// engine uses three). With BYPASS set, a word pushed into an empty FIFO is visible at the
// output in the same cycle (fall-through), and if it is popped in that cycle it is never
// stored; this lets a result go from the table to the next engine without an extra cycle.
// Interface: push/din are taken when not full (pushing when full is a usage error caught by
// an assertion); pop takes the head shown on dout while valid is high. count and full come
// from registers only, never from push or pop in the same cycle. Reset is synchronous,
// active low. The capacity of three used by the engine follows the original architecture; the bypass and
// the structure are this design's own.
module sync_fifo #(
  parameter type         T      = logic [7:0],
  parameter int unsigned DEPTH  = 3,
  parameter bit          BYPASS = 1'b0,
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              din,
  input  logic          pop,
  output T              dout,
  output logic          valid,
  output logic          full,
  output logic [CW-1:0] count
);

  T              mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          empty, through, do_write, do_read;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign through = BYPASS && empty && push;
  assign valid   = !empty || through;
  assign dout    = empty ? din : mem[rd_ptr];
  // A bypassed word that is popped at once never enters the buffer.
  assign do_write = push && !(through && pop);
  assign do_read  = pop && !empty;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_write) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= incr(wr_ptr);
      end
      if (do_read) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_write) - CW'(do_read);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && !valid));

endmodule
