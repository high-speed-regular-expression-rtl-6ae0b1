// Self-checking test of sync_fifo: a fall-through FIFO of three entries (the engine's
// FIFO_standard configuration) and a registered FIFO of three entries (FIFO_default) are
// driven with random pushes and pops; their outputs, valid, full and count are compared with
// a queue model. Also checks that a word pushed into the empty fall-through FIFO is visible in
// the same cycle.
module tb_sync_fifo;

  localparam int DEPTH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       push_b, pop_b, valid_b, full_b, push_r, pop_r, valid_r, full_r;
  logic [7:0] din_b, dout_b, din_r, dout_r;
  logic [1:0] count_b, count_r;

  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH), .BYPASS(1'b1)) u_b (
    .clk, .rst_n, .push(push_b), .din(din_b), .pop(pop_b), .dout(dout_b), .valid(valid_b),
    .full(full_b), .count(count_b));
  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH), .BYPASS(1'b0)) u_r (
    .clk, .rst_n, .push(push_r), .din(din_r), .pop(pop_r), .dout(dout_r), .valid(valid_r),
    .full(full_r), .count(count_r));

  int checks = 0, failures = 0, n_through = 0, n_full = 0;
  logic [7:0] qb [$], qr [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_b = 0; pop_b = 0; push_r = 0; pop_r = 0; din_b = 0; din_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 4000; t++) begin
      int ph;
      ph = (t / 200) % 3;              // phases biased to fill, drain or mix
      // bypass FIFO
      din_b  = 8'($urandom);
      push_b = !full_b && ($urandom_range(0, 99) < (ph == 0 ? 80 : ph == 1 ? 20 : 50));
      pop_b  = 0;
      #1;
      if (valid_b && $urandom_range(0, 99) < (ph == 0 ? 20 : ph == 1 ? 80 : 50)) pop_b = 1;
      // registered FIFO
      din_r  = 8'($urandom);
      push_r = !full_r && ($urandom_range(0, 99) < (ph == 0 ? 80 : ph == 1 ? 20 : 50));
      pop_r  = valid_r && ($urandom_range(0, 99) < (ph == 0 ? 20 : ph == 1 ? 80 : 50));
      #1;
      // compare before the edge
      check(count_b == 2'(qb.size()), $sformatf("bypass count %0d/%0d", count_b, qb.size()));
      check(full_b == (qb.size() == DEPTH), "bypass full");
      check(valid_b == (qb.size() != 0 || push_b), "bypass valid");
      if (qb.size() != 0) check(dout_b == qb[0], "bypass data");
      else if (push_b) begin
        check(dout_b == din_b, "bypass fall-through data");
        n_through++;
      end
      check(count_r == 2'(qr.size()), $sformatf("reg count %0d/%0d", count_r, qr.size()));
      check(full_r == (qr.size() == DEPTH), "reg full");
      check(valid_r == (qr.size() != 0), "reg valid");
      if (qr.size() != 0) check(dout_r == qr[0], "reg data");
      if (full_r) n_full++;
      // model update
      if (push_b) qb.push_back(din_b);
      if (pop_b) void'(qb.pop_front());
      if (push_r) qr.push_back(din_r);
      if (pop_r) void'(qr.pop_front());
      @(posedge clk); #1;
    end
    check(n_through > 0 && n_full > 0, "fall-through and full both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
