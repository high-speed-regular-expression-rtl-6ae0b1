// Self-checking test of packet_buffer with 8 lanes of depth 4: random words with random lane
// valid, start and end flags are offered with random in_valid, and every lane is read at its
// own random pace. Each lane must deliver exactly its valid symbols, with their flags, in
// order; in_ready must be low exactly when some lane is full; invalid lanes must be dropped.
module tb_packet_buffer;
  import regex_pkg::*;

  localparam int L = 8;
  localparam int D = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid, in_ready;
  sym_t [L-1:0]        in_sym;
  logic [L-1:0]        in_lane_valid, in_sop, in_eop, lane_valid, lane_pop;
  lane_sym_t [L-1:0]   lane_data;

  packet_buffer #(.NUM_LANES(L), .PB_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_taken = 0;
  lane_sym_t q [L][$];

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
    bit any_full;
    in_valid = 0; in_sym = '0; in_lane_valid = '0; in_sop = '0; in_eop = '0; lane_pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 4000; t++) begin
      in_valid = ($urandom_range(0, 9) < 7);
      for (int i = 0; i < L; i++) begin
        in_sym[i]        = sym_t'($urandom);
        in_lane_valid[i] = ($urandom_range(0, 9) < 8);
        in_sop[i]        = 1'($urandom);
        in_eop[i]        = 1'($urandom);
        lane_pop[i]      = 0;
      end
      #1;
      any_full = 0;
      for (int i = 0; i < L; i++) begin
        if (q[i].size() == D) any_full = 1;
        check(lane_valid[i] == (q[i].size() != 0), $sformatf("lane %0d valid", i));
        if (q[i].size() != 0) check(lane_data[i] == q[i][0], $sformatf("lane %0d data", i));
        // drain slower than fill in some phases so the lanes fill up
        lane_pop[i] = lane_valid[i] && ($urandom_range(0, 99) < (((t / 500) % 2) != 0 ? 90 : 40));
      end
      check(in_ready == !any_full, "in_ready");
      if (any_full) n_full++;
      #1;
      for (int i = 0; i < L; i++) if (lane_pop[i]) void'(q[i].pop_front());
      if (in_valid && in_ready) begin
        n_taken++;
        for (int i = 0; i < L; i++)
          if (in_lane_valid[i]) q[i].push_back('{sym: in_sym[i], sop: in_sop[i], eop: in_eop[i]});
      end
      @(posedge clk); #1;
    end
    check(n_full > 0 && n_taken > 1000, "back-pressure and throughput both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
