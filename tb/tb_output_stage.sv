// tb_output_stage: four level-1 barrel streams (queues in the testbench)
// merged onto the chip data bus under random back-pressure. Checks that
// nothing is lost, headers come once per period in order, each hit comes
// under its own period's header with the right level-1 address and the rest
// of the word unchanged, words stay put while the bus is not ready, and the
// rate-counter pulses count the words taken.
module tb_output_stage;
  import superpix_pkg::*;
  localparam int N = 4, PERIODS = 150;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_pop;
  logic [N-1:0][B1_W:0] in_word;
  logic bus_valid, bus_is_ts, bus_ready, hit_word, ts_word;
  logic [OUT_W-1:0] bus_data;
  logic [B1_W:0] q[N][$];
  int checks = 0, failures = 0;
  int n_hits = 0, n_got = 0, n_hdr = 0, cur = -1, n_hold = 0, n_pulse_hit = 0, n_pulse_ts = 0;
  int next_seq[N];
  logic prev_stall = 0;
  logic [OUT_W:0] prev_word;

  output_stage dut (.*);
  always #5 clk = ~clk;

  always_comb for (int i = 0; i < N; i++) begin
    in_valid[i] = (q[i].size() > 0);
    in_word[i]  = (q[i].size() > 0) ? q[i][0] : '0;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // payload of a hit = {L2 addr = input[1:0] ^ 2'b11, period(8), input(2), seq(8)}
  initial begin
    for (int i = 0; i < N; i++) next_seq[i] = 0;
    for (int p = 0; p < PERIODS; p++)
      for (int i = 0; i < N; i++) begin
        q[i].push_back({1'b1, 12'b0, 8'(p)});
        for (int h = $urandom_range(0, 4); h > 0; h--) begin
          q[i].push_back({1'b0, ~2'(i), 8'(p), 2'(i), 8'(next_seq[i] % 256)});
          next_seq[i]++;
          n_hits++;
        end
      end
    for (int i = 0; i < N; i++) next_seq[i] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (in_pop[i]) void'(q[i].pop_front());
    if (prev_stall) begin
      checks++;
      if (!bus_valid || {bus_is_ts, bus_data} !== prev_word) begin failures++; $display("word changed while stalled"); end
    end
    prev_stall = bus_valid && !bus_ready;
    prev_word  = {bus_is_ts, bus_data};
    if (prev_stall) n_hold++;
    if (hit_word) n_pulse_hit++;
    if (ts_word) n_pulse_ts++;
    if (bus_valid && bus_ready) begin
      checks++;
      if (bus_is_ts) begin
        if (int'(bus_data[7:0]) != cur + 1 || bus_data[21:8] != 0) begin failures++; $display("header %0d after %0d", bus_data[7:0], cur); end
        cur = int'(bus_data[7:0]);
        n_hdr++;
      end else begin
        int src;
        src = int'(bus_data[21:20]);
        if (bus_data[19:18] != ~2'(src) || int'(bus_data[17:10]) != cur || int'(bus_data[9:8]) != src
            || int'(bus_data[7:0]) != next_seq[src] % 256) begin
          failures++; $display("bad hit word %h under period %0d", bus_data, cur);
        end
        next_seq[src]++;
        n_got++;
      end
    end
  end

  initial begin
    bus_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      bus_ready = ($urandom_range(0, 2) != 0);
      if (q[0].size() + q[1].size() + q[2].size() + q[3].size() == 0 && !bus_valid) break;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_got != n_hits || n_hdr != PERIODS || n_hold == 0 || n_pulse_hit != n_hits || n_pulse_ts != PERIODS) begin
      failures++; $display("got %0d of %0d hits, %0d headers, %0d holds", n_got, n_hits, n_hdr, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
