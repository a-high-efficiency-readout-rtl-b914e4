// tb_concentrator: four input streams of "header, hits, header, hits..."
// are held in queues that act as the input barrels. Some inputs skip a
// period (no header, no hits), as after a scan-buffer overflow. Every hit
// carries its input, period and sequence number in its payload, so the
// output can be checked without looking at the design: headers come out
// once per period in increasing order, each hit comes out after the header
// of its own period and before the next one, with the right input address,
// inputs keep their order, and every hit is either delivered or dropped
// while the output barrel was full (DROP_HITS=1).
module tb_concentrator;
  import superpix_pkg::*;
  localparam int N = 4, W = HIT_W;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_pop;
  logic [N-1:0][W:0] in_word;
  logic out_wr, out_full;
  logic [W+2:0] out_word;
  logic [W:0] q[N][$];
  int checks = 0, failures = 0;
  int n_hits = 0, n_delivered = 0, n_dropped = 0, n_skips = 0, n_hdr_wait_full = 0;
  int cur_period = -1, hdr_seen = 0;
  int last_seq[N];
  localparam int PERIODS = 200;

  concentrator dut (.*);
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

  // build the input streams: hit payload = {input(2), period(8), seq(8)}
  initial begin
    int seq[N];
    for (int i = 0; i < N; i++) begin seq[i] = 0; last_seq[i] = -1; end
    for (int p = 0; p < PERIODS; p++) begin
      int skipper;
      skipper = ($urandom_range(0, 9) == 0) ? $urandom_range(0, N - 1) : -1;
      if (p == 0 || p == PERIODS - 1) skipper = -1;
      for (int i = 0; i < N; i++) begin
        if (i == skipper) begin n_skips++; continue; end
        q[i].push_back({1'b1, 10'b0, 8'(p)});
        for (int h = $urandom_range(0, 5); h > 0; h--) begin
          q[i].push_back({1'b0, 2'(i), 8'(p), 8'(seq[i])});
          seq[i]++;
          n_hits++;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (in_pop[i]) void'(q[i].pop_front());
    if (out_wr && out_word[W+2]) begin
      checks++;
      if (out_full) begin failures++; $display("header written while full"); end
      if (int'(out_word[7:0]) != cur_period + 1) begin
        failures++; $display("header %0d after period %0d", out_word[7:0], cur_period);
      end
      cur_period = int'(out_word[7:0]);
      hdr_seen++;
    end else if (out_wr) begin
      int src, per, sq;
      src = int'(out_word[W+1:W]);
      per = int'(out_word[15:8]);
      sq  = int'(out_word[7:0]);
      checks++;
      if (src != int'(out_word[17:16]) || per != cur_period || sq != (last_seq[src] + 1) % 256) begin
        failures++; $display("bad hit src %0d period %0d (current %0d) seq %0d", src, per, cur_period, sq);
      end
      last_seq[src] = sq;
      if (out_full) n_dropped++; else n_delivered++;
    end
    if (!out_wr && out_full && (&in_valid)) n_hdr_wait_full++;
  end

  initial begin
    out_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      out_full = (c > 2000) && ($urandom_range(0, 3) == 0);
      if (q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0 && q[3].size() == 0) break;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (hdr_seen != PERIODS || n_delivered + n_dropped != n_hits) begin
      failures++; $display("headers %0d hits %0d delivered %0d dropped %0d", hdr_seen, n_hits, n_delivered, n_dropped);
    end
    checks++;
    if (n_dropped == 0 || n_skips == 0 || n_hdr_wait_full == 0) begin
      failures++; $display("mechanism not exercised: drop %0d skip %0d wait %0d", n_dropped, n_skips, n_hdr_wait_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
