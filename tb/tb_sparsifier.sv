// tb_sparsifier: loads random column slices and time-stamp headers whenever
// the sparsifier is ready and checks every word written to the barrel
// against words worked out from the loads: a header, or one word per
// non-empty zone in increasing zone order. In a first phase the barrel is
// never full and the cycle count must be sum(max(k,1)) for k non-empty
// zones per load; in a second phase a random full flag must delay headers
// only, never hits.
module tb_sparsifier;
  import superpix_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, load_ts, ready, b2_wr, b2_full;
  logic [63:0] slice;
  logic [6:0] x;
  logic [7:0] ts;
  logic [HIT_W:0] b2_data;
  logic [HIT_W:0] exp_q[$];
  int checks = 0, failures = 0;
  int n_hdr_stall = 0, exp_cycles = 0, n_writes = 0;

  sparsifier dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every write with the expected sequence
  always @(posedge clk) if (rst_n && b2_wr) begin
    n_writes++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected write %h", b2_data); end
    else begin
      logic [HIT_W:0] e;
      e = exp_q.pop_front();
      if (b2_data !== e) begin failures++; $display("write %h expected %h", b2_data, e); end
    end
    if (b2_data[HIT_W] && b2_full) begin checks++; failures++; $display("header written while full"); end
  end

  always @(posedge clk) if (rst_n && !b2_wr && b2_full && exp_q.size() > 0 && exp_q[0][HIT_W])
    n_hdr_stall++;

  task automatic make_stim(input bit hdr);
    load_ts = hdr;
    ts      = 8'($urandom);
    x       = 7'($urandom_range(0, 79));
    slice   = '0;
    for (int z = 0; z < 8; z++)
      if ($urandom_range(0, 2) == 0) slice[z*8 +: 8] = 8'($urandom_range(1, 255));
  endtask

  task automatic expect_load();
    int k;
    k = 0;
    if (load_ts) begin
      exp_q.push_back({1'b1, 10'b0, ts});
      k = 1;
    end else begin
      for (int z = 0; z < 8; z++)
        if (slice[z*8 +: 8] != 0) begin
          exp_q.push_back({1'b0, x, 3'(z), slice[z*8 +: 8]});
          k++;
        end
    end
    exp_cycles += (k == 0) ? 1 : k;
  endtask

  initial begin
    int start, stop, loads;
    load = 0; load_ts = 0; slice = '0; x = '0; ts = '0; b2_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: barrel never full, loads as fast as allowed; the last one is
    // a header so that the run ends with a write
    @(negedge clk);
    start = $time;
    loads = 0;
    while (loads < 300) begin
      make_stim(loads == 299 || $urandom_range(0, 5) == 0);
      load = 1;
      #1;
      if (ready) begin
        expect_load();
        loads++;
      end
      @(negedge clk);
    end
    load = 0;
    while (exp_q.size() > 0) @(negedge clk);
    stop = $time;
    checks++;
    // one extra cycle: the first load itself precedes its first write
    if ((stop - start) / 10 != exp_cycles + 1) begin
      failures++; $display("cycles %0d expected %0d", (stop - start) / 10, exp_cycles + 1);
    end
    // phase 2: random full flag
    for (int i = 0; i < 3000; i++) begin
      b2_full = ($urandom_range(0, 2) == 0);
      make_stim($urandom_range(0, 3) == 0);
      load = ($urandom_range(0, 1) == 1);
      #1;
      if (load && ready) expect_load();
      @(negedge clk);
    end
    load = 0; b2_full = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_hdr_stall == 0) begin
      failures++; $display("left %0d stalls %0d", exp_q.size(), n_hdr_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
