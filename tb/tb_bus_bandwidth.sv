// tb_bus_bandwidth: load on the chip data bus of the full-size readout
// (superpix_top at its default parameters) at the target hit rate.
//
// The bandwidth estimate behind the architecture counts 22-bit words.
// Without clustering, 130 Mhit/s of single hits give one word each. With
// tracks that fire 2x2 pixel clusters, 25 Mtrack/s/cm2 over 1.3 cm2 is
// 32.5 Mtrack/s. A cluster gives two words, one per column, when it sits
// inside one 8-pixel zone, and four when it straddles a zone boundary
// (1 time in 8): 2.25 words per track, about 73 Mword/s. The bus here
// carries one word per readout clock, with bus_ready always high.
//
// Each point drives random hits for 400 us with a 1 us BCO period, then
// stops the hits and lets the chip drain. It counts:
//   - bus words: hit words and time-stamp words;
//   - tracks or hits injected;
//   - scan-buffer, level-2 and level-1 overflows.
// Points and what is checked:
//   1. 2x2 clusters, RDclk 100 MHz: no scan-buffer overflow, barrel
//      overflows (from rare bursts) on under 0.1% of the words, 2.0 to 2.4
//      words per track, bus busy 65-85% of the cycles.
//   2. 2x2 clusters, RDclk 80 MHz: the mean load (about 91% of the bus)
//      fits, but bursts fill the level-1 barrels now and then. Checked: no
//      scan-buffer overflow, level-1 overflows on under 2% of the words,
//      bus busy at least 80%.
//   3. 2x2 clusters, RDclk 60 MHz: demand (about 74 Mword/s) exceeds the
//      bus (60 Mword/s), so the bus must be busy over 97% of the cycles and
//      level-1 barrels must overflow.
//   4. single hits at 130 Mhit/s, RDclk 100 MHz: the same saturation.
// On every point the time-stamp words must count up by one per period,
// and every hit word must decode to a pixel inside the matrix.
module tb_bus_bandwidth;
  import superpix_pkg::*;
  localparam int NSUB = 4, COLS = 80, ROWS = 256;
  localparam real SIM_US = 400.0, BCO_US = 1.0;

  logic clk = 0, rst_n = 0;
  logic bco_tick = 0;
  logic [NSUB-1:0][COLS-1:0][ROWS-1:0] hit;
  logic bus_valid, bus_is_ts, bus_ready;
  logic [OUT_W-1:0] bus_data;
  logic [2:0] chip_addr = 3'b001;
  logic scl_i = 1, sda_i = 1, sda_oe;

  superpix_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit active;
  int last_ts;
  longint n_cyc, n_words, n_hitw, n_tsw, n_in, n_sb, n_b2, n_b1;

  initial begin
    #100000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign bus_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (active) n_cyc++;
    n_sb += $countones(dut.sb_ovf);
    n_b2 += $countones(dut.b2_ovf);
    n_b1 += $countones(dut.b1_ovf);
    if (bus_valid && bus_ready) begin
      if (active) n_words++;
      checks++;
      if (bus_is_ts) begin
        n_tsw++;
        if (last_ts >= 0 && int'(bus_data[7:0]) != (last_ts + 1) % 256) begin
          failures++; $display("time stamp %0d after %0d", bus_data[7:0], last_ts);
        end
        last_ts = int'(bus_data[7:0]);
      end else begin
        n_hitw++;
        if (int'(bus_data[17:11]) >= COLS || bus_data[7:0] == 8'd0) begin
          failures++; $display("bad hit word %h", bus_data);
        end
      end
    end
  end

  // 2x2 cluster (or a single pixel) placed inside one submatrix
  task automatic place(input bit cluster);
    int s, x0, y0;
    s = $urandom_range(0, NSUB - 1);
    if (cluster) begin
      x0 = $urandom_range(0, COLS - 2); y0 = $urandom_range(0, ROWS - 2);
      for (int d = 0; d < 4; d++) hit[s][x0 + d / 2][y0 + d % 2] = 1'b1;
    end else
      hit[s][$urandom_range(0, COLS - 1)][$urandom_range(0, ROWS - 1)] = 1'b1;
  endtask

  task automatic run_point(input int rdclk, input bit cluster, input real rate_mhz,
                           output real words_per_in, output real busy_frac);
    int per, slots;
    longint total;
    real lambda;
    per = int'(real'(rdclk) * BCO_US);
    total = longint'(real'(rdclk) * SIM_US);
    lambda = rate_mhz / real'(rdclk);
    slots = 8;
    rst_n = 0; hit = '0; bco_tick = 0; active = 0; last_ts = -1;
    n_cyc = 0; n_words = 0; n_hitw = 0; n_tsw = 0; n_in = 0; n_sb = 0; n_b2 = 0; n_b1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // warm-up of 5 periods, then the measured window
    for (longint c = 1; c <= total + 5 * per; c++) begin
      active = (c > 5 * per);
      bco_tick = (c % longint'(per)) == 0;
      hit = '0;
      for (int t = 0; t < slots; t++)
        if (real'($urandom_range(0, 999999)) < lambda / real'(slots) * 1.0e6) begin
          place(cluster);
          if (active) n_in++;
        end
      @(negedge clk);
    end
    active = 0;
    hit = '0;
    for (int c = 1; c <= 20 * per; c++) begin
      bco_tick = (c % per) == 0;
      @(negedge clk);
    end
    bco_tick = 0;
    words_per_in = real'(n_words) / real'(n_in);
    busy_frac = real'(n_words) / real'(n_cyc);
    $display("RDclk %3d MHz %s %5.1f M/s: in %0d words %0d (%0d hit, %0d ts) words/in %4.2f bus busy %5.1f%% | overflows sb %0d b2 %0d b1 %0d",
             rdclk, cluster ? "2x2 tracks" : "single hits", rate_mhz, n_in, n_words, n_hitw, n_tsw,
             words_per_in, 100.0 * busy_frac, n_sb, n_b2, n_b1);
  endtask

  initial begin
    real w, b;
    hit = '0;
    // 1. clustered, 100 MHz
    run_point(100, 1, 32.5, w, b);
    checks++;
    if (n_sb != 0 || 1000 * (n_b2 + n_b1) > n_words) begin failures++; $display("  overflow at the nominal point"); end
    checks++;
    if (w < 2.0 || w > 2.4) begin failures++; $display("  words per track off the estimate"); end
    checks++;
    if (b < 0.65 || b > 0.85) begin failures++; $display("  bus load off the estimate"); end
    // 2. clustered, 80 MHz
    run_point(80, 1, 32.5, w, b);
    checks++;
    if (n_sb != 0 || 50 * n_b1 > n_words) begin failures++; $display("  losses at 80 MHz"); end
    checks++;
    if (b < 0.80) begin failures++; $display("  bus load off the estimate"); end
    // 3. clustered, 60 MHz: more words than bus cycles
    run_point(60, 1, 32.5, w, b);
    checks++;
    if (b < 0.97 || n_b1 == 0) begin failures++; $display("  expected a saturated bus"); end
    // 4. single hits, 130 Mhit/s at 100 MHz
    run_point(100, 0, 130.0, w, b);
    checks++;
    if (b < 0.97 || n_b1 == 0) begin failures++; $display("  expected a saturated bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
