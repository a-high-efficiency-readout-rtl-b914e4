// tb_efficiency_table: the operating points of the sub-matrix efficiency
// study, run on one full-size submatrix readout (80x256 pixels, default
// depths: scan buffer 4, level-2 barrels 8, level-1 barrel 32).
//
// For each point the readout clock RDclk and the BCO period set the number
// of clock cycles per period (RDclk * BCO). Single random hits, uniform over
// the 20480 pixels and with no clusters, arrive at 33.8 MHz per submatrix,
// which is 100 MHz/cm2. The level-1 barrel is emptied every cycle. Each point
// runs for 2 ms of simulated time (about 68000 hits).
//
// Every hit is classified by a model of the pixel flags that follows the
// freeze and reset lines of the sweeper:
//   - lost on a frozen macro pixel (frozen-MP loss);
//   - lost on a pixel already set (already-hit loss);
//   - accepted.
// Every accepted pixel must come out of the level-1 barrel once. It must
// come out under the time stamp of the BCO edge that froze it, or a later
// one if the scan buffer overflowed. At the end nothing may be missing,
// unless a barrel overflow was counted.
//
// The measured efficiencies and the mean sweep time per map are printed
// next to the reference values of the study. They are checked against it:
//   - frozen-MP efficiency within 0.4 points;
//   - already-hit efficiency within 0.1 points;
//   - mean sweep time within 0.1 us (this design spends about 3 cycles
//     more per map than the study's sweep);
//   - no scan-buffer overflow where the study reports none, and barrel
//     overflows on fewer than 0.05% of the hits (the study rounds its
//     barrel efficiencies to 100.00%).
// Two points of the study do not keep up: RDclk 60 MHz with BCO 0.25 us,
// and with BCO 0.5 us. There this design's sweep needs about 18 and 31 of
// the 15 and 30 cycles in a period. Those points are reported only and
// checked for data integrity. A last point runs twice the hit rate at
// 80 MHz and 1 us; the study quotes a total efficiency of 97.6% for it.
module tb_efficiency_table;
  import superpix_pkg::*;
  localparam int COLS = 80, ROWS = 256, MPC = 40, MPR = 32;
  localparam real SIM_US = 2000.0;

  logic clk = 0, rst_n = 0, run = 1, bco_tick = 0;
  logic [COLS-1:0][ROWS-1:0] hit;
  logic [MPC-1:0][MPR-1:0] mask;
  logic b1_valid, b1_pop, busy, sb_full, sb_overflow, b2_overflow, b1_overflow;
  logic [B1_W:0] b1_word;
  logic [7:0] ts;

  submatrix_readout dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // model state
  bit pix[COLS][ROWS];
  int exp_q[int][$];              // accepted pixel -> periods it belongs to
  int period;                     // number of the current BCO period
  int hdr;
  bit sb_seen;
  // per-point counters
  longint n_hits, n_frozen, n_already, n_acc, n_out;
  longint n_sb, n_b2, n_b1, n_pop, n_sweep_cyc;

  initial begin
    #300000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign b1_pop = 1'b1;

  // output side: decode every word of the level-1 barrel
  always @(posedge clk) if (rst_n) begin
    if (sb_overflow) begin n_sb++; sb_seen = 1; end
    if (b2_overflow) n_b2++;
    if (b1_overflow) n_b1++;
    if (dut.u_sweep.sb_pop) n_pop++;
    if (dut.u_sweep.state != 2'd0) n_sweep_cyc++;
    if (b1_valid) begin
      if (b1_word[B1_W]) hdr = int'(b1_word[7:0]);
      else begin
        int x, y, k;
        x = int'(b1_word[17:11]);
        for (int b = 0; b < 8; b++) if (b1_word[b]) begin
          y = 64 * int'(b1_word[19:18]) + 8 * int'(b1_word[10:8]) + b;
          k = x * ROWS + y;
          n_out++;
          checks++;
          if (!exp_q.exists(k)) begin
            failures++; $display("pixel %0d/%0d not accepted", x, y);
          end else begin
            int p;
            p = exp_q[k].pop_front();
            // a word dropped by a barrel leaves an older entry behind
            while ((n_b2 != 0 || n_b1 != 0) && exp_q[k].size() != 0 && p % 256 != hdr)
              p = exp_q[k].pop_front();
            if (exp_q[k].size() == 0) exp_q.delete(k);
            if (sb_seen ? (8'(8'(hdr) - 8'(p)) >= 8'd128) : (p % 256 != hdr)) begin
              failures++;
              $display("pixel %0d/%0d of period %0d under header %0d", x, y, p % 256, hdr);
            end
          end
        end
      end
    end
  end

  // One readout cycle on the input side, driven after the falling edge: the
  // freeze and reset lines seen now act at the next rising edge.
  task automatic cycle(input real lambda, input bit tick);
    int col;
    int hx[$], hy[$];
    bco_tick = tick;
    hit = '0;
    for (int t = 0; t < 4; t++)
      if (real'($urandom_range(0, 999999)) < lambda / 4.0 * 1.0e6) begin
        int x, y;
        x = $urandom_range(0, COLS - 1); y = $urandom_range(0, ROWS - 1);
        n_hits++;
        if (dut.freeze[x / 2][y / 8]) n_frozen++;
        else if (pix[x][y] || hit[x][y]) n_already++;
        else begin
          bit mp_on;
          hit[x][y] = 1'b1;
          hx.push_back(x); hy.push_back(y);
          n_acc++;
          // At a BCO edge the fast-OR already seen decides whether this
          // hit joins the map closing now or the next one.
          mp_on = 0;
          for (int i = 0; i < 2; i++) for (int j = 0; j < 8; j++)
            mp_on |= pix[(x / 2) * 2 + i][(y / 8) * 8 + j];
          exp_q[x * ROWS + y].push_back((tick && !mp_on) ? period + 1 : period);
        end
      end
    foreach (hx[i]) pix[hx[i]][hy[i]] = 1'b1;
    if (|dut.mp_reset) begin
      col = int'(dut.u_sweep.rd_col) / 2;
      for (int r = 0; r < MPR; r++) if (dut.mp_reset[col][r])
        for (int i = 0; i < 2; i++) for (int j = 0; j < 8; j++) pix[col * 2 + i][r * 8 + j] = 1'b0;
    end
    @(negedge clk);
    if (tick) period++;
  endtask

  task automatic run_point(input int rdclk, input real bco_us, input real rate,
                           input real ref_frozen, input real ref_already, input real ref_sweep,
                           input bit keeps_up);
    int per;
    longint total;
    real lambda, e_frozen, e_already, e_total, sweep_us;
    per = int'(real'(rdclk) * bco_us);
    lambda = rate / real'(rdclk);
    total = longint'(real'(rdclk) * SIM_US);
    // reset the chip and the model
    rst_n = 0; hit = '0; bco_tick = 0;
    exp_q.delete();
    foreach (pix[x, y]) pix[x][y] = 0;
    n_hits = 0; n_frozen = 0; n_already = 0; n_acc = 0; n_out = 0;
    n_sb = 0; n_b2 = 0; n_b1 = 0; n_pop = 0; n_sweep_cyc = 0;
    period = 0; hdr = -1; sb_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // the counter restarts at 0; the first edge closes period 0
    for (longint c = 1; c <= total; c++) cycle(lambda, (c % longint'(per)) == 0);
    // stop the hits, keep the BCO running until everything is out
    for (int c = 1; c <= 40 * per; c++) cycle(0.0, (c % per) == 0);

    e_frozen  = 100.0 * (1.0 - real'(n_frozen) / real'(n_hits));
    e_already = 100.0 * (1.0 - real'(n_already) / real'(n_hits));
    e_total   = 100.0 * real'(n_out) / real'(n_hits);
    sweep_us  = real'(n_sweep_cyc) / real'(n_pop) / real'(rdclk);
    $display("RDclk %3d MHz BCO %4.2f us rate %4.1f MHz: hits %0d frozen effi %6.2f%% (ref %6.2f) already-hit effi %6.2f%% (ref %6.2f) sweep %4.2f us (ref %4.2f) total %6.2f%% | overflows sb %0d b2 %0d b1 %0d",
             rdclk, bco_us, rate, n_hits, e_frozen, ref_frozen, e_already, ref_already,
             sweep_us, ref_sweep, e_total, n_sb, n_b2, n_b1);

    // integrity: nothing missing unless a barrel dropped it
    checks++;
    if (n_b2 == 0 && n_b1 == 0 && exp_q.size() != 0) begin
      failures++; $display("  %0d accepted pixels never came out", exp_q.size());
    end
    checks++;
    if (n_out + longint'(exp_q.size()) > n_acc || n_hits < 1000) begin
      failures++; $display("  hit bookkeeping off: out %0d accepted %0d", n_out, n_acc);
    end
    if (keeps_up) begin
      checks++;
      if (n_sb != 0 || 2000 * (n_b2 + n_b1) > n_hits) begin
        failures++; $display("  overflow where the study has none");
      end
      if (ref_frozen > 0.0) begin
        checks++;
        if (e_frozen < ref_frozen - 0.4 || e_frozen > ref_frozen + 0.4) begin
          failures++; $display("  frozen-MP efficiency off the study");
        end
      end
      if (ref_already > 0.0) begin
        checks++;
        if (e_already < ref_already - 0.1 || e_already > ref_already + 0.1) begin
          failures++; $display("  already-hit efficiency off the study");
        end
      end
      if (ref_sweep > 0.0) begin
        checks++;
        if (sweep_us < ref_sweep - 0.1 || sweep_us > ref_sweep + 0.1) begin
          failures++; $display("  mean sweep time off the study");
        end
      end
    end
  endtask

  initial begin
    hit = '0; mask = '0;
    // the table of the study: RDclk, BCO, frozen-MP and already-hit
    // efficiency (%), mean sweep time (us); 0 = not given
    run_point(100, 0.5, 33.8, 99.53, 99.96, 0.27, 1);
    run_point( 80, 0.5, 33.8, 99.39, 99.95, 0.34, 1);
    run_point( 60, 0.5, 33.8, 98.90, 99.96, 0.45, 0);
    run_point(100, 1.0, 33.8, 99.25, 99.91, 0.45, 1);
    run_point( 80, 1.0, 33.8, 99.10, 99.91, 0.56, 1);
    run_point( 60, 1.0, 33.8, 98.83, 99.91, 0.75, 1);
    run_point(100, 1.5, 33.8, 99.23, 99.86, 0.57, 1);
    run_point( 80, 1.5, 33.8, 99.05, 99.86, 0.71, 1);
    run_point( 60, 1.5, 33.8, 98.78, 99.86, 0.95, 1);
    run_point(100, 2.0, 33.8, 99.04, 99.83, 0.65, 1);
    run_point( 80, 2.0, 33.8, 98.81, 99.83, 0.81, 1);
    run_point( 60, 2.0, 33.8, 98.42, 99.84, 1.08, 1);
    // the BCO 0.25 us column of the frozen-efficiency grid
    run_point(100, 0.25, 33.8, 99.7, 0.0, 0.0, 1);
    run_point( 80, 0.25, 33.8, 99.6, 0.0, 0.0, 1);
    run_point( 60, 0.25, 33.8, 97.5, 0.0, 0.0, 0);
    // twice the hit rate
    run_point( 80, 1.0, 67.6, 0.0, 0.0, 0.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
