// tb_superpix_top: end-to-end test of the whole readout at its default size
// (4 submatrices of 80x256 pixels), also used as the full-size test.
//
// The testbench injects 2x2 pixel clusters as discriminator pulses, ticks
// the BCO strobe, takes words off the chip data bus and decodes every zone
// hit back to absolute pixels (submatrix, column, row) under the time stamp
// of the header it follows. Slow control goes through a bit-banged I2C
// master. Phases:
//   1. I2C: mask 8 macro pixels of submatrix 0 and read the mask back.
//   2. Nominal rate (about 0.08 clusters per cycle per submatrix, BCO period
//      of 50 cycles, bus always ready), clusters only on idle macro pixels:
//      every injected pixel must come out exactly once under the time stamp
//      of the period it was injected in, every period gets one header, and
//      hits on masked macro pixels never come out.
//   3. Overload: dense clusters, 16-cycle BCO period, a mostly stalled bus.
//      Losses are allowed here, but every pixel that comes out must have
//      been injected, in its header's period or earlier.
//   4. Drain, then nominal rate again, checked as in phase 2.
//   5. I2C: read the rate and error counters; the hit-word counter must
//      equal the hit words seen on the bus.
// Each mechanism must have happened at least once: masking, freezing (a hit
// lost on a frozen macro pixel), a sweep stalled by a busy sparsifier,
// scan-buffer overflow, level-2 and level-1 barrel overflow, bus
// back-pressure and a column with several non-empty zones.
module tb_superpix_top;
  import superpix_pkg::*;
  localparam int NSUB = 4, COLS = 80, ROWS = 256, HALF = 20;
  logic clk = 0, rst_n = 0;
  logic bco_tick = 0;
  logic [NSUB-1:0][COLS-1:0][ROWS-1:0] hit;
  logic bus_valid, bus_is_ts, bus_ready;
  logic [OUT_W-1:0] bus_data;
  logic [2:0] chip_addr = 3'b010;
  logic scl_m = 1, sda_m = 1, sda_oe, scl_i, sda_i;

  assign scl_i = scl_m;
  assign sda_i = sda_m && !sda_oe;

  superpix_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int period = 0;                   // BCO periods elapsed
  int exp_period[int][$];           // outstanding pixel -> periods it was injected in
  int mp_out[int];                  // outstanding pixels per macro pixel
  bit masked_mp[int];
  bit strict = 1;                   // phases 2 and 4: no loss allowed
  int hdr_ts = -1, last_hdr = -1;
  int n_hit_words = 0, n_pixels_out = 0, n_injected = 0;
  // mechanism counters
  int n_masked = 0, n_frozen_lost = 0, n_sweep_stall = 0, n_bp = 0, n_multizone = 0;
  int n_sb_ovf = 0, n_b2_ovf = 0, n_b1_ovf = 0;

  function automatic int pix_key(int s, int x, int y);
    return (s * COLS + x) * ROWS + y;
  endfunction
  function automatic int mp_key(int s, int x, int y);
    return (s * (COLS / 2) + x / 2) * (ROWS / 8) + y / 8;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- bus side
  always @(posedge clk) if (rst_n) begin
    if (bus_valid && !bus_ready) n_bp++;
    if (bus_valid && bus_ready) begin
      if (bus_is_ts) begin
        checks++;
        if (strict && last_hdr >= 0 && int'(bus_data[7:0]) != (last_hdr + 1) % 256) begin
          failures++; $display("header %0d after %0d", bus_data[7:0], last_hdr);
        end
        if (last_hdr >= 0 && 8'(bus_data[7:0] - 8'(last_hdr)) >= 8'd128) begin
          failures++; $display("header %0d goes back from %0d", bus_data[7:0], last_hdr);
        end
        last_hdr = int'(bus_data[7:0]);
        hdr_ts   = last_hdr;
      end else begin
        int s, l2, x, zone, y;
        s = int'(bus_data[21:20]); l2 = int'(bus_data[19:18]);
        x = int'(bus_data[17:11]); zone = int'(bus_data[10:8]);
        n_hit_words++;
        checks++;
        if (bus_data[7:0] == 0 || x >= COLS) begin failures++; $display("malformed hit %h", bus_data); end
        for (int b = 0; b < 8; b++) if (bus_data[b]) begin
          int k;
          y = 64 * l2 + 8 * zone + b;
          k = pix_key(s, x, y);
          n_pixels_out++;
          checks++;
          if (!exp_period.exists(k) || exp_period[k].size() == 0) begin
            failures++; $display("pixel %0d/%0d/%0d not injected (ts %0d)", s, x, y, hdr_ts);
          end else begin
            // the oldest injection of this pixel is the one that came out
            // (later ones into a set pixel are lost) or an older one was lost
            if (strict ? (exp_period[k][0] % 256 != hdr_ts)
                       : (8'(8'(hdr_ts) - 8'(exp_period[k][0] % 256)) >= 8'd128)) begin
              failures++; $display("pixel %0d/%0d/%0d injected in %0d reported under %0d", s, x, y, exp_period[k][0] % 256, hdr_ts);
            end
            void'(exp_period[k].pop_front());
            if (exp_period[k].size() == 0) exp_period.delete(k);
            if (mp_out.exists(mp_key(s, x, y))) begin
              mp_out[mp_key(s, x, y)]--;
              if (mp_out[mp_key(s, x, y)] == 0) mp_out.delete(mp_key(s, x, y));
            end
          end
        end
      end
    end
  end

  // mechanism probes (submatrix 0 and 1 internals are representative)
  always @(posedge clk) if (rst_n) begin
    if (dut.g_sub[0].u_sub.u_sweep.state == 2 && dut.g_sub[0].u_sub.u_sweep.have_col
        && !dut.g_sub[0].u_sub.u_sweep.sp_ready) n_sweep_stall++;
    if (dut.g_sub[0].u_sub.g_l2[0].u_sp.have_zone && $countones(dut.g_sub[0].u_sub.g_l2[0].u_sp.pend) > 1) n_multizone++;
    for (int s = 0; s < NSUB; s++) begin
      if (dut.sb_ovf[s]) n_sb_ovf++;
      if (dut.b2_ovf[s]) n_b2_ovf++;
      if (dut.b1_ovf[s]) n_b1_ovf++;
    end
  end

  // --------------------------------------------------------------- stimulus
  task automatic cycle();
    @(posedge clk);
    #1;
    hit = '0;
  endtask

  // one BCO period of n cycles with about `rate` clusters per cycle in total
  task automatic run_period(input int n, input real rate, input bit only_idle);
    for (int c = 0; c < n; c++) begin
      bco_tick = (c == n - 1);
      if (c != n - 1) begin
        int nclu;
        nclu = 0;
        if ($urandom_range(0, 999) < int'(rate * 1000.0) % 1000) nclu = 1;
        nclu += int'(rate);
        for (int i = 0; i < nclu; i++) inject_cluster(only_idle);
      end
      cycle();
      bco_tick = 0;
    end
    period++;
  endtask

  task automatic inject_cluster(input bit only_idle);
    int s, x0, y0;
    bit ok;
    s  = $urandom_range(0, NSUB - 1);
    x0 = $urandom_range(0, COLS - 2);
    y0 = $urandom_range(0, ROWS - 2);
    ok = 1;
    if (only_idle)
      for (int dx = 0; dx < 2; dx++) for (int dy = 0; dy < 2; dy++)
        if (mp_out.exists(mp_key(s, x0 + dx, y0 + dy))) ok = 0;
    if (!ok) return;
    for (int dx = 0; dx < 2; dx++) for (int dy = 0; dy < 2; dy++) begin
      int x, y, k;
      x = x0 + dx; y = y0 + dy;
      k = pix_key(s, x, y);
      hit[s][x][y] = 1'b1;
      if (masked_mp.exists(mp_key(s, x, y))) begin
        n_masked++;
        continue;
      end
      if (s == 0 && dut.g_sub[0].u_sub.u_sweep.frozen[x / 2][y / 8]) n_frozen_lost++;
      // in the overload phase a pixel may be hit again while its first hit
      // is still on its way out; each injection is kept
      exp_period[k].push_back(period);
      mp_out[mp_key(s, x, y)] = mp_out.exists(mp_key(s, x, y)) ? mp_out[mp_key(s, x, y)] + 1 : 1;
      n_injected++;
    end
  endtask

  // clusters placed on masked macro pixels on purpose
  task automatic inject_masked();
    int y0;
    y0 = $urandom_range(0, 6) * 8 + $urandom_range(0, 6);
    hit[0][0][y0] = 1'b1; hit[0][1][y0 + 1] = 1'b1;
    n_masked += 2;
  endtask

  // ------------------------------------------------------------------- I2C
  task automatic i2c_start();
    sda_m = 1; repeat (HALF) cycle(); scl_m = 1; repeat (HALF) cycle();
    sda_m = 0; repeat (HALF) cycle(); scl_m = 0; repeat (HALF) cycle();
  endtask
  task automatic i2c_stop();
    sda_m = 0; repeat (HALF) cycle(); scl_m = 1; repeat (HALF) cycle(); sda_m = 1; repeat (HALF) cycle();
  endtask
  task automatic i2c_wr(input logic [7:0] b);
    logic ack;
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; repeat (HALF) cycle(); scl_m = 1; repeat (HALF) cycle(); scl_m = 0;
    end
    sda_m = 1; repeat (HALF) cycle(); scl_m = 1; repeat (HALF / 2) cycle();
    ack = sda_i; repeat (HALF / 2) cycle(); scl_m = 0;
    checks++;
    if (ack) begin failures++; $display("no I2C acknowledge"); end
  endtask
  task automatic i2c_rd(input bit more, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin
      repeat (HALF) cycle(); scl_m = 1; repeat (HALF / 2) cycle(); b[i] = sda_i; repeat (HALF / 2) cycle(); scl_m = 0;
    end
    sda_m = !more; repeat (HALF) cycle(); scl_m = 1; repeat (HALF) cycle(); scl_m = 0; sda_m = 1;
  endtask
  task automatic reg_write(input logic [15:0] a, input logic [7:0] d);
    i2c_start(); i2c_wr({4'b0100, chip_addr, 1'b0}); i2c_wr(a[15:8]); i2c_wr(a[7:0]); i2c_wr(d); i2c_stop();
  endtask
  task automatic reg_read(input logic [15:0] a, input int n, output logic [31:0] v);
    logic [7:0] b;
    i2c_start(); i2c_wr({4'b0100, chip_addr, 1'b0}); i2c_wr(a[15:8]); i2c_wr(a[7:0]);
    i2c_start(); i2c_wr({4'b0100, chip_addr, 1'b1});
    v = '0;
    for (int i = 0; i < n; i++) begin i2c_rd(i != n - 1, b); v[8*i +: 8] = b; end
    i2c_stop();
  endtask

  task automatic check_all_out(input string phase);
    checks++;
    if (exp_period.size() != 0) begin
      failures++; $display("%s: %0d injected pixels never came out", phase, exp_period.size());
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    logic [31:0] v;
    hit = '0; bus_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cycle();
    // 1. mask MP column 0, MP rows 0..7 of submatrix 0 (mask byte 0)
    reg_write(16'h0100, 8'hFF);
    for (int r = 0; r < 8; r++) masked_mp[mp_key(0, 0, 8 * r)] = 1;
    reg_read(16'h0100, 1, v);
    checks++;
    if (v[7:0] != 8'hFF) begin failures++; $display("mask read back %h", v[7:0]); end
    // 2. nominal rate
    for (int p = 0; p < 120; p++) begin
      if (p % 10 == 5) inject_masked();
      run_period(50, 0.32, 1);
    end
    repeat (400) cycle();
    check_all_out("nominal");
    // 3. overload
    strict = 0;
    for (int p = 0; p < 60; p++) begin
      for (int c = 0; c < 16; c++) begin
        bco_tick = (c == 15);
        bus_ready = ($urandom_range(0, 9) == 0);
        for (int i = 0; i < 6; i++) inject_cluster(0);
        cycle();
      end
      bco_tick = 0;
      period++;
    end
    // drain with BCO edges still running, no new hits
    bus_ready = 1;
    for (int p = 0; p < 100; p++) run_period(50, 0.0, 1);
    $display("overload: %0d injected pixels lost", exp_period.size());
    exp_period.delete();
    mp_out.delete();
    strict = 1;
    last_hdr = -1;
    // 4. nominal rate again
    for (int p = 0; p < 60; p++) run_period(50, 0.32, 1);
    repeat (400) cycle();
    check_all_out("recovery");
    // 5. counters over slow control
    reg_read(16'h0004, 4, v);
    checks++;
    if (int'(v) != n_hit_words) begin failures++; $display("hit counter %0d, bus showed %0d", v, n_hit_words); end
    begin
      int sbo, b2o, b1o;
      sbo = 0; b2o = 0; b1o = 0;
      for (int s = 0; s < NSUB; s++) begin
        reg_read(16'h0010 + 16'(s), 1, v); sbo += int'(v[7:0]);
        reg_read(16'h0014 + 16'(s), 1, v); b2o += int'(v[7:0]);
        reg_read(16'h0018 + 16'(s), 1, v); b1o += int'(v[7:0]);
      end
      checks++;
      if (sbo == 0 || b2o == 0 || b1o == 0) begin
        failures++; $display("error counters read %0d %0d %0d", sbo, b2o, b1o);
      end
    end
    // mechanisms
    $display("injected %0d pixels, %0d out in %0d hit words", n_injected, n_pixels_out, n_hit_words);
    $display("mechanisms: masked %0d frozen-lost %0d sweep-stall %0d multizone %0d sb-ovf %0d b2-ovf %0d b1-ovf %0d backpressure %0d",
             n_masked, n_frozen_lost, n_sweep_stall, n_multizone, n_sb_ovf, n_b2_ovf, n_b1_ovf, n_bp);
    if (n_masked == 0)      begin failures++; $display("masking never happened"); end
    if (n_frozen_lost == 0) begin failures++; $display("freeze loss never happened"); end
    if (n_sweep_stall == 0) begin failures++; $display("sweep stall never happened"); end
    if (n_multizone == 0)   begin failures++; $display("multi-zone column never happened"); end
    if (n_sb_ovf == 0)      begin failures++; $display("scan buffer overflow never happened"); end
    if (n_b2_ovf == 0)      begin failures++; $display("level-2 overflow never happened"); end
    if (n_b1_ovf == 0)      begin failures++; $display("level-1 overflow never happened"); end
    if (n_bp == 0)          begin failures++; $display("bus back-pressure never happened"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
