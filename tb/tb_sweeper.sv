// tb_sweeper: sweep logic with a real scan buffer (depth 2) on a small
// 4x4 macro-pixel array whose fast-OR lines are modelled in the testbench
// (an MP fires when told to, unless frozen, and clears on mp_reset).
// Checks, all against the testbench's own bookkeeping:
//   * every fired MP is read exactly once, in the map whose header carries
//     the period it fired in, or a later one only after a scan-buffer
//     overflow;
//   * an MP is frozen from the BCO edge after it fired until its reset;
//   * within a map MP columns come in increasing order, each read as pixel
//     column 2c then 2c+1 with mp_en equal to the map's MPs there, and the
//     reset comes with the second read;
//   * with sparsifiers always ready a map with k columns takes 2k+3 cycles.
module tb_sweeper;
  import superpix_pkg::*;
  localparam int MPC = 4, MPR = 4, NMP = MPC * MPR;
  logic clk = 0, rst_n = 0;
  logic run = 1, bco_tick = 0;
  logic [7:0] ts;
  logic [MPC-1:0][MPR-1:0] fast_or, freeze, mp_reset;
  logic rd_valid;
  logic [2:0] rd_col;
  logic [MPR-1:0] mp_en;
  logic sb_push, sb_full, sb_pop, sb_empty, sb_overflow;
  logic [7:0] sb_push_ts, sb_head_ts;
  logic [NMP-1:0] sb_push_map, sb_head_map;
  logic sp_ready, sp_load, sp_load_ts, busy;
  logic [7:0] sp_ts;

  int checks = 0, failures = 0;
  int fire_period[MPC][MPR];      // -1: not fired
  bit late_ok[MPC][MPR];          // an overflow happened since it fired
  int period = 0;                 // testbench's own BCO count
  int n_ovf = 0, n_maps = 0, n_reads = 0, n_timed = 0;
  int map_ts = -1, last_col = -1, last_sub = 1;
  logic [MPC-1:0][MPR-1:0] fo_model, seen_frozen;

  sweeper #(.MPC(MPC), .MPR(MPR), .MP_W(2)) dut (.*);
  scan_buffer #(.NMP(NMP), .DEPTH(2)) u_sb (
    .clk, .rst_n, .push (sb_push), .push_ts (sb_push_ts), .push_map (sb_push_map),
    .pop (sb_pop), .head_ts (sb_head_ts), .head_map (sb_head_map),
    .empty (sb_empty), .full (sb_full), .count ()
  );
  time_counter u_tc (.clk, .rst_n, .run, .bco_tick, .ts);

  assign fast_or = fo_model;
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the sweep at every edge
  always @(posedge clk) if (rst_n) begin
    if (sp_load && sp_load_ts) begin
      map_ts = int'(sp_ts); last_col = -1; last_sub = 1; n_maps++;
    end
    if (rd_valid) begin
      int c, sub;
      c = int'(rd_col) / 2; sub = int'(rd_col) % 2;
      n_reads++;
      checks++;
      if (sub == 0 ? !(last_sub == 1 && c > last_col) : !(last_sub == 0 && c == last_col)) begin
        failures++; $display("column order: col %0d sub %0d after %0d/%0d", c, sub, last_col, last_sub);
      end
      last_col = c; last_sub = sub;
      for (int r = 0; r < MPR; r++) begin
        // only fired, frozen MPs are enabled, and all of this map's are
        if (mp_en[r]) bool_check(fire_period[c][r] >= 0 && seen_frozen[c][r], "mp_en set");
        if (fire_period[c][r] >= 0 && fire_period[c][r] % 256 == map_ts && !late_ok[c][r])
          bool_check(mp_en[r], "mp_en clear");
        if (mp_en[r] && sub == 1) begin
          // read in the right map
          checks++;
          if (!(fire_period[c][r] % 256 == map_ts || late_ok[c][r])) begin
            failures++; $display("MP %0d/%0d fired in %0d read in map %0d", c, r, fire_period[c][r], map_ts);
          end
        end
        bool_check(mp_reset[c][r] == (mp_en[r] && sub == 1), "reset");
      end
    end else begin
      checks++;
      if (mp_reset != '0) begin failures++; $display("reset without read"); end
    end
    // model of the MPs
    for (int c = 0; c < MPC; c++)
      for (int r = 0; r < MPR; r++)
        if (mp_reset[c][r]) begin
          fo_model[c][r] <= 1'b0; fire_period[c][r] = -1; late_ok[c][r] = 0; seen_frozen[c][r] <= 1'b0;
        end
    if (bco_tick) begin
      period++;
      if (sb_overflow) begin
        n_ovf++;
        for (int c = 0; c < MPC; c++) for (int r = 0; r < MPR; r++) if (fire_period[c][r] >= 0) late_ok[c][r] = 1;
      end
      for (int c = 0; c < MPC; c++) for (int r = 0; r < MPR; r++)
        if (fire_period[c][r] >= 0 && !mp_reset[c][r]) seen_frozen[c][r] <= 1'b1;
    end
  end

  // frozen from the edge after firing until reset
  always @(negedge clk) if (rst_n)
    for (int c = 0; c < MPC; c++) for (int r = 0; r < MPR; r++) begin
      checks++;
      if (freeze[c][r] !== seen_frozen[c][r]) begin
        failures++; $display("freeze %0d/%0d is %0d expected %0d", c, r, freeze[c][r], seen_frozen[c][r]);
      end
    end

  task automatic bool_check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s mismatch", what); end
  endtask

  // fire random MPs (not frozen ones: those would lose the hit)
  task automatic fire(input int n);
    for (int i = 0; i < n; i++) begin
      int c, r;
      c = $urandom_range(0, MPC - 1); r = $urandom_range(0, MPR - 1);
      if (!freeze[c][r] && !fo_model[c][r]) begin
        fo_model[c][r] = 1'b1;
        fire_period[c][r] = period;
      end
    end
  endtask

  initial begin
    sp_ready = 1;
    fo_model = '0; seen_frozen = '0;
    for (int c = 0; c < MPC; c++) for (int r = 0; r < MPR; r++) begin fire_period[c][r] = -1; late_ok[c][r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // timed phase: one map at a time, sparsifiers always ready
    for (int m = 0; m < 20; m++) begin
      int k, t0, t1;
      logic [MPC-1:0] cols;
      @(negedge clk);
      fire($urandom_range(1, 6));
      cols = '0;
      for (int c = 0; c < MPC; c++) cols[c] = |fo_model[c];
      k = $countones(cols);
      bco_tick = 1;
      @(negedge clk);
      bco_tick = 0;
      t0 = $time;
      while (busy) @(negedge clk);
      t1 = $time;
      checks++; n_timed++;
      if ((t1 - t0) / 10 != 2 * k + 3) begin
        failures++; $display("map with %0d columns took %0d cycles", k, (t1 - t0) / 10);
      end
    end
    // random phase: frequent BCO edges, stalling sparsifiers
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) fire(2);
      bco_tick = ($urandom_range(0, 5) == 0);
      sp_ready = ($urandom_range(0, 2) != 0);
    end
    bco_tick = 0; sp_ready = 1;
    @(negedge clk); bco_tick = 1; @(negedge clk); bco_tick = 0;
    repeat (200) @(negedge clk);
    bco_tick = 1; @(negedge clk); bco_tick = 0;
    repeat (200) @(negedge clk);
    checks++;
    for (int c = 0; c < MPC; c++) for (int r = 0; r < MPR; r++)
      if (fire_period[c][r] >= 0) begin failures++; $display("MP %0d/%0d never read", c, r); end
    checks++;
    if (n_ovf == 0 || n_maps < 100) begin failures++; $display("overflows %0d maps %0d", n_ovf, n_maps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
