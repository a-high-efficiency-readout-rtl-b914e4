// tb_submatrix_readout: one full-size submatrix (80x256 pixels) from pixel
// hits to the level-1 barrel output, which the testbench pops at random.
// Nominal phase: 2x2 clusters only on idle macro pixels; every pixel must
// come out once, decoded from {level-2 address, column, zone, pattern},
// under the header of the BCO period it was injected in, with one header
// per period. Overload phase: dense hits, short BCO periods, barrel rarely
// popped; every pixel that comes out must have been injected no later than
// its header's period, and scan-buffer, level-2 and level-1 overflows must
// all occur. A masked macro pixel must stay silent throughout.
module tb_submatrix_readout;
  import superpix_pkg::*;
  localparam int COLS = 80, ROWS = 256;
  logic clk = 0, rst_n = 0, run = 1, bco_tick = 0;
  logic [COLS-1:0][ROWS-1:0] hit;
  logic [39:0][31:0] mask;
  logic b1_valid, b1_pop, busy, sb_full, sb_overflow, b2_overflow, b1_overflow;
  logic [B1_W:0] b1_word;
  logic [7:0] ts;

  submatrix_readout dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, period = 0, hdr = -1;
  bit strict = 1;
  int exp_q[int][$];
  int mp_out[int];
  int n_sb = 0, n_b2 = 0, n_b1 = 0, n_masked = 0, n_out = 0;
  real pop_prob = 1.0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sb_overflow) n_sb++;
    if (b2_overflow) n_b2++;
    if (b1_overflow) n_b1++;
    if (b1_valid && b1_pop) begin
      if (b1_word[B1_W]) begin
        checks++;
        if (strict && hdr >= 0 && int'(b1_word[7:0]) != (hdr + 1) % 256) begin
          failures++; $display("header %0d after %0d", b1_word[7:0], hdr);
        end
        hdr = int'(b1_word[7:0]);
      end else begin
        int x, y, k;
        x = int'(b1_word[17:11]);
        for (int b = 0; b < 8; b++) if (b1_word[b]) begin
          y = 64 * int'(b1_word[19:18]) + 8 * int'(b1_word[10:8]) + b;
          k = x * ROWS + y;
          n_out++;
          checks++;
          if (!exp_q.exists(k)) begin failures++; $display("pixel %0d/%0d not injected", x, y); end
          else begin
            if (strict ? (exp_q[k][0] % 256 != hdr) : (8'(8'(hdr) - 8'(exp_q[k][0] % 256)) >= 8'd128)) begin
              failures++; $display("pixel %0d/%0d of period %0d under header %0d", x, y, exp_q[k][0] % 256, hdr);
            end
            void'(exp_q[k].pop_front());
            if (exp_q[k].size() == 0) exp_q.delete(k);
            if (mp_out.exists((x / 2) * 32 + y / 8)) begin
              mp_out[(x / 2) * 32 + y / 8]--;
              if (mp_out[(x / 2) * 32 + y / 8] == 0) mp_out.delete((x / 2) * 32 + y / 8);
            end
          end
        end
      end
    end
  end

  always @(negedge clk) b1_pop = ($urandom_range(0, 999) < int'(pop_prob * 1000.0));

  task automatic cluster(input bit only_idle);
    int x0, y0;
    x0 = $urandom_range(0, COLS - 2); y0 = $urandom_range(0, ROWS - 2);
    if (only_idle)
      for (int d = 0; d < 4; d++) if (mp_out.exists(((x0 + d / 2) / 2) * 32 + (y0 + d % 2) / 8)) return;
    for (int d = 0; d < 4; d++) begin
      int x, y;
      x = x0 + d / 2; y = y0 + d % 2;
      hit[x][y] = 1'b1;
      if (mask[x / 2][y / 8]) begin n_masked++; continue; end
      exp_q[x * ROWS + y].push_back(period);
      mp_out[(x / 2) * 32 + y / 8] = mp_out.exists((x / 2) * 32 + y / 8) ? mp_out[(x / 2) * 32 + y / 8] + 1 : 1;
    end
  endtask

  task automatic bco_period(input int n, input int per_cycle_permille, input int burst, input bit only_idle);
    for (int c = 0; c < n; c++) begin
      bco_tick = (c == n - 1);
      if (c != n - 1 && $urandom_range(0, 999) < per_cycle_permille)
        for (int i = 0; i < burst; i++) cluster(only_idle);
      @(posedge clk); #1;
      hit = '0;
    end
    bco_tick = 0;
    period++;
  endtask

  initial begin
    hit = '0; mask = '0;
    mask[20][5] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 150; p++) bco_period(50, 80, 1, 1);
    repeat (300) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d pixels never came out", exp_q.size()); end
    // overload
    strict = 0; pop_prob = 0.1;
    for (int p = 0; p < 60; p++) bco_period(16, 1000, 3, 0);
    pop_prob = 1.0;
    for (int p = 0; p < 60; p++) bco_period(50, 0, 0, 1);
    $display("overload lost %0d pixels", exp_q.size());
    exp_q.delete(); mp_out.delete();
    // a masked MP in the nominal phase
    @(negedge clk); hit[40][42] = 1'b1; n_masked++; @(negedge clk); hit = '0;
    checks++;
    if (n_sb == 0 || n_b2 == 0 || n_b1 == 0 || n_masked == 0 || n_out < 1000) begin
      failures++; $display("mechanisms: sb %0d b2 %0d b1 %0d masked %0d out %0d", n_sb, n_b2, n_b1, n_masked, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
