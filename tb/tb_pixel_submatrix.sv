// tb_pixel_submatrix: full 80x256 submatrix against a pixel-level model.
// Sparse random hits, per-MP freeze, mask and reset lines and random
// column reads with random MP enables; every cycle the 1280 fast-OR lines
// and the 256-bit shared bus are compared with the model.
module tb_pixel_submatrix;
  localparam int COLS = 80, ROWS = 256, MPC = 40, MPR = 32;
  logic clk = 0, rst_n = 0;
  logic [COLS-1:0][ROWS-1:0] hit;
  logic [MPC-1:0][MPR-1:0] freeze, mask, mp_reset, fast_or;
  logic rd_valid;
  logic [6:0] rd_col;
  logic [MPR-1:0] mp_en;
  logic [ROWS-1:0] bus;
  logic [COLS-1:0][ROWS-1:0] model;
  int checks = 0, failures = 0, n_reads_nonzero = 0;

  pixel_submatrix dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MPC-1:0][MPR-1:0] model_fo();
    logic [MPC-1:0][MPR-1:0] f;
    f = '0;
    for (int x = 0; x < COLS; x++)
      for (int y = 0; y < ROWS; y++) if (model[x][y]) f[x / 2][y / 8] = 1'b1;
    return f;
  endfunction

  initial begin
    hit = '0; freeze = '0; mask = '0; mp_reset = '0; rd_valid = 0; rd_col = '0; mp_en = '0;
    model = '0;
    for (int i = 0; i < 20; i++) mask[$urandom_range(0, MPC - 1)][$urandom_range(0, MPR - 1)] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      // outputs for the current state and read request
      checks++;
      if (fast_or !== model_fo()) begin failures++; $display("fast_or mismatch at %0d", cyc); end
      begin
        logic [ROWS-1:0] eb;
        eb = '0;
        if (rd_valid)
          for (int y = 0; y < ROWS; y++) if (mp_en[y / 8]) eb[y] = model[rd_col][y];
        checks++;
        if (bus !== eb) begin failures++; $display("bus mismatch at %0d col %0d", cyc, rd_col); end
        if (eb != 0) n_reads_nonzero++;
      end
      // next stimulus
      hit = '0;
      for (int i = 0; i < 20; i++) hit[$urandom_range(0, COLS - 1)][$urandom_range(0, ROWS - 1)] = 1'b1;
      for (int i = 0; i < 10; i++) freeze[$urandom_range(0, MPC - 1)][$urandom_range(0, MPR - 1)] ^= 1'b1;
      mp_reset = '0;
      for (int i = 0; i < 8; i++) mp_reset[$urandom_range(0, MPC - 1)][$urandom_range(0, MPR - 1)] = 1'b1;
      rd_valid = $urandom_range(0, 3) != 0;
      rd_col   = 7'($urandom_range(0, COLS - 1));
      mp_en    = $urandom;
      // model update at the next edge
      for (int x = 0; x < COLS; x++)
        for (int y = 0; y < ROWS; y++) begin
          if (mp_reset[x / 2][y / 8]) model[x][y] = 1'b0;
          else if (!freeze[x / 2][y / 8] && !mask[x / 2][y / 8] && hit[x][y]) model[x][y] = 1'b1;
        end
    end
    checks++;
    if (n_reads_nonzero < 100) begin failures++; $display("too few non-empty reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
