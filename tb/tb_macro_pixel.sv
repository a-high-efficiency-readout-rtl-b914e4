// tb_macro_pixel: self-checking test of one 2x8 macro pixel.
// Random hits, freeze, mask, reset and column reads are applied; a bit-level
// model of the 16 pixel flags predicts fast_or and col_data every cycle.
module tb_macro_pixel;
  logic clk = 0, rst_n = 0;
  logic [1:0][7:0] hit;
  logic freeze, mask, reset_mp, rd_en, col_sel;
  logic fast_or;
  logic [7:0] col_data;
  logic [1:0][7:0] model;
  int checks = 0, failures = 0;
  int n_frozen_lost = 0, n_masked_lost = 0;

  macro_pixel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit = '0; freeze = 0; mask = 0; reset_mp = 0; rd_en = 0; col_sel = 0;
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check outputs against the model
      checks++;
      if (fast_or !== (|model)) begin
        failures++; $display("fast_or mismatch at %0d", cyc);
      end
      checks++;
      if (col_data !== (rd_en ? model[col_sel] : 8'h00)) begin
        failures++; $display("col_data mismatch at %0d: %h", cyc, col_data);
      end
      // new stimulus
      for (int k = 0; k < 2; k++)
        for (int r = 0; r < 8; r++) hit[k][r] = ($urandom_range(0, 15) == 0);
      freeze   = ($urandom_range(0, 3) == 0);
      mask     = ($urandom_range(0, 9) == 0);
      reset_mp = ($urandom_range(0, 11) == 0);
      rd_en    = $urandom_range(0, 1);
      col_sel  = $urandom_range(0, 1);
      // model update at the coming edge
      if (reset_mp) model = '0;
      else if (!freeze && !mask) model = model | hit;
      else if (hit != '0) begin
        if (freeze) n_frozen_lost++;
        else n_masked_lost++;
      end
    end
    checks++;
    if (n_frozen_lost == 0 || n_masked_lost == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
