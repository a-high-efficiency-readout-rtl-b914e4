// tb_time_counter: the BCO counter advances once per strobe while run is
// high, holds otherwise, and wraps modulo 256.
module tb_time_counter;
  logic clk = 0, rst_n = 0, run, bco_tick;
  logic [7:0] ts;
  int checks = 0, failures = 0;
  int expect_cnt = 0;

  time_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 1; bco_tick = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      checks++;
      if (ts !== 8'(expect_cnt)) begin
        failures++; $display("ts %0d expected %0d", ts, 8'(expect_cnt));
      end
      run      = ($urandom_range(0, 7) != 0);
      bco_tick = ($urandom_range(0, 2) == 0);
      if (run && bco_tick) expect_cnt++;
    end
    checks++;
    if (expect_cnt < 256) failures++;   // the wrap must have been exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
