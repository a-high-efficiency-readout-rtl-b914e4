// tb_scan_buffer: random pushes and pops of time-stamped MP maps against a
// queue model; checks head map, head time stamp, flags and refusal when full.
module tb_scan_buffer;
  localparam int NMP = 1280, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [7:0] push_ts, head_ts;
  logic [NMP-1:0] push_map, head_map;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [NMP+7:0] q[$];
  int checks = 0, failures = 0, n_refused = 0;

  scan_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_ts = 0; push_map = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      push    = ($urandom_range(0, 99) < ((cyc / 300) % 2 == 0 ? 70 : 30));
      pop     = ($urandom_range(0, 99) < ((cyc / 300) % 2 == 0 ? 30 : 70));
      push_ts = 8'(cyc);
      for (int i = 0; i < NMP; i += 32) push_map[i +: 32] = $urandom;
      #1;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || count !== q.size()) begin
        failures++; $display("flags mismatch");
      end
      if (q.size() > 0) begin
        checks++;
        if ({head_ts, head_map} !== q[0]) begin failures++; $display("head mismatch"); end
      end
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) begin
        if (q.size() < DEPTH) q.push_back({push_ts, push_map});
        else n_refused++;
      end
    end
    checks++;
    if (n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
