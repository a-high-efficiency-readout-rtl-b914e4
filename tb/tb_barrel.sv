// tb_barrel: random writes and reads against a queue model of the barrel,
// checking head data, empty/full, count and that a write into a full barrel
// is dropped with an overflow pulse.
module tb_barrel;
  localparam int W = 19, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_ovf = 0;

  barrel #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // phase-dependent traffic: fill, drain, mixed
      wr_en   = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 80 : 30));
      rd_en   = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 30 : 80));
      wr_data = W'($urandom);
      #1;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || count !== q.size()) begin
        failures++; $display("flags mismatch size=%0d count=%0d", q.size(), count);
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("data mismatch"); end
      end
      checks++;
      if (overflow !== (wr_en && q.size() == DEPTH && !(rd_en && q.size() > 0))) begin
        failures++; $display("overflow mismatch");
      end
      @(posedge clk);
      begin
        bit popped;
        popped = 0;
        if (rd_en && q.size() > 0) begin void'(q.pop_front()); popped = 1; end
        if (wr_en) begin
          if (q.size() < DEPTH) q.push_back(wr_data);
          else n_ovf++;
        end
      end
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
