// tb_mask_register: random byte writes to the mask register at full size
// (4 x 40 x 32 macro pixels); checks read-back and that every mask output
// bit follows the documented bit order (byte a bit b = MP index 8a+b).
module tb_mask_register;
  localparam int NSUB = 4, MPC = 40, MPR = 32, NBYTES = NSUB * MPC * MPR / 8;
  logic clk = 0, rst_n = 0, wr_en;
  logic [9:0] addr;
  logic [7:0] wdata, rdata;
  logic [NSUB-1:0][MPC-1:0][MPR-1:0] mask;
  logic [7:0] model[NBYTES];
  int checks = 0, failures = 0;

  mask_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; addr = '0; wdata = '0;
    for (int a = 0; a < NBYTES; a++) model[a] = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      checks++;
      if (rdata !== (32'(addr) < NBYTES ? model[addr] : 8'h00)) begin failures++; $display("readback mismatch at %0d", addr); end
      if (cyc % 200 == 0) begin
        for (int i = 0; i < NSUB * MPC * MPR; i++) begin
          checks++;
          if (mask[i / (MPC * MPR)][(i % (MPC * MPR)) / MPR][i % MPR] !== model[i / 8][i % 8]) begin
            failures++; $display("mask bit %0d wrong", i);
          end
        end
      end
      wr_en = $urandom_range(0, 1);
      addr  = 10'($urandom_range(0, 700));
      wdata = 8'($urandom);
      if (wr_en && 32'(addr) < NBYTES) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
