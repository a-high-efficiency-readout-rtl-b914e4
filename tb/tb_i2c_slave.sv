// tb_i2c_slave: a bit-banged I2C master drives the slave over a modelled
// open-drain bus (a line is low when either side pulls it low). The slave's
// register bus is connected to a byte memory in the testbench. Checks:
// address acknowledge only for the slave's own address, burst writes land at
// pointer, pointer+1, ..., burst reads with repeated START return the
// memory contents, and a master NACK ends a read.
module tb_i2c_slave;
  localparam int HALF = 20;   // clk cycles per half SCL period
  logic clk = 0, rst_n = 0;
  logic [2:0] chip_addr = 3'b101;
  logic scl_m = 1, sda_m = 1;  // master drives (1 = released)
  logic sda_oe;
  logic scl_i, sda_i;
  logic [15:0] reg_addr;
  logic reg_wr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [7:0] mem[logic [15:0]];
  logic [7:0] ref_mem[logic [15:0]];
  int checks = 0, failures = 0;

  assign scl_i = scl_m;
  assign sda_i = sda_m && !sda_oe;
  assign reg_rdata = mem.exists(reg_addr) ? mem[reg_addr] : 8'h00;

  i2c_slave dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (reg_wr) mem[reg_addr] = reg_wdata;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic i2c_start();
    sda_m = 1; wait_clk(HALF); scl_m = 1; wait_clk(HALF);
    sda_m = 0; wait_clk(HALF); scl_m = 0; wait_clk(HALF);
  endtask

  task automatic i2c_stop();
    sda_m = 0; wait_clk(HALF); scl_m = 1; wait_clk(HALF); sda_m = 1; wait_clk(HALF);
  endtask

  // send a byte, return the acknowledge bit (0 = ACK)
  task automatic i2c_write_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; wait_clk(HALF); scl_m = 1; wait_clk(HALF); scl_m = 0;
    end
    sda_m = 1; wait_clk(HALF); scl_m = 1; wait_clk(HALF / 2);
    ack = sda_i; wait_clk(HALF / 2); scl_m = 0;
  endtask

  task automatic i2c_read_byte(input bit master_ack, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin
      wait_clk(HALF); scl_m = 1; wait_clk(HALF / 2); b[i] = sda_i; wait_clk(HALF / 2); scl_m = 0;
    end
    sda_m = !master_ack; wait_clk(HALF); scl_m = 1; wait_clk(HALF); scl_m = 0;
    sda_m = 1;
  endtask

  task automatic expect_ack(input logic ack, input logic want, input string what);
    checks++;
    if (ack !== want) begin failures++; $display("%s: ack bit %0d expected %0d", what, ack, want); end
  endtask

  initial begin
    logic ack;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_clk(10);
    for (int t = 0; t < 12; t++) begin
      logic [15:0] ptr;
      int n;
      logic [2:0] dev;
      ptr = 16'($urandom_range(0, 16'hFFF0));
      n   = $urandom_range(1, 6);
      dev = (t % 4 == 3) ? 3'b011 : chip_addr;   // every fourth transfer to another chip
      // write burst
      i2c_start();
      i2c_write_byte({4'b0100, dev, 1'b0}, ack);
      expect_ack(ack, dev != chip_addr, "address");
      if (dev != chip_addr) begin
        i2c_stop();
        checks++;
        if (mem.size() != ref_mem.size()) begin failures++; $display("write to other chip taken"); end
        continue;
      end
      i2c_write_byte(ptr[15:8], ack); expect_ack(ack, 0, "ptr hi");
      i2c_write_byte(ptr[7:0], ack);  expect_ack(ack, 0, "ptr lo");
      for (int i = 0; i < n; i++) begin
        b = 8'($urandom);
        ref_mem[ptr + 16'(i)] = b;
        i2c_write_byte(b, ack); expect_ack(ack, 0, "data");
      end
      i2c_stop();
      for (int i = 0; i < n; i++) begin
        checks++;
        if (!mem.exists(ptr + 16'(i)) || mem[ptr + 16'(i)] !== ref_mem[ptr + 16'(i)]) begin
          failures++; $display("write %h not stored", ptr + 16'(i));
        end
      end
      // read burst with repeated start
      i2c_start();
      i2c_write_byte({4'b0100, chip_addr, 1'b0}, ack); expect_ack(ack, 0, "address w");
      i2c_write_byte(ptr[15:8], ack); expect_ack(ack, 0, "ptr hi");
      i2c_write_byte(ptr[7:0], ack);  expect_ack(ack, 0, "ptr lo");
      i2c_start();
      i2c_write_byte({4'b0100, chip_addr, 1'b1}, ack); expect_ack(ack, 0, "address r");
      for (int i = 0; i < n; i++) begin
        i2c_read_byte(i != n - 1, b);
        checks++;
        if (b !== ref_mem[ptr + 16'(i)]) begin failures++; $display("read %h got %h expected %h", ptr + 16'(i), b, ref_mem[ptr + 16'(i)]); end
      end
      i2c_stop();
      checks++;
      if (sda_oe) begin failures++; $display("slave still drives SDA after NACK"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
