// mask_register: one mask bit per macro pixel of the whole matrix.
//
// A masked macro pixel records no hits, so it never raises its fast-OR and
// never enters a map (for noisy or dead pixels). The bits are written and
// read back a byte at a time through the slow-control register bus: byte
// a holds mask bits 8a..8a+7, and bit i belongs to submatrix
// i / (MPC*MPR), MP column (i % (MPC*MPR)) / MPR, MP row i % MPR.
// Writes take effect at the next clock edge; rdata is combinational. All
// bits clear at reset (nothing masked).
//
// Follows the document: MP masks as read/write slow-control registers. Own
// choices: the bit order, byte access and reset value.
module mask_register #(
  parameter int unsigned NSUB = 4,
  parameter int unsigned MPC  = 40,
  parameter int unsigned MPR  = 32,
  localparam int unsigned NBITS  = NSUB * MPC * MPR,
  localparam int unsigned NBYTES = (NBITS + 7) / 8,
  localparam int unsigned AW     = $clog2(NBYTES)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,
  input  logic [AW-1:0]                     addr,
  input  logic [7:0]                        wdata,
  output logic [7:0]                        rdata,
  output logic [NSUB-1:0][MPC-1:0][MPR-1:0] mask
);

  logic [NBYTES*8-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (wr_en && (32'(addr) < NBYTES)) bits[addr*8 +: 8] <= wdata;
  end

  assign rdata = (32'(addr) < NBYTES) ? bits[addr*8 +: 8] : 8'h00;
  assign mask  = bits[NBITS-1:0];

endmodule
