// register_file: the slow-control registers of the chip.
//
// Byte registers behind a 16-bit register address, reached through the
// I2C-like slave (see i2c_slave.sv). Read/write: chip settings and the
// macro-pixel masks. Read-only: acquisition flags, rate counters and error
// counters. Map (all multi-byte values little-endian):
//   0x0000      CTRL   RW  bit0 run (acquisition on, reset value 1),
//                          bit1 clear all counters (write 1, self-clearing)
//   0x0002      FLAGS  RO  bits[NSUB-1:0] scan buffer full,
//                          bits[NSUB+3:4] submatrix readout busy
//   0x0004-07   HITS   RO  hit words sent on the chip data bus
//   0x0008-0B   TSW    RO  time-stamp words sent on the chip data bus
//   0x0010+s    SBOVF  RO  scan-buffer overflows of submatrix s (saturating)
//   0x0014+s    B2OVF  RO  level-2 barrel overflows of submatrix s (saturating)
//   0x0018+s    B1OVF  RO  level-1 barrel overflows of submatrix s (saturating)
//   0x0100-...  MASK   RW  macro-pixel mask bytes (mask_register)
// Unused addresses read 0. Writes are taken at the clock edge where wr_en
// is high; rdata is combinational from addr.
//
// Follows the document: one set of R/W registers (chip settings, MP masks),
// one set of read-only registers (acquisition flags, rate counters, error
// flags). The map, widths and reset values are this design's own choices.
module register_file #(
  parameter int unsigned NSUB    = 4,
  parameter int unsigned MASK_AW = 10,
  parameter logic [15:0] MASK_BASE = 16'h0100
) (
  input  logic                clk,
  input  logic                rst_n,
  // register bus
  input  logic [15:0]         addr,
  input  logic                wr_en,
  input  logic [7:0]          wdata,
  output logic [7:0]          rdata,
  // chip settings
  output logic                run,
  // mask register port
  output logic                mask_wr,
  output logic [MASK_AW-1:0]  mask_addr,
  input  logic [7:0]          mask_rdata,
  // events and flags
  input  logic [NSUB-1:0]     sb_full,
  input  logic [NSUB-1:0]     busy,
  input  logic                hit_word,
  input  logic                ts_word,
  input  logic [NSUB-1:0]     sb_overflow,
  input  logic [NSUB-1:0]     b2_overflow,
  input  logic [NSUB-1:0]     b1_overflow
);

  localparam int unsigned MASK_BYTES = 1 << MASK_AW;

  logic                   clr;
  logic [31:0]            hit_cnt, ts_cnt;
  logic [NSUB-1:0][7:0]   sb_cnt, b2_cnt, b1_cnt;
  logic                   in_mask;

  function automatic logic [7:0] sat_inc(input logic [7:0] v, input logic e);
    return (e && v != 8'hFF) ? v + 8'd1 : v;
  endfunction

  assign in_mask   = (addr >= MASK_BASE) && (32'(addr - MASK_BASE) < MASK_BYTES);
  assign mask_addr = MASK_AW'(addr - MASK_BASE);
  assign mask_wr   = wr_en && in_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b1;
      clr <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (wr_en && addr == 16'h0000) begin
        run <= wdata[0];
        clr <= wdata[1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_cnt <= '0;
      ts_cnt  <= '0;
      sb_cnt  <= '0;
      b2_cnt  <= '0;
      b1_cnt  <= '0;
    end else if (clr) begin
      hit_cnt <= '0;
      ts_cnt  <= '0;
      sb_cnt  <= '0;
      b2_cnt  <= '0;
      b1_cnt  <= '0;
    end else begin
      hit_cnt <= hit_cnt + 32'(hit_word);
      ts_cnt  <= ts_cnt + 32'(ts_word);
      for (int s = 0; s < NSUB; s++) begin
        sb_cnt[s] <= sat_inc(sb_cnt[s], sb_overflow[s]);
        b2_cnt[s] <= sat_inc(b2_cnt[s], b2_overflow[s]);
        b1_cnt[s] <= sat_inc(b1_cnt[s], b1_overflow[s]);
      end
    end
  end

  always_comb begin
    rdata = 8'h00;
    if (in_mask) rdata = mask_rdata;
    else begin
      case (addr)
        16'h0000: rdata = {6'b0, 1'b0, run};
        16'h0002: rdata = 8'({busy, 4'(sb_full)} );
        16'h0004: rdata = hit_cnt[7:0];
        16'h0005: rdata = hit_cnt[15:8];
        16'h0006: rdata = hit_cnt[23:16];
        16'h0007: rdata = hit_cnt[31:24];
        16'h0008: rdata = ts_cnt[7:0];
        16'h0009: rdata = ts_cnt[15:8];
        16'h000A: rdata = ts_cnt[23:16];
        16'h000B: rdata = ts_cnt[31:24];
        default: begin
          for (int s = 0; s < NSUB; s++) begin
            if (addr == 16'h0010 + 16'(s)) rdata = sb_cnt[s];
            if (addr == 16'h0014 + 16'(s)) rdata = b2_cnt[s];
            if (addr == 16'h0018 + 16'(s)) rdata = b1_cnt[s];
          end
        end
      endcase
    end
  end

endmodule
