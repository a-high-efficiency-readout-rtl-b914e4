// superpix_top: readout of an 80K-pixel binary pixel matrix at 100 MHz/cm2.
//
// The 320x256 pixel matrix is split into four 80x256 submatrices, each with
// its own sweep logic, time counter, scan buffer, sparsifiers and barrels
// (submatrix_readout), all working in parallel; each reads one 256-pixel
// column per clock, so 1024 pixels are examined per cycle. A common output
// stage merges the four time-sorted streams onto the chip data bus: a
// time-stamp word opens each BCO period, followed by its 22-bit zone hits.
// An I2C-like slow-control slave reaches the register file (settings,
// rate and error counters) and the macro-pixel mask register.
//
// Ports: hit[s][x][y] are the digital discriminator pulses of pixel (x, y)
// of submatrix s, sampled on clk; bco_tick is a one-cycle strobe per BCO
// period (the time granularity, 0.25-2 us); the chip data bus is
// bus_valid/bus_ready/bus_is_ts/bus_data; scl_i, sda_i, sda_oe and the
// hard-wired chip_addr pins form the slow-control port. Everything runs on
// the readout clock clk (60-100 MHz in the target conditions).
//
// Follows the document: matrix and submatrix sizes, macro pixels, four
// parallel scans, readout chain per submatrix, common output stage, slow
// control. Own choices: one clock for all digital logic, the BCO edge as a
// strobe, and the bus handshake.
module superpix_top
  import superpix_pkg::*;
#(
  parameter int unsigned NSUB     = 4,
  parameter int unsigned COLS     = 80,
  parameter int unsigned ROWS     = 256,
  parameter int unsigned MP_W     = 2,
  parameter int unsigned MP_H     = 8,
  parameter int unsigned B2_DEPTH = 8,
  parameter int unsigned B1_DEPTH = 32,
  parameter int unsigned SB_DEPTH = 4,
  localparam int unsigned MPC     = COLS / MP_W,
  localparam int unsigned MPR     = ROWS / MP_H,
  localparam int unsigned MASK_AW = $clog2((NSUB * MPC * MPR + 7) / 8)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                bco_tick,
  input  logic [NSUB-1:0][COLS-1:0][ROWS-1:0] hit,
  output logic                                bus_valid,
  output logic                                bus_is_ts,
  output logic [OUT_W-1:0]                    bus_data,
  input  logic                                bus_ready,
  input  logic [2:0]                          chip_addr,
  input  logic                                scl_i,
  input  logic                                sda_i,
  output logic                                sda_oe
);

  logic                               run;
  logic [NSUB-1:0][MPC-1:0][MPR-1:0]  mask;
  logic [NSUB-1:0]                    b1_valid, b1_pop;
  logic [NSUB-1:0][B1_W:0]            b1_word;
  logic [NSUB-1:0]                    busy, sb_full, sb_ovf, b2_ovf, b1_ovf;
  logic                               hit_word, ts_word;

  logic [15:0]        reg_addr;
  logic               reg_wr;
  logic [7:0]         reg_wdata, reg_rdata;
  logic               mask_wr;
  logic [MASK_AW-1:0] mask_addr;
  logic [7:0]         mask_rdata;

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    submatrix_readout #(
      .COLS (COLS), .ROWS (ROWS), .MP_W (MP_W), .MP_H (MP_H),
      .B2_DEPTH (B2_DEPTH), .B1_DEPTH (B1_DEPTH), .SB_DEPTH (SB_DEPTH)
    ) u_sub (
      .clk, .rst_n, .run, .bco_tick,
      .hit         (hit[s]),
      .mask        (mask[s]),
      .b1_valid    (b1_valid[s]),
      .b1_word     (b1_word[s]),
      .b1_pop      (b1_pop[s]),
      .ts          (),
      .busy        (busy[s]),
      .sb_full     (sb_full[s]),
      .sb_overflow (sb_ovf[s]),
      .b2_overflow (b2_ovf[s]),
      .b1_overflow (b1_ovf[s])
    );
  end

  output_stage #(.NSUB(NSUB)) u_out (
    .clk, .rst_n,
    .in_valid (b1_valid), .in_word (b1_word), .in_pop (b1_pop),
    .bus_valid, .bus_is_ts, .bus_data, .bus_ready, .hit_word, .ts_word
  );

  i2c_slave u_i2c (
    .clk, .rst_n, .chip_addr, .scl_i, .sda_i, .sda_oe,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata
  );

  register_file #(.NSUB(NSUB), .MASK_AW(MASK_AW)) u_regs (
    .clk, .rst_n,
    .addr (reg_addr), .wr_en (reg_wr), .wdata (reg_wdata), .rdata (reg_rdata),
    .run, .mask_wr, .mask_addr, .mask_rdata,
    .sb_full, .busy, .hit_word, .ts_word,
    .sb_overflow (sb_ovf), .b2_overflow (b2_ovf), .b1_overflow (b1_ovf)
  );

  mask_register #(.NSUB(NSUB), .MPC(MPC), .MPR(MPR)) u_mask (
    .clk, .rst_n,
    .wr_en (mask_wr), .addr (mask_addr), .wdata (reg_wdata), .rdata (mask_rdata),
    .mask
  );

endmodule
