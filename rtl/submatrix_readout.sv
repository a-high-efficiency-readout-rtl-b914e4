// submatrix_readout: one submatrix of the pixel matrix with its own scan and
// readout logic. Four of these work in parallel in the chip.
//
// Data path: pixel matrix -> (sweep logic, time counter, scan buffer) ->
// active column on the shared bus -> 4 sparsifiers, each over a quarter of
// the column -> 4 level-2 barrels -> concentrator -> level-1 barrel.
// The level-1 barrel's head is the output (b1_valid/b1_word, popped by
// b1_pop). Its words are {tag, level-2 address, column, zone, pattern} for a
// hit and {tag=1, time stamp} for the header that opens each BCO period.
//
// Losses are reported by one-cycle pulses: sb_overflow (BCO edge found the
// scan buffer full), b2_overflow (a zone hit hit a full level-2 barrel),
// b1_overflow (a hit hit a full level-1 barrel).
//
// Follows the document's block diagram of a submatrix readout, with its
// sizes (80x256 pixels, 2x8 macro pixels, 4 level-2 barrels of depth 8,
// level-1 barrel of depth 32). The scan buffer depth (4) and the single
// clock for matrix, sweep and barrels are this design's own choices.
module submatrix_readout
  import superpix_pkg::*;
#(
  parameter int unsigned COLS     = 80,
  parameter int unsigned ROWS     = 256,
  parameter int unsigned MP_W     = 2,
  parameter int unsigned MP_H     = 8,
  parameter int unsigned B2_DEPTH = 8,
  parameter int unsigned B1_DEPTH = 32,
  parameter int unsigned SB_DEPTH = 4,
  localparam int unsigned MPC     = COLS / MP_W,
  localparam int unsigned MPR     = ROWS / MP_H,
  localparam int unsigned NSP     = 1 << L2A_W,            // sparsifiers, level-2 barrels
  localparam int unsigned ZONES   = ROWS / PAT_W / NSP     // zones per sparsifier
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  logic                      bco_tick,
  input  logic [COLS-1:0][ROWS-1:0] hit,
  input  logic [MPC-1:0][MPR-1:0]   mask,
  output logic                      b1_valid,
  output logic [B1_W:0]             b1_word,
  input  logic                      b1_pop,
  output logic [TS_W-1:0]           ts,
  output logic                      busy,
  output logic                      sb_full,
  output logic                      sb_overflow,
  output logic                      b2_overflow,
  output logic                      b1_overflow
);

  // matrix <-> sweeper
  logic [MPC-1:0][MPR-1:0]  fast_or, freeze, mp_reset;
  logic                     rd_valid;
  logic [$clog2(COLS)-1:0]  rd_col;
  logic [MPR-1:0]           mp_en;
  logic [ROWS-1:0]          bus;

  // sweeper <-> scan buffer
  logic                     sb_push, sb_pop, sb_empty;
  logic [TS_W-1:0]          sb_push_ts, sb_head_ts;
  logic [MPC*MPR-1:0]       sb_push_map, sb_head_map;

  // sweeper <-> sparsifiers
  logic                     sp_load, sp_load_ts;
  logic [TS_W-1:0]          sp_ts;
  logic [NSP-1:0]           sp_ready;

  // sparsifiers -> level-2 barrels -> concentrator
  logic [NSP-1:0]           b2_wr, b2_full, b2_empty, b2_ovf, b2_pop;
  logic [NSP-1:0][HIT_W:0]  b2_wdata, b2_rdata;

  // concentrator -> level-1 barrel
  logic                     b1_wr, b1_full, b1_empty;
  logic [B1_W:0]            b1_wdata;

  pixel_submatrix #(.COLS(COLS), .ROWS(ROWS), .MP_W(MP_W), .MP_H(MP_H)) u_matrix (
    .clk, .rst_n, .hit, .freeze, .mask, .mp_reset,
    .rd_valid, .rd_col, .mp_en, .fast_or, .bus
  );

  time_counter u_tc (.clk, .rst_n, .run, .bco_tick, .ts);

  scan_buffer #(.NMP(MPC * MPR), .DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst_n,
    .push (sb_push), .push_ts (sb_push_ts), .push_map (sb_push_map),
    .pop (sb_pop), .head_ts (sb_head_ts), .head_map (sb_head_map),
    .empty (sb_empty), .full (sb_full), .count ()
  );

  sweeper #(.MPC(MPC), .MPR(MPR), .MP_W(MP_W)) u_sweep (
    .clk, .rst_n, .run, .bco_tick, .ts,
    .fast_or, .freeze, .mp_reset, .rd_valid, .rd_col, .mp_en,
    .sb_push, .sb_push_ts, .sb_push_map, .sb_full, .sb_pop, .sb_empty,
    .sb_head_ts, .sb_head_map, .sb_overflow,
    .sp_ready (&sp_ready), .sp_load, .sp_load_ts, .sp_ts, .busy
  );

  for (genvar k = 0; k < NSP; k++) begin : g_l2
    sparsifier #(.ZONES(ZONES), .ZONE_H(PAT_W)) u_sp (
      .clk, .rst_n,
      .load    (sp_load),
      .load_ts (sp_load_ts),
      .slice   (bus[k*ZONES*PAT_W +: ZONES*PAT_W]),
      .x       (X_W'(rd_col)),
      .ts      (sp_ts),
      .ready   (sp_ready[k]),
      .b2_wr   (b2_wr[k]),
      .b2_data (b2_wdata[k]),
      .b2_full (b2_full[k])
    );

    barrel #(.W(HIT_W + 1), .DEPTH(B2_DEPTH)) u_b2 (
      .clk, .rst_n,
      .wr_en (b2_wr[k]), .wr_data (b2_wdata[k]),
      .rd_en (b2_pop[k]), .rd_data (b2_rdata[k]),
      .empty (b2_empty[k]), .full (b2_full[k]), .overflow (b2_ovf[k]), .count ()
    );
  end

  concentrator #(.N(NSP), .W(HIT_W), .DROP_HITS(1'b1)) u_conc (
    .clk, .rst_n,
    .in_valid (~b2_empty), .in_word (b2_rdata), .in_pop (b2_pop),
    .out_wr (b1_wr), .out_word (b1_wdata), .out_full (b1_full)
  );

  barrel #(.W(B1_W + 1), .DEPTH(B1_DEPTH)) u_b1 (
    .clk, .rst_n,
    .wr_en (b1_wr), .wr_data (b1_wdata),
    .rd_en (b1_pop), .rd_data (b1_word),
    .empty (b1_empty), .full (b1_full), .overflow (b1_overflow), .count ()
  );

  assign b1_valid    = !b1_empty;
  assign b2_overflow = |b2_ovf;

endmodule
