// pixel_submatrix: the binary pixel matrix of one submatrix, 80 columns by
// 256 rows, built from 2x8 macro pixels (40 MP columns x 32 MP rows).
//
// Every macro pixel (MP) gets its own freeze, mask and reset line and drives
// its own fast-OR line. Read-out is column by column: rd_col picks one pixel
// column (the active column), mp_en picks which MPs of that column (one bit
// per MP row) may drive the 256-bit shared data bus, and the pixels of the
// selected MPs appear on bus, bit r = pixel row r. MPs that are not enabled
// leave their bus lines at 0. Reading is combinational: bus is valid in the
// cycle rd_valid is high.
//
// Follows the document: submatrix size, MP shape, MP and column enables and
// a column-wide shared data bus. Own choice: the bus is an OR of the enabled
// MPs instead of a tri-state line, since only enabled MPs drive it.
module pixel_submatrix #(
  parameter int unsigned COLS = 80,
  parameter int unsigned ROWS = 256,
  parameter int unsigned MP_W = 2,
  parameter int unsigned MP_H = 8,
  localparam int unsigned MPC = COLS / MP_W,
  localparam int unsigned MPR = ROWS / MP_H
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [COLS-1:0][ROWS-1:0]    hit,       // [column][row]
  input  logic [MPC-1:0][MPR-1:0]      freeze,
  input  logic [MPC-1:0][MPR-1:0]      mask,
  input  logic [MPC-1:0][MPR-1:0]      mp_reset,
  input  logic                         rd_valid,
  input  logic [$clog2(COLS)-1:0]      rd_col,
  input  logic [MPR-1:0]               mp_en,
  output logic [MPC-1:0][MPR-1:0]      fast_or,
  output logic [ROWS-1:0]              bus
);

  logic [MPC-1:0][ROWS-1:0] col_bus;   // what each MP column drives
  logic [$clog2(COLS)-1:0]  sel_mpc;
  logic [$clog2(MP_W)-1:0]  sel_sub;

  assign sel_mpc = $clog2(COLS)'(rd_col / $clog2(COLS)'(MP_W));
  assign sel_sub = $clog2(MP_W)'(rd_col % $clog2(COLS)'(MP_W));

  for (genvar c = 0; c < MPC; c++) begin : g_col
    for (genvar r = 0; r < MPR; r++) begin : g_row
      logic [MP_W-1:0][MP_H-1:0] mp_hit;
      for (genvar k = 0; k < MP_W; k++) begin : g_k
        assign mp_hit[k] = hit[c*MP_W + k][r*MP_H +: MP_H];
      end
      macro_pixel #(.MP_W(MP_W), .MP_H(MP_H)) u_mp (
        .clk      (clk),
        .rst_n    (rst_n),
        .hit      (mp_hit),
        .freeze   (freeze[c][r]),
        .mask     (mask[c][r]),
        .reset_mp (mp_reset[c][r]),
        .rd_en    (rd_valid && (sel_mpc == c) && mp_en[r]),
        .col_sel  (sel_sub),
        .fast_or  (fast_or[c][r]),
        .col_data (col_bus[c][r*MP_H +: MP_H])
      );
    end
  end

  always_comb begin
    bus = '0;
    for (int c = 0; c < MPC; c++) bus |= col_bus[c];
  end

endmodule
