// macro_pixel: a 2x8 group of binary pixels, the smallest unit the readout
// addresses and time-tags.
//
// Each pixel is a latch-like flag set by its discriminator pulse (hit) and
// held until the macro pixel (MP) is reset. The MP drives one fast-OR line,
// the OR of its 16 flags, and listens to one freeze line: while frozen, new
// hits are ignored (they are lost, which is the "frozen MP inefficiency").
// A hit on a pixel already set is also lost. A masked MP never records hits.
//
// Read-out: when rd_en is high the flags of the pixel column chosen by
// col_sel (0 or 1) appear on col_data (8 bits, bit i = row i of the MP);
// otherwise col_data is 0, so the outputs of all MPs of a column can be
// OR-ed onto the shared data bus. reset_mp clears all 16 flags at the next
// clock edge and wins over a hit in the same cycle.
//
// Follows the document: 2x8 shape, fast-OR, freeze, reset after read,
// column-wise read onto a shared bus. Own choices: flags are clocked
// flip-flops sampled on the readout clock, the mask input, and an OR-bus in
// place of the tri-state bus of the silicon.
module macro_pixel #(
  parameter int unsigned MP_W = 2,   // pixel columns per MP
  parameter int unsigned MP_H = 8    // pixel rows per MP
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [MP_W-1:0][MP_H-1:0] hit,       // discriminator pulses, [column][row]
  input  logic                      freeze,
  input  logic                      mask,
  input  logic                      reset_mp,
  input  logic                      rd_en,
  input  logic [$clog2(MP_W)-1:0]   col_sel,
  output logic                      fast_or,
  output logic [MP_H-1:0]           col_data
);

  logic [MP_W-1:0][MP_H-1:0] pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pix <= '0;
    else if (reset_mp) pix <= '0;
    else if (!freeze && !mask) pix <= pix | hit;
  end

  assign fast_or  = |pix;
  assign col_data = rd_en ? pix[col_sel] : '0;

endmodule
