// barrel: the hit FIFO of the readout, used both as level-2 barrel (one per
// quarter of a submatrix, depth 8) and as level-1 barrel (one per
// submatrix, depth 32).
//
// A write into a full barrel is dropped and reported by a one-cycle
// overflow pulse: the readout never stalls on a full barrel, it loses the
// incoming hit ("overflow inefficiency"). A write and a read in the same
// cycle on a full barrel both happen. The head word is always visible on
// rd_data when empty is low (first-word fall-through); rd_en pops it.
// Writers that must not lose a word (time-stamp headers) look at full first.
//
// Follows the document: FIFO queues of zone hits, depths 8 and 32, hits lost
// when full. Own choices: the single clock and the fall-through read port.
module barrel #(
  parameter int unsigned W     = 19,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty    = (count == 0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd    = rd_en && !empty;
  assign do_wr    = wr_en && (!full || do_rd);
  assign overflow = wr_en && !do_wr;
  assign rd_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

endmodule
