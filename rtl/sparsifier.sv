// sparsifier: zone sparsification of one quarter of the active column.
//
// The 256-pixel active column of a submatrix is cut into 32 zones of 1x8
// pixels; each sparsifier owns 8 consecutive zones (64 pixels) and feeds
// one level-2 barrel. Instead of one word per pixel it writes one word per
// non-empty zone: {column address, zone address, 8-bit pattern}.
//
// Interface and timing. load samples either a column slice (load_ts=0,
// slice + x) or a time-stamp header (load_ts=1, ts). From the next cycle the
// sparsifier writes one word per cycle into its barrel: the header, or the
// non-empty zones in increasing zone order. Zone hits are written whatever
// the barrel's state (a full barrel drops them and counts an overflow); a
// header waits until the barrel is not full, so the time order is never
// lost. ready is high when a new load can be taken in this cycle: no header
// is waiting on a full barrel and at most one zone is left, which leaves in
// this very cycle. A column with k non-empty zones thus holds the sparsifier
// for k cycles, and the sweep waits for it.
//
// Follows the document: zone size, 8 zones per level-2 barrel, zone word
// fields, time stamp heading the hits, loss on a full buffer. Own choices:
// one word per cycle, the increasing zone order and the header stall.
module sparsifier
  import superpix_pkg::*;
#(
  parameter int unsigned ZONES  = 8,
  parameter int unsigned ZONE_H = PAT_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      load_ts,
  input  logic [ZONES*ZONE_H-1:0]   slice,
  input  logic [X_W-1:0]            x,
  input  logic [TS_W-1:0]           ts,
  output logic                      ready,
  output logic                      b2_wr,
  output logic [HIT_W:0]            b2_data,   // {is_ts, payload}
  input  logic                      b2_full
);

  logic [ZONES-1:0]             pend;       // zones still to be written
  logic [ZONES-1:0][ZONE_H-1:0] pat;
  logic [X_W-1:0]               x_r;
  logic                         hdr_pend;
  logic [TS_W-1:0]              ts_r;

  logic [$clog2(ZONES)-1:0] zsel;
  logic                     have_zone;
  logic                     hdr_go;
  logic [ZONES-1:0]         pend_after;
  zone_hit_t                hit_w;

  // lowest pending zone
  always_comb begin
    zsel      = '0;
    have_zone = 1'b0;
    for (int z = ZONES - 1; z >= 0; z--) begin
      if (pend[z]) begin
        zsel      = $clog2(ZONES)'(z);
        have_zone = 1'b1;
      end
    end
  end

  assign hdr_go     = hdr_pend && !b2_full;
  assign pend_after = have_zone ? (pend & ~(ZONES'(1) << zsel)) : pend;
  assign ready      = hdr_pend ? hdr_go : (pend_after == '0);

  assign hit_w.x       = x_r;
  assign hit_w.zone    = ZY_W'(zsel);
  assign hit_w.pattern = PAT_W'(pat[zsel]);

  always_comb begin
    b2_wr   = 1'b0;
    b2_data = '0;
    if (hdr_pend) begin
      b2_wr   = hdr_go;
      b2_data = {1'b1, HIT_W'(ts_r)};
    end else if (have_zone) begin
      b2_wr   = 1'b1;
      b2_data = {1'b0, hit_w};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= '0;
      pat      <= '0;
      x_r      <= '0;
      hdr_pend <= 1'b0;
      ts_r     <= '0;
    end else if (load && ready) begin
      if (load_ts) begin
        hdr_pend <= 1'b1;
        ts_r     <= ts;
        pend     <= '0;
      end else begin
        hdr_pend <= 1'b0;
        x_r      <= x;
        pat      <= slice;
        for (int z = 0; z < ZONES; z++) pend[z] <= |slice[z*ZONE_H +: ZONE_H];
      end
    end else begin
      if (hdr_go) hdr_pend <= 1'b0;
      pend <= pend_after;
    end
  end

endmodule
