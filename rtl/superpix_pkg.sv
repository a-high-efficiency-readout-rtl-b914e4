// superpix_pkg: constants and word formats shared by the pixel readout.
//
// The readout moves two kinds of words through its FIFOs ("barrels"): zone
// hits and time-stamp (TS) headers. Both travel in the same queue with a
// one-bit tag, so the time order set by the sweep is kept all the way to the
// chip data bus. Field widths follow the zone-sparsified output format:
// 7-bit column address (80 columns), 3-bit zone address (8 zones per
// level-2 barrel), 8-bit zone pattern, 2-bit level-2 and level-1 barrel
// addresses and an 8-bit time stamp (BCO counter modulo 256). The tag bit is
// this design's own addition; the document gives only the field widths.
package superpix_pkg;

  localparam int unsigned TS_W   = 8;   // time stamp, modulo-256 BCO count
  localparam int unsigned X_W    = 7;   // pixel column inside a submatrix
  localparam int unsigned ZY_W   = 3;   // zone address inside a level-2 slice
  localparam int unsigned PAT_W  = 8;   // zone pattern (1x8 pixels)
  localparam int unsigned L2A_W  = 2;   // level-2 barrel address
  localparam int unsigned L1A_W  = 2;   // level-1 barrel (submatrix) address

  // Payload widths at each level (tag bit not included).
  localparam int unsigned HIT_W  = X_W + ZY_W + PAT_W;   // 18, into level-2 barrels
  localparam int unsigned B1_W   = L2A_W + HIT_W;        // 20, into level-1 barrels
  localparam int unsigned OUT_W  = L1A_W + B1_W;         // 22, chip data bus

  // A zone hit as written by a sparsifier.
  typedef struct packed {
    logic [X_W-1:0]   x;
    logic [ZY_W-1:0]  zone;
    logic [PAT_W-1:0] pattern;
  } zone_hit_t;

  // True when time stamp a is strictly older than b, modulo 2**TS_W. Valid
  // while the two are less than half the counter range apart.
  function automatic logic ts_older(input logic [TS_W-1:0] a, input logic [TS_W-1:0] b);
    logic [TS_W-1:0] d;
    d = b - a;
    return (d != '0) && !d[TS_W-1];
  endfunction

endpackage
