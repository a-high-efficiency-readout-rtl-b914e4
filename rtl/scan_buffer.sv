// scan_buffer: queue of macro-pixel maps waiting to be swept.
//
// At every BCO edge the sweep logic pushes one entry: the map of the macro
// pixels (MPs) that fired in the BCO period just closed (one bit per MP) and
// that period's time stamp. The sweep logic takes the oldest entry from the
// head (first-word fall-through, pop removes it). Several maps can wait, so
// the matrix keeps taking hits while older periods are still being read.
// A push into a full buffer is refused (the sweep logic checks full and
// then keeps the fired MPs frozen until a later edge); a push and a pop in
// the same cycle on a full buffer both happen.
//
// Follows the document: a buffer of several macro-pixel maps waiting to be
// read, each belonging to one time stamp. Own choice: the depth (4 maps;
// the document gives none).
module scan_buffer #(
  parameter int unsigned NMP   = 1280,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned TS_W  = superpix_pkg::TS_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [TS_W-1:0]            push_ts,
  input  logic [NMP-1:0]             push_map,
  input  logic                       pop,
  output logic [TS_W-1:0]            head_ts,
  output logic [NMP-1:0]             head_map,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [NMP-1:0]  map_mem [DEPTH];
  logic [TS_W-1:0] ts_mem  [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic            do_push, do_pop;

  assign empty    = (count == 0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign head_ts  = ts_mem[rp];
  assign head_map = map_mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      map_mem[wp] <= push_map;
      ts_mem[wp]  <= push_ts;
    end
  end

endmodule
