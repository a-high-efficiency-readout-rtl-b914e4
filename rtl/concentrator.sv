// concentrator: time-sorted merge of N barrel streams into one.
//
// Each input stream is a sequence of time-stamp headers, each followed by
// the hits of that BCO period. The concentrator keeps that order on its
// output while interleaving the inputs:
//   * while any input has a hit at its head, it passes one such hit per
//     cycle (round robin among those inputs), prefixing the input's number
//     as a new address field;
//   * an input whose head is a header waits. When every input shows a
//     header, all hits of the current period have passed; the concentrator
//     writes one header with the oldest of the shown time stamps and pops
//     the inputs that show that time stamp. An input that skipped a period
//     (its scan buffer was full) shows a newer header and simply waits.
//
// Interface: in_valid/in_word are the heads of the input barrels (tag bit
// on top, 1 = header, time stamp in the low TS_W payload bits), in_pop pops
// them. out_wr/out_word write the output barrel. Headers are only written
// when out_full is low. With DROP_HITS=1 hits are written regardless, so a
// full output barrel loses them (level-1 barrel inside a submatrix); with
// DROP_HITS=0 hits also wait (the common output stage, which must not drop).
// One word per cycle; no internal pipeline.
//
// Follows the document: concentrator after the level-2 barrels, common
// output stage over the submatrices, barrel address fields, time stamp
// heading its hits. Own choices: the header merge rule, round robin.
module concentrator
  import superpix_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned W         = HIT_W,   // input payload width
  parameter bit          DROP_HITS = 1'b1,
  localparam int unsigned AW       = $clog2(N),
  localparam int unsigned OW       = W + AW   // output payload width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  logic [N-1:0][W:0]    in_word,
  output logic [N-1:0]         in_pop,
  output logic                 out_wr,
  output logic [OW:0]          out_word,
  input  logic                 out_full
);

  logic [AW-1:0]        rr;          // round-robin start
  logic [N-1:0]         hit_req;
  logic [N-1:0]         is_hdr;
  logic [AW-1:0]        pick;
  logic                 have_hit;
  logic [TS_W-1:0]      oldest;

  for (genvar i = 0; i < N; i++) begin : g_in
    assign is_hdr[i]  = in_word[i][W];
    assign hit_req[i] = in_valid[i] && !in_word[i][W];
  end

  always_comb begin
    pick     = '0;
    have_hit = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr) + k) % N;
      if (hit_req[idx]) begin
        pick     = AW'(idx);
        have_hit = 1'b1;
      end
    end
  end

  always_comb begin
    oldest = in_word[0][TS_W-1:0];
    for (int i = 1; i < N; i++) begin
      if (ts_older(in_word[i][TS_W-1:0], oldest)) oldest = in_word[i][TS_W-1:0];
    end
  end

  always_comb begin
    in_pop   = '0;
    out_wr   = 1'b0;
    out_word = '0;
    if (have_hit) begin
      if (DROP_HITS || !out_full) begin
        in_pop[pick] = 1'b1;
        out_wr       = 1'b1;
        out_word     = {1'b0, pick, in_word[pick][W-1:0]};
      end
    end else if ((&in_valid) && (&is_hdr) && !out_full) begin
      out_wr   = 1'b1;
      out_word = {1'b1, OW'(oldest)};
      for (int i = 0; i < N; i++) in_pop[i] = (in_word[i][TS_W-1:0] == oldest);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rr <= '0;
    else if (have_hit && in_pop[pick]) rr <= AW'((int'(pick) + 1) % N);
  end

endmodule
