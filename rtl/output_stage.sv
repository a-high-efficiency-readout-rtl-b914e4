// output_stage: the common output stage that puts the four submatrix
// streams on the chip data bus.
//
// It merges the level-1 barrels of the four submatrices with the same
// time-sorted rule as a submatrix concentrator (see concentrator.sv), adds
// the 2-bit level-1 barrel address, and holds the result in an output
// register with a valid/ready handshake. Nothing is dropped here: when the
// bus does not take a word, the merge stops and the level-1 barrels fill.
//
// Bus word (22 bits) for a hit: [21:20] level-1 address (submatrix),
// [19:18] level-2 address (quarter of the column), [17:11] column,
// [10:8] zone, [7:0] zone pattern. For a header, bus_is_ts is high and
// [7:0] holds the time stamp. The absolute pixel of pattern bit b is
// column = 80*L1 + column field, row = 64*L2 + 8*zone + b.
// hit_word/ts_word pulse for each word the bus takes (for the rate counters).
//
// Follows the document: common output stage, 22-bit hit word made of those
// fields, time stamp heading its hits. Own choices: the separate
// bus_is_ts line (the document counts 22 bits without a word-type bit), the
// handshake and the merge rule.
module output_stage
  import superpix_pkg::*;
#(
  parameter int unsigned NSUB = 1 << L1A_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NSUB-1:0]          in_valid,
  input  logic [NSUB-1:0][B1_W:0]  in_word,
  output logic [NSUB-1:0]          in_pop,
  output logic                     bus_valid,
  output logic                     bus_is_ts,
  output logic [OUT_W-1:0]         bus_data,
  input  logic                     bus_ready,
  output logic                     hit_word,
  output logic                     ts_word
);

  logic             m_wr;
  logic [OUT_W:0]   m_word;
  logic             hold;

  assign hold = bus_valid && !bus_ready;

  concentrator #(.N(NSUB), .W(B1_W), .DROP_HITS(1'b0)) u_merge (
    .clk, .rst_n,
    .in_valid, .in_word, .in_pop,
    .out_wr (m_wr), .out_word (m_word), .out_full (hold)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_is_ts <= 1'b0;
      bus_data  <= '0;
    end else if (m_wr) begin
      bus_valid <= 1'b1;
      bus_is_ts <= m_word[OUT_W];
      bus_data  <= m_word[OUT_W-1:0];
    end else if (bus_ready) begin
      bus_valid <= 1'b0;
    end
  end

  assign hit_word = bus_valid && bus_ready && !bus_is_ts;
  assign ts_word  = bus_valid && bus_ready &&  bus_is_ts;

endmodule
