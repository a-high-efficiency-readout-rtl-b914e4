// time_counter: the BCO time counter of one submatrix.
//
// Counts BCO periods modulo 2**TS_W (256). bco_tick is a one-cycle strobe,
// synchronous to the readout clock, marking the BCO clock edge. ts is the
// number of the current BCO period, so at a strobe it is the number of the
// period that is closing and that the fired macro pixels belong to. The
// counter advances on the clock edge that samples bco_tick. run=0 holds
// the count.
//
// Follows the document: 8-bit modulo-256 BCO counter as time stamp. Own
// choice: the BCO edge is delivered as a strobe in the readout clock domain.
module time_counter #(
  parameter int unsigned TS_W = superpix_pkg::TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            bco_tick,
  output logic [TS_W-1:0] ts
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ts <= '0;
    else if (run && bco_tick)  ts <= ts + 1'b1;
  end

endmodule
