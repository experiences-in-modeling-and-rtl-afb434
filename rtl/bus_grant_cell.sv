// bus_grant_cell: one link of the bus-grant daisy chain.
//
// A master may take the bus when its BGRANT_IN is 1, it requests (REQ) and the
// bus is not BUSY; it then owns the bus (OWNED, which drives BUSY) and passes
// BGRANT_OUT = 0 down the chain. It keeps the bus while it requests and
// BGRANT_IN stays 1, and always until its current cycle (AS) has ended; then
// it releases BUSY. BGRANT_OUT = BGRANT_IN while the master neither requests
// nor owns the bus. OWNED is registered. The chain rule is the document's
// bus; the register timing is this design's.
module bus_grant_cell (
  input  logic clk,
  input  logic rst,
  input  logic bgrant_in,
  input  logic req,
  input  logic as,         // this master's cycle in progress
  input  logic busy,       // bus owned by some master
  output logic bgrant_out,
  output logic owned
);
  always_ff @(posedge clk) begin
    if (rst)                                  owned <= 1'b0;
    else if (!owned)                          owned <= bgrant_in && req && !busy;
    else if (!as && (!req || !bgrant_in))     owned <= 1'b0;
  end

  assign bgrant_out = bgrant_in && !req && !owned;
endmodule
