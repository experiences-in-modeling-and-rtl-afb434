// latch_reg: processor register with input enable and clear.
//
// Loads IN on the rising clock edge when EIN is high; CLEAR (synchronous, and
// the reset rst) sets it to RST_VAL. OUT is the stored value. The document
// models this register as a d-latch with EIN and CLEAR lines; it is written
// here as an edge-triggered register so the whole processor is single-clock
// synchronous, and CLEAR takes priority over EIN (both this design's choice).
module latch_reg #(
  parameter int          W       = 32,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  input  logic         ein,
  input  logic         clear,
  output logic [W-1:0] out
);
  always_ff @(posedge clk) begin
    if (rst || clear) out <= RST_VAL;
    else if (ein)     out <= in;
  end
endmodule
