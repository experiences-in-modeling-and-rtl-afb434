// cache_memory_bank: data store of the cache, one 32-bit word per line.
//
// RDATA is the word of the line selected by INDEX (combinational read).
// WE writes the byte lanes of WDATA enabled by BSEL at the clock edge:
// all four lanes when a line is filled, the stored lanes on a write hit.
// Reset clears the bank. The bank, addressed by the cache address from the
// directory with byte selects, is the document's. The line is one word, so
// the word-in-line address bits of the original are absent; the line
// length and the number of lines are this design's choice.
module cache_memory_bank #(
  parameter int LINES = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(LINES)-1:0] index,
  input  logic                     we,
  input  logic [3:0]               bsel,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] bank [LINES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) bank[i] <= '0;
    end else if (we) begin
      for (int b = 0; b < 4; b++)
        if (bsel[b]) bank[index][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  assign rdata = bank[index];
endmodule
