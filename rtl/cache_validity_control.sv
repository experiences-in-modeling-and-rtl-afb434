// cache_validity_control: valid bit of every cache line.
//
// VALID is the bit of the line selected by INDEX. SET marks that line valid
// at the clock edge (after a fill). Reset, and INVALIDATE, clear every line,
// so the cache starts empty. Read combinational, update synchronous. The
// Valid/Invalid part beside the directory, sharing its select and
// read/write control, is the document's; the invalidate-all input is this
// design's choice.
module cache_validity_control #(
  parameter int LINES = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(LINES)-1:0] index,
  input  logic                     set,
  input  logic                     invalidate,
  output logic                     valid
);
  logic [LINES-1:0] v;

  always_ff @(posedge clk) begin
    if (rst || invalidate) v <= '0;
    else if (set)          v[index] <= 1'b1;
  end

  assign valid = v[index];
endmodule
