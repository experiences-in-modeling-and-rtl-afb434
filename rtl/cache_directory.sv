// cache_directory: tag store of the cache.
//
// One tag per cache line, addressed by the index bits of the address. The
// stored tag of the addressed line is compared with the tag of the current
// address; HIT says they are equal (whether the line holds data at all is
// the validity control's job). WE stores TAG_IN at INDEX on the clock edge,
// when a line is filled from the bus. Reset clears every tag.
// Read is combinational, write synchronous. The directory, with a
// comparator producing Hit/Miss from the stored entry and the address, is
// the document's. The original directory is drawn as a table looked up
// with the upper address bits whose output is compared with the index;
// here it is the usual equivalent for a direct-mapped cache, a tag table
// looked up with the index. Its size (LINES) is this design's choice.
module cache_directory #(
  parameter int LINES = 64,
  parameter int TAG_W = 24
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(LINES)-1:0] index,
  input  logic [TAG_W-1:0]         tag_in,
  input  logic                     we,
  output logic                     hit
);
  logic [TAG_W-1:0] tags [LINES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) tags[i] <= '0;
    end else if (we) begin
      tags[index] <= tag_in;
    end
  end

  assign hit = (tags[index] == tag_in);
endmodule
