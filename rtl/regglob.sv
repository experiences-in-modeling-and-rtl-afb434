// regglob: the eight global registers.
//
// Two read ports (ASEL -> AOUT, BSEL -> BOUT, combinational) and one write
// port (CSEL, CIN, written on the rising clock edge when CEN is high). RESET
// clears every register. Register 0 always reads 0 and ignores writes, as
// %g0 of SPARC (this design's choice; the document does not single it out).
// The register count, ports and reset behaviour are the document's RegGlob.
module regglob #(
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [$clog2(N)-1:0] asel,
  input  logic [$clog2(N)-1:0] bsel,
  input  logic [$clog2(N)-1:0] csel,
  input  logic                 cen,
  input  logic [31:0]          cin,
  output logic [31:0]          aout,
  output logic [31:0]          bout
);
  logic [31:0] r [N];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (cen && csel != '0) begin
      r[csel] <= cin;
    end
  end

  assign aout = (asel == '0) ? 32'd0 : r[asel];
  assign bout = (bsel == '0) ? 32'd0 : r[bsel];
endmodule
