// regblock: the windowed register file (512 x 32 bits).
//
// Two combinational read ports (ASEL -> AOUT, BSEL -> BOUT) and one write
// port (CSEL, CIN, written on the rising clock edge when CEN is high). The
// 9-bit selects are physical register numbers produced by cwp_logic from the
// window pointer. RESET clears all registers (as for the globals; the
// document does not say this for the window file). Size and ports are the
// document's REGBLOCK.
module regblock #(
  parameter int N = 512
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
    end else if (cen) begin
      r[csel] <= cin;
    end
  end

  assign aout = r[asel];
  assign bout = r[bsel];
endmodule
