// cmp: W-bit unsigned magnitude comparator built from one-bit cells.
//
// Outputs EQ when OPA equals OPB and LW when OPA is lower than OPB (unsigned).
// W cmp_bit cells are chained from the most significant bit downwards; the
// top cell starts with "equal so far" and "not lower". The comparator is the
// document's (inputs OPA/OPB, outputs EQ/LW, built from one-bit comparators of
// Boolean gates); the exact chaining is this design's. Combinational, with a
// ripple path through all W cells.
module cmp #(
  parameter int W = 32
) (
  input  logic [W-1:0] opa,
  input  logic [W-1:0] opb,
  output logic         eq,
  output logic         lw
);
  logic [W:0] eq_c, lw_c;  // index W is the top of the chain

  assign eq_c[W] = 1'b1;
  assign lw_c[W] = 1'b0;

  for (genvar i = W - 1; i >= 0; i--) begin : g_bit
    cmp_bit u_bit (
      .opa   (opa[i]),
      .opb   (opb[i]),
      .eq_in (eq_c[i+1]),
      .lw_in (lw_c[i+1]),
      .eq_out(eq_c[i]),
      .lw_out(lw_c[i])
    );
  end

  assign eq = eq_c[0];
  assign lw = lw_c[0];
endmodule
