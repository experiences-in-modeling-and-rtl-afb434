// signext: sign extension of an IN_W-bit operand to 32 bits.
//
// Used with IN_W = 13 for the immediate operand of arithmetic and memory
// instructions and IN_W = 22 for the branch displacement. Combinational.
// The two widths are the document's; a single parameterised module is this
// design's choice.
// Synthesis sees only wiring here (copies of the sign bit), so the
// outputs have no cells of their own.
module signext #(
  parameter int IN_W = 13
) (
  input  logic [IN_W-1:0] op,
  output logic [31:0]     res
);
  assign res = {{(32 - IN_W){op[IN_W-1]}}, op};
endmodule
