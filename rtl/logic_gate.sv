// logic_gate: one Boolean gate (AND, OR, NOT or XOR) selected by a parameter.
//
// This is the gate-level building block of the digital-logic models: the
// one-bit comparator cell and the chip selector are wired from these gates.
// Ports: op1, op2 inputs, res output; NOT inverts op1 and ignores op2.
// Purely combinational. The four gate kinds are the document's; passing the
// kind as a parameter is this design's choice.
module logic_gate
  import alfa_pkg::*;
#(
  parameter gate_e KIND = GATE_AND
) (
  input  logic op1,
  input  logic op2,
  output logic res
);
  always_comb begin
    unique case (KIND)
      GATE_AND: res = op1 & op2;
      GATE_OR:  res = op1 | op2;
      GATE_NOT: res = ~op1;
      GATE_XOR: res = op1 ^ op2;
      default:  res = 1'b0;
    endcase
  end
endmodule
