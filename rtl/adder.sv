// adder: 32-bit adder with carry out.
//
// RES = OPA + OPB modulo 2^32; CARRY is the bit that leaves the top.
// Used by the address unit to relocate user addresses by the base register.
// Combinational. Ports and function follow the document's ADDER.
module adder (
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic [31:0] res,
  output logic        carry
);
  assign {carry, res} = {1'b0, opa} + {1'b0, opb};
endmodule
