// inc4: adds 4 to a 32-bit address.
//
// Computes the next sequential instruction address from the nPC (RES = OP + 4,
// modulo 2^32). Combinational. Function as in the document's INC4.
module inc4 (
  input  logic [31:0] op,
  output logic [31:0] res
);
  assign res = op + 32'd4;
endmodule
