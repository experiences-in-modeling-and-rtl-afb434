// alu: 32-bit integer arithmetic-logic unit.
//
// FCOD selects add, sub, addx, subx (add/subtract with the carry in), and,
// or, xor, andn, orn, xnor (the n forms invert OPB). The flags are those of the
// processor's condition codes: NEGAT = bit 31 of RES, ZERO = RES is 0, OVFLW =
// two's-complement overflow of add/sub, CARRY = carry out of an add or borrow
// of a subtract; logic operations clear CARRY and OVFLW. Combinational.
// The operation list is the document's; the FCOD values are the low four bits
// of the SPARC op3 field, as the control unit copies them straight from the
// instruction. Unused FCOD values add.
module alu
  import alfa_pkg::*;
(
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [3:0]  fcod,
  input  logic        cin,
  output logic [31:0] res,
  output logic        carry,
  output logic        zero,
  output logic        negat,
  output logic        ovflw
);
  logic [32:0] sum;
  logic        is_sub, is_arith;

  always_comb begin
    sum      = '0;
    is_sub   = 1'b0;
    is_arith = 1'b1;
    unique case (fcod)
      ALU_ADD:  sum = {1'b0, opa} + {1'b0, opb};
      ALU_ADDX: sum = {1'b0, opa} + {1'b0, opb} + 33'(cin);
      ALU_SUB:  begin sum = {1'b0, opa} - {1'b0, opb};            is_sub = 1'b1; end
      ALU_SUBX: begin sum = {1'b0, opa} - {1'b0, opb} - 33'(cin); is_sub = 1'b1; end
      ALU_AND:  begin sum = {1'b0, opa & opb};    is_arith = 1'b0; end
      ALU_OR:   begin sum = {1'b0, opa | opb};    is_arith = 1'b0; end
      ALU_XOR:  begin sum = {1'b0, opa ^ opb};    is_arith = 1'b0; end
      ALU_ANDN: begin sum = {1'b0, opa & ~opb};   is_arith = 1'b0; end
      ALU_ORN:  begin sum = {1'b0, opa | ~opb};   is_arith = 1'b0; end
      ALU_XNOR: begin sum = {1'b0, ~(opa ^ opb)}; is_arith = 1'b0; end
      default:  sum = {1'b0, opa} + {1'b0, opb};
    endcase
  end

  assign res   = sum[31:0];
  assign negat = res[31];
  assign zero  = (res == 32'd0);
  assign carry = is_arith & sum[32];
  assign ovflw = is_arith & (is_sub ? (opa[31] != opb[31]) && (res[31] != opa[31])
                                    : (opa[31] == opb[31]) && (res[31] != opa[31]));
endmodule
