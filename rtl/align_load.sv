// align_load: aligns data read by a load instruction.
//
// The memory returns the whole 32-bit word holding the addressed data. KIND is
// the byte offset of the address within the word (address bits 1..0) and SIZE
// the access size (0 byte, 1 halfword, 2 word). Byte order is big-endian:
// offset 0 is bits 31..24. The selected byte or halfword is moved to the
// low end and zero-extended, or sign-extended when SIGN is 1. Combinational.
// The block's role is the document's (ALIGNL); the meaning of KIND and the
// SIZE codes are this design's reading.
module align_load
  import alfa_pkg::*;
(
  input  logic [31:0] op,
  input  logic [1:0]  size,
  input  logic [1:0]  kind,
  input  logic        sign,
  output logic [31:0] res
);
  logic [7:0]  b;
  logic [15:0] h;

  always_comb begin
    unique case (kind)
      2'd0: b = op[31:24];
      2'd1: b = op[23:16];
      2'd2: b = op[15:8];
      default: b = op[7:0];
    endcase
    h = kind[1] ? op[15:0] : op[31:16];
    unique case (size)
      SZ_BYTE: res = {{24{sign & b[7]}}, b};
      SZ_HALF: res = {{16{sign & h[15]}}, h};
      default: res = op;
    endcase
  end
endmodule
