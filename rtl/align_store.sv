// align_store: aligns data written by a store instruction.
//
// Places the low byte (SIZE 0), low halfword (SIZE 1) or the word (SIZE 2)
// of OP in every lane it may occupy and sets BSEL, one bit per byte lane
// (BSEL[i] enables data bits 8i+7..8i), for the lanes addressed by KIND, the
// byte offset of the address. Big-endian: offset 0 is lane 3 (bits 31..24).
// Combinational. The block's role (ALIGNS) and the four BSEL lines are the
// document's; the lane numbering is this design's choice.
module align_store
  import alfa_pkg::*;
(
  input  logic [31:0] op,
  input  logic [1:0]  size,
  input  logic [1:0]  kind,
  output logic [31:0] res,
  output logic [3:0]  bsel
);
  always_comb begin
    unique case (size)
      SZ_BYTE: begin
        res  = {4{op[7:0]}};
        bsel = 4'b1000 >> kind;
      end
      SZ_HALF: begin
        res  = {2{op[15:0]}};
        bsel = kind[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        res  = op;
        bsel = 4'b1111;
      end
    endcase
  end
endmodule
