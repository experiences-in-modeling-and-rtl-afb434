// cclogic: branch condition evaluation.
//
// RES is 1 when the condition COND holds for the condition codes N (negat),
// Z (zero), V (ovflw) and C (carry). COND uses the SPARC Bicc encoding:
// 0 never, 1 e, 2 le, 3 l, 4 leu, 5 cs, 6 neg, 7 vs, and 8..15 the negations
// (always, ne, g, ge, gu, cc, pos, vc). Combinational. Its role (deciding if a
// conditional branch is taken) is the document's; the encoding is SPARC's.
module cclogic (
  input  logic       carry,
  input  logic       zero,
  input  logic       negat,
  input  logic       ovflw,
  input  logic [3:0] cond,
  output logic       res
);
  logic base;
  always_comb begin
    unique case (cond[2:0])
      3'd0: base = 1'b0;
      3'd1: base = zero;
      3'd2: base = zero | (negat ^ ovflw);
      3'd3: base = negat ^ ovflw;
      3'd4: base = carry | zero;
      3'd5: base = carry;
      3'd6: base = negat;
      3'd7: base = ovflw;
      default: base = 1'b0;
    endcase
  end
  assign res = cond[3] ^ base;
endmodule
