// shifter: 32-bit barrel shifter.
//
// Shifts OPA by OPB[4:0] places: FCOD 01 logical left, 10 logical right,
// 11 arithmetic right (sign fill); 00 passes OPA. Combinational. The two FCOD
// lines are those drawn into the shifter of the ALU block; the code values are
// the low bits of the SPARC op3 of sll/srl/sra (this design's choice).
// Lint: only bits 4..0 of OPB are used (shift counts are 0..31).
module shifter
  import alfa_pkg::*;
(
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [1:0]  fcod,
  output logic [31:0] res
);
  logic [4:0] n;
  assign n = opb[4:0];

  always_comb begin
    unique case (fcod)
      SH_SLL:  res = opa << n;
      SH_SRL:  res = opa >> n;
      SH_SRA:  res = 32'($signed(opa) >>> n);
      default: res = opa;
    endcase
  end
endmodule
