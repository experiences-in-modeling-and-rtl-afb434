// cwp_logic: maps an instruction register number to a physical register.
//
// Registers 0..7 are the eight globals: RG = 0 and GSEL = SEL[2:0].
// Registers 8..31 are the outs, locals and ins of the current window: RG = 1
// and RSEL = (16*CWP + SEL - 8) mod 2^9. Each window owns 16 registers of the
// 512-entry window file, and its ins (24..31) land on the outs of window CWP+1,
// which is how the windows overlap: after a save (CWP - 1) the caller's outs
// are the callee's ins. The split between globals and windows is the
// document's; the overlap formula follows SPARC. Combinational.
module cwp_logic (
  input  logic [4:0] cwp,
  input  logic [4:0] sel,
  output logic [2:0] gsel,
  output logic [8:0] rsel,
  output logic       rg     // 1: window register, 0: global register
);
  assign rg   = sel[4] | sel[3];
  assign gsel = sel[2:0];
  assign rsel = {cwp, 4'b0000} + 9'(sel) - 9'd8;
endmodule
