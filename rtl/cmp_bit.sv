// cmp_bit: one-bit comparator cell of the gate-level comparator.
//
// Five gates, named as in the document's one-bit comparator: NOT_n_1 inverts
// OPAn, AND_n_1 forms (not OPAn) and OPBn, i.e. "A is lower than B in this
// bit"; XOR_n and NOT_n_2 form "the bits are equal". AND_n_2 lets the
// "lower" of this bit count only when all more significant bits are equal.
// The cells are chained from the most significant bit: eq_in/lw_in come from
// the cell above, eq_out/lw_out go to the cell below. The chaining OR gate
// that accumulates lw is this design's choice; the document does not show
// how cells are joined. Combinational.
module cmp_bit
  import alfa_pkg::*;
(
  input  logic opa,      // OPAn
  input  logic opb,      // OPBn
  input  logic eq_in,    // all more significant bits equal
  input  logic lw_in,    // A already lower in a more significant bit
  output logic eq_out,
  output logic lw_out
);
  logic not_a, a_lt_b, diff, same, lw_here;

  logic_gate #(.KIND(GATE_NOT)) not_n_1 (.op1(opa),    .op2(1'b0),   .res(not_a));
  logic_gate #(.KIND(GATE_AND)) and_n_1 (.op1(not_a),  .op2(opb),    .res(a_lt_b));
  logic_gate #(.KIND(GATE_XOR)) xor_n   (.op1(opa),    .op2(opb),    .res(diff));
  logic_gate #(.KIND(GATE_NOT)) not_n_2 (.op1(diff),   .op2(1'b0),   .res(same));
  logic_gate #(.KIND(GATE_AND)) and_n_2 (.op1(a_lt_b), .op2(eq_in),  .res(lw_here));
  logic_gate #(.KIND(GATE_AND)) and_eq  (.op1(same),   .op2(eq_in),  .res(eq_out));
  logic_gate #(.KIND(GATE_OR))  or_lw   (.op1(lw_in),  .op2(lw_here), .res(lw_out));
endmodule
