// address_unit: relocation and bounds check of user-mode addresses.
//
// In user mode (STATE = 1) the address sent to the bus is Address in + BASE,
// computed by the adder, and the comparator checks Address in against LIMIT:
// ACC_EXCEP is raised when STATE is 1 and Address in is not lower than LIMIT.
// In kernel mode (STATE = 0) the address passes unchanged and no exception is
// raised. Combinational. Adder, comparator, multiplexer and the State line
// are the document's address unit; treating LIMIT as the size of the user
// area (compared before relocation) is this design's reading of it.
// Lint: the comparator's EQ output is left unused; the limit test needs only
// 'address lower than LIMIT'.
module address_unit (
  input  logic [31:0] addr_in,
  input  logic [31:0] base,
  input  logic [31:0] limit,
  input  logic        state,     // 1 = user mode
  output logic [31:0] addr_out,
  output logic        acc_excep
);
  logic [31:0] reloc;
  logic        unused_carry, eq, lw;

  adder u_adder (.opa(addr_in), .opb(base), .res(reloc), .carry(unused_carry));
  cmp #(.W(32)) u_cmp (.opa(addr_in), .opb(limit), .eq(eq), .lw(lw));

  onehot_mux #(.N(2), .W(32)) u_mux (
    .d  ({reloc, addr_in}),
    .sel({state, ~state}),
    .y  (addr_out)
  );

  assign acc_excep = state & ~lw;
endmodule
