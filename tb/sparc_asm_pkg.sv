// sparc_asm_pkg: instruction encoders used by the processor testbenches.
//
// Each function returns the 32-bit SPARC V8 encoding of one instruction, so
// a testbench can write a program into memory as a list of calls. Register
// numbers are plain 0..31 (g0-g7 = 0-7, o0-o7 = 8-15, l0-l7 = 16-23,
// i0-i7 = 24-31). Branch and call displacements are in words.
package sparc_asm_pkg;
  function automatic logic [31:0] f3r(input logic [1:0] op, input logic [5:0] op3,
                                      input int rd, input int rs1, input int rs2);
    return {op, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] f3i(input logic [1:0] op, input logic [5:0] op3,
                                      input int rd, input int rs1, input int simm);
    return {op, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  // arithmetic group (op = 2)
  function automatic logic [31:0] ari(input logic [5:0] op3, input int rd, input int rs1, input int simm);
    return f3i(2'b10, op3, rd, rs1, simm);
  endfunction
  function automatic logic [31:0] arr(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return f3r(2'b10, op3, rd, rs1, rs2);
  endfunction
  // memory group (op = 3)
  function automatic logic [31:0] mem_i(input logic [5:0] op3, input int rd, input int rs1, input int simm);
    return f3i(2'b11, op3, rd, rs1, simm);
  endfunction
  function automatic logic [31:0] sethi(input int rd, input logic [31:0] value);
    return {2'b00, 5'(rd), 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] set_lo(input int rd, input logic [31:0] value);
    return ari(6'h02, rd, rd, int'({22'd0, value[9:0]}));   // or rd, %lo(value), rd
  endfunction
  function automatic logic [31:0] bicc(input logic [3:0] cond, input logic a, input int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(input int disp);
    return {2'b01, 30'(disp)};
  endfunction
  function automatic logic [31:0] ticc(input logic [3:0] cond, input int rs1, input int num);
    return {2'b10, 1'b0, cond, 6'h3A, 5'(rs1), 1'b1, 6'd0, 7'(num)};
  endfunction
  localparam logic [31:0] NOP   = 32'h0100_0000;   // sethi 0, %g0
  localparam logic [31:0] UNIMP = 32'h0000_0000;
endpackage
