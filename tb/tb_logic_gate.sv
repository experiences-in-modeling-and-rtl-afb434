// tb_logic_gate: exhaustive test of the four gate kinds (AND, OR, NOT, XOR).
// All four operand combinations are applied to one instance of each kind and
// the output is compared with the truth table. NOT ignores its second input.
module tb_logic_gate;
  import alfa_pkg::*;
  int checks = 0;
  int failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic a, b;
  logic y_and, y_or, y_not, y_xor;
  logic_gate #(.KIND(GATE_AND)) u_and (.op1(a), .op2(b), .res(y_and));
  logic_gate #(.KIND(GATE_OR))  u_or  (.op1(a), .op2(b), .res(y_or));
  logic_gate #(.KIND(GATE_NOT)) u_not (.op1(a), .op2(b), .res(y_not));
  logic_gate #(.KIND(GATE_XOR)) u_xor (.op1(a), .op2(b), .res(y_xor));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check("and", 64'(y_and), 64'(a & b));
      check("or",  64'(y_or),  64'(a | b));
      check("not", 64'(y_not), 64'(!a));
      check("xor", 64'(y_xor), 64'(a ^ b));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
