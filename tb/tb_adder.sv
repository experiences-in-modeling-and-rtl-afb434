// tb_adder: test of the 32-bit adder used for PC-relative targets and for
// address relocation. Corner values and random operands; the sum and the carry
// out are compared with a 33-bit sum.
module tb_adder;
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
  logic [31:0] a, b, r;
  logic        c;
  adder dut (.opa(a), .opb(b), .res(r), .carry(c));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [32:0] s;
      a = (i == 0) ? 32'hFFFF_FFFF : $urandom;
      b = (i == 0) ? 32'd1 : $urandom;
      #1;
      s = {1'b0, a} + {1'b0, b};
      check("sum", 64'(r), 64'(s[31:0]));
      check("carry", 64'(c), 64'(s[32]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
