// tb_incdec: test of the incrementer/decrementer of the current window
// pointer. The first cases repeat the document's INC/DEC example (value 20
// incremented gives 21; the operand 5 of its input list incremented gives 6).
// Then all 32 values are incremented and decremented, with the 5-bit wrap.
module tb_incdec;
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
  logic [4:0] a, r;
  logic       f;
  incdec #(.W(5)) dut (.op(a), .fcod(f), .res(r));

  initial begin
    a = 5'd20; f = 1'b1; #1; check("20 incremented", 64'(r), 64'd21);
    a = 5'd5;  f = 1'b1; #1; check("5 incremented", 64'(r), 64'd6);
    for (int i = 0; i < 32; i++) begin
      a = 5'(i);
      f = 1'b1; #1; check("inc", 64'(r), 64'((i + 1) & 31));
      f = 1'b0; #1; check("dec", 64'(r), 64'((i + 31) & 31));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
