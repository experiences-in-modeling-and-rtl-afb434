// tb_signext: test of the sign extender with the two widths used by the
// integer unit, 13 bits (simm13) and 24 bits (disp22 already scaled by 4).
module tb_signext;
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
  logic [12:0] a13;
  logic [23:0] a24;
  logic [31:0] r13, r24;
  signext #(.IN_W(13)) dut13 (.op(a13), .res(r13));
  signext #(.IN_W(24)) dut24 (.op(a24), .res(r24));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a13 = (i == 0) ? 13'h1000 : (i == 1) ? 13'h0FFF : 13'($urandom);
      a24 = 24'($urandom);
      #1;
      check("simm13", 64'(r13), 64'(32'($signed(a13))));
      check("disp24", 64'(r24), 64'(32'($signed(a24))));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
