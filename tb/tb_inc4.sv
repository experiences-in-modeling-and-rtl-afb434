// tb_inc4: test of the +4 incrementer of the PC / nPC path, including the
// wrap at the top of the address space.
module tb_inc4;
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
  logic [31:0] a, r;
  inc4 dut (.op(a), .res(r));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = (i == 0) ? 32'hFFFF_FFFC : $urandom;
      #1;
      check("inc4", 64'(r), 64'(a + 32'd4));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
