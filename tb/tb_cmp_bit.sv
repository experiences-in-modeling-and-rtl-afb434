// tb_cmp_bit: exhaustive test of one comparator cell.
// The cell receives the result of the more significant bits (eq_in, lw_in) and
// extends it by one bit: eq_out = eq_in and a == b; lw_out = lw_in or
// (eq_in and a < b). All 16 input combinations are checked.
module tb_cmp_bit;
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
  logic a, b, eq_in, lw_in, eq_out, lw_out;
  cmp_bit dut (.opa(a), .opb(b), .eq_in(eq_in), .lw_in(lw_in), .eq_out(eq_out), .lw_out(lw_out));

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, eq_in, lw_in} = 4'(i);
      #1;
      check("eq_out", 64'(eq_out), 64'(eq_in && (a == b)));
      check("lw_out", 64'(lw_out), 64'(lw_in || (eq_in && !a && b)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
