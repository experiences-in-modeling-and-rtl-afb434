// tb_address_unit: test of the address unit. In kernel mode (state 0)
// addresses pass unchanged and never fault. In user mode (state 1) the address
// is relocated by BASE and an access exception is raised when the logical
// address is not below LIMIT. Edge cases: address = LIMIT - 1 and = LIMIT.
module tb_address_unit;
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
  logic [31:0] a, base, limit, o;
  logic        st, ex;
  address_unit dut (.addr_in(a), .base(base), .limit(limit), .state(st), .addr_out(o), .acc_excep(ex));

  initial begin
    base = 32'h1000; limit = 32'h2000;
    st = 1'b1; a = 32'h1FFC; #1;
    check("inside limit", 64'(ex), 64'd0); check("relocated", 64'(o), 64'h2FFC);
    a = 32'h2000; #1; check("at limit", 64'(ex), 64'd1);
    st = 1'b0; #1; check("kernel no fault", 64'(ex), 64'd0); check("kernel no relocation", 64'(o), 64'h2000);
    for (int k = 0; k < 3000; k++) begin
      a = $urandom; base = $urandom; limit = $urandom; st = 1'($urandom);
      if (k % 3 == 0) a = limit - 32'(k % 2);
      #1;
      check("addr", 64'(o), 64'(st ? a + base : a));
      check("excep", 64'(ex), 64'(st && !(a < limit)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
