// tb_shifter: test of the barrel shifter: sll, srl and sra with every shift
// count 0..31 (only the low five bits of the count are used), random data.
module tb_shifter;
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
  logic [1:0]  f;
  shifter dut (.opa(a), .opb(b), .fcod(f), .res(r));

  initial begin
    for (int k = 0; k < 100; k++) begin
      a = (k == 0) ? 32'h8000_0001 : $urandom;
      for (int s = 0; s < 32; s++) begin
        b = {27'($urandom), 5'(s)};
        f = SH_SLL; #1; check("sll", 64'(r), 64'(a << s));
        f = SH_SRL; #1; check("srl", 64'(r), 64'(a >> s));
        f = SH_SRA; #1; check("sra", 64'(r), 64'($signed(a) >>> s));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
