// tb_cmp: test of the gate-level magnitude comparator.
// A 32-bit and a 5-bit instance are driven with corner values (equal, one
// apart, extremes) and random pairs, some of them sharing the upper bits;
// eq and lw are compared with the unsigned relations a == b and a < b.
module tb_cmp;
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
  logic [31:0] a, b;
  logic        eq, lw;
  logic [4:0]  a5, b5;
  logic        eq5, lw5;
  cmp #(.W(32)) dut   (.opa(a),  .opb(b),  .eq(eq),  .lw(lw));
  cmp #(.W(5))  dut5  (.opa(a5), .opb(b5), .eq(eq5), .lw(lw5));

  task automatic try32(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1;
    check("eq", 64'(eq), 64'(x == y));
    check("lw", 64'(lw), 64'(x < y));
  endtask

  initial begin
    try32(0, 0);
    try32(0, 1);
    try32(1, 0);
    try32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    try32(32'h7FFF_FFFF, 32'h8000_0000);
    try32(32'h8000_0000, 32'h7FFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = (i % 2 == 0) ? $urandom : (x ^ (32'd1 << ($urandom % 32)));
      try32(x, y);
    end
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      check("eq5", 64'(eq5), 64'(a5 == b5));
      check("lw5", 64'(lw5), 64'(a5 < b5));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
