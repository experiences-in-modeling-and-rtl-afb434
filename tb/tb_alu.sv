// tb_alu: test of the integer ALU against a reference model written here.
// Every function code (add, and, or, xor, sub, andn, orn, xnor, addx, subx)
// with corner operands (0, 1, 0x7FFFFFFF, 0x80000000, 0xFFFFFFFF) and random
// ones, both carry-in values. Checks result, N, Z, V and C (borrow on subtract;
// V and C zero for logic operations).
module tb_alu;
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
  logic [3:0]  f;
  logic        cin, c, z, n, v;
  alu dut (.opa(a), .opb(b), .fcod(f), .cin(cin), .res(r), .carry(c), .zero(z), .negat(n), .ovflw(v));

  localparam logic [3:0] CODES [10] = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h8, 4'hC};
  localparam logic [31:0] CORNER [5] = '{32'd0, 32'd1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};

  task automatic one();
    logic [32:0] s;
    logic        ar, sb, ev;
    logic [31:0] er;
    ar = 1'b1; sb = 1'b0;
    case (f)
      4'h0: s = {1'b0, a} + {1'b0, b};
      4'h8: s = {1'b0, a} + {1'b0, b} + 33'(cin);
      4'h4: begin s = {1'b0, a} - {1'b0, b}; sb = 1'b1; end
      4'hC: begin s = {1'b0, a} - {1'b0, b} - 33'(cin); sb = 1'b1; end
      4'h1: begin s = {1'b0, a & b}; ar = 1'b0; end
      4'h2: begin s = {1'b0, a | b}; ar = 1'b0; end
      4'h3: begin s = {1'b0, a ^ b}; ar = 1'b0; end
      4'h5: begin s = {1'b0, a & ~b}; ar = 1'b0; end
      4'h6: begin s = {1'b0, a | ~b}; ar = 1'b0; end
      default: begin s = {1'b0, ~(a ^ b)}; ar = 1'b0; end
    endcase
    er = s[31:0];
    // overflow from the signed interpretation
    if (!ar) ev = 1'b0;
    else if (!sb) ev = (a[31] == b[31]) && (er[31] != a[31]);
    else ev = (a[31] != b[31]) && (er[31] != a[31]);
    #1;
    check($sformatf("res f=%h", f), 64'(r), 64'(er));
    check($sformatf("N f=%h", f), 64'(n), 64'(er[31]));
    check($sformatf("Z f=%h", f), 64'(z), 64'(er == 0));
    check($sformatf("V f=%h", f), 64'(v), 64'(ev));
    check($sformatf("C f=%h", f), 64'(c), 64'(ar & s[32]));
  endtask

  initial begin
    // known values
    f = 4'h0; a = 32'd2; b = 32'd3; cin = 1'b0; #1; check("2+3", 64'(r), 64'd5);
    f = 4'h4; a = 32'd2; b = 32'd3; #1; check("2-3", 64'(r), 64'hFFFF_FFFF); check("2-3 borrow", 64'(c), 64'd1);
    f = 4'h0; a = 32'h7FFF_FFFF; b = 32'd1; #1; check("max+1 V", 64'(v), 64'd1);
    for (int i = 0; i < 10; i++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          for (int k = 0; k < 2; k++) begin
            f = CODES[i]; a = CORNER[x]; b = CORNER[y]; cin = k[0];
            one();
          end
    for (int i = 0; i < 5000; i++) begin
      f = CODES[$urandom % 10]; a = $urandom; b = $urandom; cin = 1'($urandom);
      one();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
