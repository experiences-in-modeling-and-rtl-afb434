// tb_regglob: test of the global register file (8 x 32 bits, two read ports,
// one write port). First the document's RegGlob example: write 0xFFFFFFFF to
// register 4 and 0x55555555 to register 2, read them on ports A and B, then
// reset and read zero. Then random reads and writes against a model; register
// 0 always reads zero.
module tb_regglob;
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
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  logic [2:0] asel, bsel, csel;
  logic        cen;
  logic [31:0] cin, aout, bout;
  logic [31:0] model [8];
  regglob #(.N(8)) dut (.clk(clk), .reset(rst), .asel(asel), .bsel(bsel), .csel(csel),
                 .cen(cen), .cin(cin), .aout(aout), .bout(bout));

  initial begin
    asel = 0; bsel = 0; csel = 0; cen = 1'b0; cin = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    @(posedge clk); #1; rst = 1'b0;
    cen = 1'b1; csel = 3'd4; cin = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    csel = 3'd2; cin = 32'h5555_5555;
    @(posedge clk); #1;
    cen = 1'b0; asel = 3'd4; bsel = 3'd2;
    #1;
    check("A = register 4", aout, 32'hFFFF_FFFF);
    check("B = register 2", bout, 32'h5555_5555);
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    check("register 4 after reset", aout, 32'h0);
    check("register 2 after reset", bout, 32'h0);
    cen = 1'b1; csel = 3'd0; cin = 32'h1234_5678;
    @(posedge clk); #1;
    asel = 3'd0; cen = 1'b0; #1;
    check("register 0 reads zero", aout, 32'h0);
    for (int k = 0; k < 3000; k++) begin
      asel = 3'($urandom); bsel = 3'($urandom); csel = 3'($urandom);
      cen = 1'($urandom); cin = $urandom;
      #1;
      check("rand a", aout, model[asel]);
      check("rand b", bout, model[bsel]);
      @(posedge clk);
      if (cen && csel != 0) model[csel] = cin;
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
