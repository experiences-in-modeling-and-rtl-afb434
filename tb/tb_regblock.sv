// tb_regblock: test of the windowed register file (512 x 32 bits, two read
// ports, one write port). After reset every register reads zero; random writes
// and reads are compared with a model, including reads of the register being
// written in the same cycle (the old value is read until the edge).
module tb_regblock;
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
  logic [8:0] asel, bsel, csel;
  logic        cen;
  logic [31:0] cin, aout, bout;
  logic [31:0] model [512];
  regblock #(.N(512)) dut (.clk(clk), .reset(rst), .asel(asel), .bsel(bsel), .csel(csel),
                 .cen(cen), .cin(cin), .aout(aout), .bout(bout));

  initial begin
    asel = 0; bsel = 0; csel = 0; cen = 1'b0; cin = 0;
    for (int i = 0; i < 512; i++) model[i] = 0;
    @(posedge clk); #1; rst = 1'b0;
    for (int i = 0; i < 512; i += 37) begin
      asel = 9'(i); #1;
      check("zero after reset", aout, 32'h0);
    end
    // register 0 of the window file is an ordinary register
    cen = 1'b1; csel = 9'd0; cin = 32'hCAFE_0000;
    @(posedge clk); #1; model[0] = 32'hCAFE_0000;
    cen = 1'b0; asel = 9'd0; #1;
    check("window register 0 is writable", aout, 32'hCAFE_0000);
    for (int k = 0; k < 6000; k++) begin
      asel = 9'($urandom); bsel = 9'($urandom); csel = 9'($urandom);
      if (k % 4 == 0) asel = csel;
      cen = 1'($urandom); cin = $urandom;
      #1;
      check("rand a", aout, model[asel]);
      check("rand b", bout, model[bsel]);
      @(posedge clk);
      if (cen) model[csel] = cin;
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
