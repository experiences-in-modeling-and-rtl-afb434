// tb_alu_unit: test of the ALU block (ALU, MUL/DIV and shifter behind the
// result MUX4 and the condition-code MUX). For random operands the enable
// lines select each unit in turn and C out / CC / Overflow are compared with
// reference results; a multiply and a divide are started and awaited.
module tb_alu_unit;
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
    #10000000;
    $display("FAIL watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0] ain, bin, yin, cout, yout;
  logic [3:0]  fcod;
  logic        cin, en_alu, en_md, en_shf, start, ovf, md_done, dz;
  icc_t        cc;
  alu_unit dut (.clk(clk), .rst(rst), .ain(ain), .bin(bin), .cin(cin), .fcod(fcod),
                .en_alu(en_alu), .en_md(en_md), .en_shf(en_shf), .yin(yin), .start(start),
                .cout(cout), .yout(yout), .cc(cc), .overflow(ovf), .md_done(md_done), .div_zero(dz));

  initial begin
    ain = 0; bin = 0; yin = 0; fcod = 0; cin = 0; en_alu = 0; en_md = 0; en_shf = 0; start = 0;
    @(posedge clk); #1; rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      logic [32:0] s;
      ain = $urandom; bin = (k % 7 == 3) ? 32'd0 : $urandom; cin = 1'b0;
      // add
      en_alu = 1; en_md = 0; en_shf = 0; fcod = 4'h0; #1;
      s = {1'b0, ain} + {1'b0, bin};
      check("add", cout, s[31:0]);
      check("add C", 32'(cc.c), 32'(s[32]));
      check("add Z", 32'(cc.z), 32'(s[31:0] == 0));
      check("overflow line", 32'(ovf), 32'((ain[31] == bin[31]) && (s[31] != ain[31])));
      // sub
      fcod = 4'h4; #1;
      check("sub", cout, ain - bin);
      check("sub N", 32'(cc.n), 32'(((ain - bin) >> 31) & 1));
      // srl
      en_alu = 0; en_shf = 1; fcod = 4'h6; #1;
      check("srl", cout, ain >> bin[4:0]);
      check("shift C", 32'(cc.c), 0);
      // umul
      en_shf = 0; en_md = 1; fcod = 4'hA; start = 1;
      @(posedge clk); #1; start = 0;
      while (!md_done) begin @(posedge clk); #1; end
      begin
        logic [63:0] p;
        p = 64'(ain) * 64'(bin);
        check("umul", cout, p[31:0]);
        check("umul Y", yout, p[63:32]);
        check("umul N", 32'(cc.n), 32'(p[31]));
        check("umul Z", 32'(cc.z), 32'(p[31:0] == 0));
        check("umul C", 32'(cc.c), 0);
      end
      // udiv with Y = 0 every 10th iteration
      if (k % 10 == 0) begin
        yin = 0; fcod = 4'hE; bin = bin >> 12; start = 1;
        @(posedge clk); #1; start = 0;
        while (!md_done) begin @(posedge clk); #1; end
        check("udiv", cout, (bin == 0) ? 32'd0 : ain / bin);
        check("div by zero flag", 32'(dz), 32'(bin == 0));
      end
      en_md = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
