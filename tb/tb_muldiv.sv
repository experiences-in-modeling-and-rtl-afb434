// tb_muldiv: test of the multiply / divide unit against a reference model.
// umul and smul give the 64-bit product (high half in Y) one clock after start.
// udiv and sdiv divide Y:opa by opb and finish 66 clocks after start with the
// quotient truncated toward zero, saturated with V = 1 on overflow, and the
// remainder (sign of the dividend) in Y. Division by zero raises div_zero.
// Includes the division of the document's example, 274543375 / 13908050 = 19.
module tb_muldiv;
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
  logic        start, done, z, n, v, dz;
  logic [31:0] a, b, y, res, yo;
  logic [1:0]  f;
  muldiv dut (.clk(clk), .rst(rst), .start(start), .opa(a), .opb(b), .yin(y), .fcod(f),
              .res(res), .yout(yo), .zero(z), .negat(n), .ovflw(v), .done(done), .div_zero(dz));

  task automatic run(output int lat);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 1;
    while (!done && lat < 200) begin @(posedge clk); #1; lat++; end
  endtask

  task automatic one(input logic [1:0] fc, input logic [31:0] av, input logic [31:0] bv, input logic [31:0] yv);
    int lat;
    logic [31:0] eres, ey;
    logic        ev, edz;
    f = fc; a = av; b = bv; y = yv;
    ev = 1'b0; edz = 1'b0; ey = 0;
    if (!fc[1]) begin
      logic [63:0] p;
      p = fc[0] ? 64'($signed(av) * $signed(bv)) : 64'(av) * 64'(bv);
      eres = p[31:0]; ey = p[63:32];
    end else if (bv == 0) begin
      edz = 1'b1; eres = 0; ey = yv;
    end else if (!fc[0]) begin
      logic [63:0] q, r;
      q = {yv, av} / 64'(bv); r = {yv, av} % 64'(bv);
      if (q[63:32] != 0) begin eres = 32'hFFFF_FFFF; ev = 1'b1; end else eres = q[31:0];
      ey = r[31:0];
    end else begin
      longint sd, sv, q, r;
      sd = longint'($signed({yv, av})); sv = longint'($signed(bv));
      if (sd == 64'sh8000_0000_0000_0000 && sv == -1) begin q = 64'sh7FFF_FFFF_FFFF_FFFF; r = 0; end
      else begin q = sd / sv; r = sd % sv; end
      if (q > 64'sh7FFF_FFFF) begin eres = 32'h7FFF_FFFF; ev = 1'b1; end
      else if (q < -64'sh8000_0000) begin eres = 32'h8000_0000; ev = 1'b1; end
      else eres = 32'(q);
      ey = 32'(r);
    end
    run(lat);
    check($sformatf("latency f=%0d", fc), 32'(lat), (fc[1] && bv != 0) ? 66 : 1);
    check($sformatf("div_zero f=%0d", fc), 32'(dz), 32'(edz));
    if (!edz) begin
      check($sformatf("result f=%0d %h %h %h", fc, yv, av, bv), res, eres);
      check($sformatf("Y f=%0d", fc), yo, ey);
      check($sformatf("V f=%0d", fc), 32'(v), 32'(ev));
      check("Z", 32'(z), 32'(eres == 0));
      check("N", 32'(n), 32'(eres[31]));
    end
  endtask

  initial begin
    start = 1'b0; a = 0; b = 0; y = 0; f = 0;
    @(posedge clk); #1; rst = 1'b0;
    one(MD_UDIV, 32'd274543375, 32'd13908050, 32'd0);
    check("document example quotient", res, 32'd19);
    one(MD_UMUL, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 0);
    one(MD_SMUL, 32'hFFFF_FFFF, 32'h0000_0002, 0);
    one(MD_SDIV, 32'hFFFF_FFF9, 32'd2, 32'hFFFF_FFFF);      // -7 / 2 = -3
    one(MD_SDIV, 32'h0000_0000, 32'hFFFF_FFFF, 32'h8000_0000); // overflow negative-large / -1
    one(MD_UDIV, 32'd5, 32'd0, 32'd0);
    one(MD_UDIV, 32'd0, 32'd3, 32'd3);                        // quotient > 32 bits
    for (int k = 0; k < 400; k++) begin
      logic [1:0]  fc;
      logic [31:0] av, bv, yv;
      fc = 2'($urandom); av = $urandom; bv = $urandom;
      if (k % 5 == 0) bv = bv >> ($urandom % 32);
      case ($urandom % 4)
        0: yv = $urandom;
        1: yv = 0;
        default: yv = (fc[0] && av[31]) ? 32'hFFFF_FFFF : 32'h0;
      endcase
      one(fc, av, bv, yv);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
