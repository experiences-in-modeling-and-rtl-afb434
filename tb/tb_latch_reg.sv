// tb_latch_reg: test of the clocked register with enable and clear.
// Reset loads RST_VAL; with ein the input is taken at the clock edge; without it
// the value holds; clear returns it to RST_VAL. Two instances with different widths and
// reset values; random stimulus against a model register.
module tb_latch_reg;
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
  logic [31:0] d, q;
  logic        ein, clr;
  logic [4:0]  d5, q5;
  latch_reg #(.W(32), .RST_VAL(32'hDEAD_BEEF)) dut  (.clk(clk), .rst(rst), .in(d),  .ein(ein), .clear(clr), .out(q));
  latch_reg #(.W(5),  .RST_VAL(5'd17))         dut5 (.clk(clk), .rst(rst), .in(d5), .ein(ein), .clear(clr), .out(q5));

  initial begin
    logic [31:0] m;
    logic [4:0]  m5;
    d = '0; d5 = '0; ein = 1'b0; clr = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check("reset value", q, 32'hDEAD_BEEF);
    check("reset value 5", 32'(q5), 32'd17);
    rst = 1'b0;
    m = q; m5 = q5;
    for (int k = 0; k < 2000; k++) begin
      d = $urandom; d5 = 5'($urandom); ein = 1'($urandom); clr = ($urandom % 8) == 0;
      @(posedge clk);
      if (clr) begin m = 32'hDEAD_BEEF; m5 = 5'd17; end
      else if (ein) begin m = d; m5 = d5; end
      #1;
      check("q", q, m);
      check("q5", 32'(q5), 32'(m5));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
