// tb_chip_selector: test of the chip selector. With the reset masks (window
// 0..0x7FFFFFFF) CS follows AS for addresses in the window and stays low
// above it. The MAX and MIN masks are then written and random addresses are
// checked against MIN <= address <= MAX and AS, including both bounds.
module tb_chip_selector;
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
  logic [31:0] addr, md;
  logic        as, mwe, msel, cs;
  chip_selector dut (.clk(clk), .rst(rst), .addr(addr), .as(as), .mask_we(mwe), .mask_sel(msel),
                     .mask_d(md), .cs(cs));

  initial begin
    logic [31:0] mx, mn;
    addr = 0; as = 1'b0; mwe = 1'b0; msel = 1'b0; md = 0;
    @(posedge clk); #1; rst = 1'b0;
    as = 1'b1; addr = 32'h0000_0040; #1; check("reset window low", 32'(cs), 1);
    addr = 32'h7FFF_FFFF; #1; check("reset window top", 32'(cs), 1);
    addr = 32'h8000_0000; #1; check("above reset window", 32'(cs), 0);
    as = 1'b0; addr = 32'h40; #1; check("no AS", 32'(cs), 0);
    for (int k = 0; k < 20; k++) begin
      mx = $urandom; mn = $urandom;
      if (mn > mx) begin logic [31:0] t; t = mx; mx = mn; mn = t; end
      mwe = 1'b1; msel = 1'b1; md = mx; @(posedge clk); #1;
      msel = 1'b0; md = mn; @(posedge clk); #1;
      mwe = 1'b0; md = $urandom;
      for (int j = 0; j < 200; j++) begin
        as = 1'($urandom);
        case (j % 5)
          0: addr = mx;
          1: addr = mn;
          2: addr = mx + 1;
          3: addr = mn - 1;
          default: addr = $urandom;
        endcase
        #1;
        check("cs", 32'(cs), 32'(as && addr >= mn && addr <= mx));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
