// tb_cwp_logic: test of the register-number mapping. For every CWP and every
// register number 0..31: registers 0..7 go to the global file, the others to
// window register (16 * CWP + r - 8) mod 512. Also checks the overlap: the
// outs of window w (r8..r15) are the ins (r24..r31) of window w - 1.
module tb_cwp_logic;
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
  logic [4:0] cwp, sel;
  logic [2:0] gsel;
  logic [8:0] rsel;
  logic       rg;
  cwp_logic dut (.cwp(cwp), .sel(sel), .gsel(gsel), .rsel(rsel), .rg(rg));

  initial begin
    for (int w = 0; w < 32; w++) begin
      for (int r = 0; r < 32; r++) begin
        cwp = 5'(w); sel = 5'(r);
        #1;
        check("rg", 64'(rg), 64'(r >= 8));
        if (r < 8) check("gsel", 64'(gsel), 64'(r));
        else       check("rsel", 64'(rsel), 64'((16 * w + r - 8) % 512));
      end
    end
    begin
      logic [8:0] outs_w;
      cwp = 5'd3; sel = 5'd9; #1; outs_w = rsel;
      cwp = 5'd2; sel = 5'd25; #1;
      check("window overlap", 64'(rsel), 64'(outs_w));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
