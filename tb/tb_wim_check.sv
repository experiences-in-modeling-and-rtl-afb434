// tb_wim_check: test of the window-invalid lookup: the output is the WIM bit
// selected by the CWP value, for random WIM words and every CWP.
module tb_wim_check;
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
  logic [4:0]  cwp;
  logic [31:0] wim;
  logic        r;
  wim_check dut (.cwp(cwp), .wim(wim), .res(r));

  initial begin
    for (int k = 0; k < 50; k++) begin
      wim = (k == 0) ? 32'h0000_0001 : $urandom;
      for (int i = 0; i < 32; i++) begin
        cwp = 5'(i);
        #1;
        check("wim bit", 64'(r), 64'(wim[i]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
