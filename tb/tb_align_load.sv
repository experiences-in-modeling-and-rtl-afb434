// tb_align_load: test of the load aligner (big-endian). For every size and
// byte offset the selected byte / half-word of the memory word is moved to the
// low end and zero- or sign-extended; words pass unchanged.
module tb_align_load;
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
  logic [31:0] w, r;
  logic [1:0]  size, kind;
  logic        sign;
  align_load dut (.op(w), .size(size), .kind(kind), .sign(sign), .res(r));

  initial begin
    for (int k = 0; k < 300; k++) begin
      w = (k == 0) ? 32'h8081_7F80 : $urandom;
      for (int o = 0; o < 4; o++)
        for (int sg = 0; sg < 2; sg++) begin
          logic [7:0] by;
          logic [15:0] hw;
          kind = 2'(o); sign = sg[0];
          by = w[31 - 8 * o -: 8];
          hw = o[1] ? w[15:0] : w[31:16];
          size = SZ_BYTE; #1;
          check("byte", 64'(r), sg ? 64'(32'($signed(by))) : 64'(by));
          if (o % 2 == 0) begin
            size = SZ_HALF; #1;
            check("half", 64'(r), sg ? 64'(32'($signed(hw))) : 64'(hw));
          end
          if (o == 0) begin
            size = SZ_WORD; #1;
            check("word", 64'(r), 64'(w));
          end
        end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
