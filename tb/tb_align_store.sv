// tb_align_store: test of the store aligner (big-endian). The byte or
// half-word is replicated on the data lines and the byte selects mark the lanes
// written: offset 0 is bits 31..24 (BSEL3). Includes the stb / sth cases of the
// document's store example (0x12345678 stored at offsets 0, 1, 2, 3).
module tb_align_store;
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
  logic [3:0]  bs;
  align_store dut (.op(w), .size(size), .kind(kind), .res(r), .bsel(bs));

  initial begin
    w = 32'h1234_5678;
    size = SZ_BYTE; kind = 2'd0; #1; check("stb data", 64'(r), 64'h7878_7878); check("stb at 0", 64'(bs), 64'b1000);
    kind = 2'd1; #1; check("stb at 1", 64'(bs), 64'b0100);
    kind = 2'd2; #1; check("stb at 2", 64'(bs), 64'b0010);
    kind = 2'd3; #1; check("stb at 3", 64'(bs), 64'b0001);
    size = SZ_HALF; kind = 2'd0; #1; check("sth data", 64'(r), 64'h5678_5678); check("sth at 0", 64'(bs), 64'b1100);
    kind = 2'd2; #1; check("sth at 2", 64'(bs), 64'b0011);
    size = SZ_WORD; kind = 2'd0; #1; check("st data", 64'(r), 64'h1234_5678); check("st", 64'(bs), 64'b1111);
    for (int k = 0; k < 300; k++) begin
      w = $urandom; kind = 2'($urandom);
      size = SZ_BYTE; #1;
      check("rand byte", 64'(r), 64'({4{w[7:0]}}));
      check("rand byte lane", 64'(bs), 64'(4'b1000 >> kind));
      size = SZ_HALF; #1;
      check("rand half", 64'(r), 64'({2{w[15:0]}}));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
