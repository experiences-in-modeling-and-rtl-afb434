// tb_onehot_mux: test of the one-hot multiplexer (the MUX4 of the ALU block).
// Each single select line passes its input; no select gives zero. Random data,
// N = 4 and N = 2 instances.
module tb_onehot_mux;
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
  logic [3:0][31:0] d;
  logic [3:0]       s;
  logic [31:0]      y;
  logic [1:0][31:0] d2;
  logic [1:0]       s2;
  logic [31:0]      y2;
  onehot_mux #(.N(4), .W(32)) dut  (.d(d),  .sel(s),  .y(y));
  onehot_mux #(.N(2), .W(32)) dut2 (.d(d2), .sel(s2), .y(y2));

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 4; i++) d[i] = $urandom;
      for (int i = 0; i < 2; i++) d2[i] = $urandom;
      s = 4'd0; s2 = 2'd0; #1;
      check("none selected", 64'(y), 64'd0);
      check("none selected 2", 64'(y2), 64'd0);
      for (int i = 0; i < 4; i++) begin
        s = 4'(1 << i); #1;
        check("mux4", 64'(y), 64'(d[i]));
      end
      for (int i = 0; i < 2; i++) begin
        s2 = 2'(1 << i); #1;
        check("mux2", 64'(y2), 64'(d2[i]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
