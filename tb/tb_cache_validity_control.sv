// tb_cache_validity_control: test of the valid bits of the cache.
// All lines are invalid after reset; random set pulses at random lines and
// rare invalidate-all pulses against a model bit vector, checking the bit
// of a random line after every clock.
module tb_cache_validity_control;
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

  logic [5:0]  index;
  logic        set, inval, valid;
  logic [63:0] model;
  cache_validity_control #(.LINES(64)) dut (.clk(clk), .rst(rst), .index(index), .set(set), .invalidate(inval), .valid(valid));

  initial begin
    index = '0; set = 1'b0; inval = 1'b0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 64; i++) begin
      index = 6'(i); #1 check("invalid after reset", 32'(valid), 0);
    end
    for (int k = 0; k < 3000; k++) begin
      index = 6'($urandom); set = ($urandom % 2) == 0; inval = ($urandom % 97) == 0;
      #1 check($sformatf("valid line %0d", index), 32'(valid), 32'(model[index]));
      @(posedge clk);
      if (inval) model = '0;
      else if (set) model[index] = 1'b1;
      #1 check($sformatf("after update line %0d", index), 32'(valid), 32'(model[index]));
      set = 1'b0; inval = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
