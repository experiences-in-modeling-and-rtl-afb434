// tb_cache_directory: test of the cache tag store.
// After reset every tag is zero. Random writes of random tags at random
// lines, against a model array; after every clock the hit output is checked
// for a random tag at a random line (half of them the stored tag).
module tb_cache_directory;
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
  logic [23:0] tag_in;
  logic        we, hit;
  logic [23:0] model [64];
  cache_directory #(.LINES(64), .TAG_W(24)) dut (.clk(clk), .rst(rst), .index(index), .tag_in(tag_in), .we(we), .hit(hit));

  initial begin
    index = '0; tag_in = '0; we = 1'b0;
    for (int i = 0; i < 64; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 64; i++) begin
      index = 6'(i); tag_in = 24'd0; #1 check("reset tag is zero", 32'(hit), 1);
      tag_in = 24'd1; #1 check("reset tag differs from 1", 32'(hit), 0);
    end
    for (int k = 0; k < 3000; k++) begin
      index = 6'($urandom); we = ($urandom % 3) == 0;
      tag_in = ($urandom % 2) ? model[index] : 24'($urandom);
      #1 check($sformatf("hit line %0d", index), 32'(hit), 32'(tag_in == model[index]));
      @(posedge clk);
      if (we) model[index] = tag_in;
      #1 check($sformatf("after write line %0d", index), 32'(hit), 32'(tag_in == model[index]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
