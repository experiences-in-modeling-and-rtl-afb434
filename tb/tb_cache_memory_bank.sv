// tb_cache_memory_bank: test of the data store of the cache.
// Reset clears the bank. Random word and byte-lane writes at random lines
// against a model array; the word of a random line is read after each clock.
module tb_cache_memory_bank;
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
  logic        we;
  logic [3:0]  bsel;
  logic [31:0] wdata, rdata;
  logic [31:0] model [64];
  cache_memory_bank #(.LINES(64)) dut (.clk(clk), .rst(rst), .index(index), .we(we), .bsel(bsel), .wdata(wdata), .rdata(rdata));

  initial begin
    index = '0; we = 1'b0; bsel = '0; wdata = '0;
    for (int i = 0; i < 64; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 64; i++) begin
      index = 6'(i); #1 check("zero after reset", rdata, 0);
    end
    for (int k = 0; k < 3000; k++) begin
      index = 6'($urandom); we = ($urandom % 2) == 0; bsel = 4'($urandom); wdata = $urandom;
      #1 check($sformatf("read line %0d", index), rdata, model[index]);
      @(posedge clk);
      if (we) for (int b = 0; b < 4; b++) if (bsel[b]) model[index][8*b +: 8] = wdata[8*b +: 8];
      #1 check($sformatf("after write line %0d", index), rdata, model[index]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
