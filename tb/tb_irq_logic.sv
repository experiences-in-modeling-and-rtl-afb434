// tb_irq_logic: test of the interrupt level encoder. For random request
// lines and every PIL value, the highest requesting level above PIL must be
// reported with TT = 0x10 + level; level 15 is checked against PIL 15.
module tb_irq_logic;
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
  logic [15:1] irq;
  logic [3:0]  pil;
  logic        tf;
  logic [7:0]  tt;
  irq_logic dut (.irq(irq), .pil(pil), .tf(tf), .tt(tt));

  initial begin
    irq = 15'h4000; pil = 4'd15; #1; check("level 15 under PIL 15", 64'(tf), 64'd0);
    pil = 4'd14; #1; check("level 15 over PIL 14", 64'(tt), 64'h1F);
    for (int k = 0; k < 500; k++) begin
      irq = 15'($urandom) & 15'($urandom);
      for (int p = 0; p < 16; p++) begin
        int lvl;
        pil = 4'(p);
        lvl = 0;
        for (int i = 1; i <= 15; i++) if (irq[i] && i > p) lvl = i;
        #1;
        check("tf", 64'(tf), 64'(lvl != 0));
        if (lvl != 0) check("tt", 64'(tt), 64'(8'h10 + lvl));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
