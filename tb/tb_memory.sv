// tb_memory: test of the main memory (32 KiB, two cycles of latency).
// A small bus master in the testbench writes words, half-words and bytes with
// byte selects and reads them back; DTACK must arrive LATENCY + 1 clocks after
// the strobe and last one clock; an address at or above MEM_BYTES answers ERR
// instead of DTACK; dropping AS early abandons the cycle without a DTACK.
module tb_memory;
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
  logic        as, rd_wr, dtack, err;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  bsel;
  logic [31:0] model [8192];
  memory dut (.clk(clk), .rst(rst), .as(as), .rd_wr(rd_wr), .addr(addr), .bsel(bsel),
              .wdata(wdata), .rdata(rdata), .dtack(dtack), .err(err));

  // one bus cycle; returns the read data and the number of clocks to DTACK/ERR
  task automatic cycle(input logic rd, input logic [31:0] a, input logic [3:0] bs, input logic [31:0] wd,
                       output logic [31:0] rdv, output int lat, output logic e);
    as = 1'b1; rd_wr = rd; addr = a; bsel = bs; wdata = wd;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!dtack && !err && lat < 50);
    rdv = rdata; e = err;
    check("acknowledge is one clock long", 32'(dtack || err), 1);
    as = 1'b0;
    @(posedge clk); #1;
    check("acknowledge dropped", 32'(dtack || err), 0);
  endtask

  initial begin
    logic [31:0] rv;
    int          lat;
    logic        e;
    as = 1'b0; rd_wr = 1'b1; addr = 0; bsel = 0; wdata = 0;
    @(posedge clk); #1; rst = 1'b0;
    // fill the words used below
    for (int i = 0; i < 64; i++) begin
      model[i * 128] = $urandom;
      cycle(1'b0, 32'(i * 512), 4'b1111, model[i * 128], rv, lat, e);
      check("write latency", 32'(lat), 3);
    end
    for (int k = 0; k < 400; k++) begin
      int w;
      logic [3:0] bs;
      logic [31:0] d;
      w = ($urandom % 64) * 128;
      if ($urandom % 2) begin
        bs = 4'($urandom); d = $urandom;
        cycle(1'b0, 32'(w * 4), bs, d, rv, lat, e);
        for (int b = 0; b < 4; b++) if (bs[b]) model[w][8 * b +: 8] = d[8 * b +: 8];
      end else begin
        cycle(1'b1, 32'(w * 4 + ($urandom % 4)), 4'b1111, 0, rv, lat, e);
        check("read data", rv, model[w]);
        check("read latency", 32'(lat), 3);
        check("no error", 32'(e), 0);
      end
    end
    cycle(1'b1, 32'd32768, 4'b1111, 0, rv, lat, e);
    check("error beyond the memory", 32'(e), 1);
    cycle(1'b0, 32'hFFFF_FFFC, 4'b1111, 0, rv, lat, e);
    check("error on write beyond the memory", 32'(e), 1);
    // abandoned cycle: AS for one clock only
    as = 1'b1; rd_wr = 1'b0; addr = 0; bsel = 4'b1111; wdata = 32'h0BAD_0BAD;
    @(posedge clk); #1; as = 1'b0;
    repeat (4) begin @(posedge clk); #1; check("no acknowledge after abandon", 32'(dtack || err), 0); end
    cycle(1'b1, 32'd0, 4'b1111, 0, rv, lat, e);
    check("abandoned write left the word", rv, model[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
