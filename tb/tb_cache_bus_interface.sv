// tb_cache_bus_interface: test of the bus side of the cache.
// A model slave with random grant delay and random latency answers with
// DTACK or (rarely) ERR. Each started cycle must request the bus, raise AS
// only after the grant, hold address, direction, data and byte selects, drop
// AS and the request after the answer and pulse DONE once with the slave's
// data and error flag.
module tb_cache_bus_interface;
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
    #2000000;
    $display("FAIL watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        start, rd_wr, done, err_out;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  bsel;
  logic        bus_req, bus_grant, bus_as, bus_rd_wr, bus_dtack, bus_err;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0]  bus_bsel;
  cache_bus_interface dut (
    .clk(clk), .rst(rst), .start(start), .rd_wr(rd_wr), .addr(addr), .wdata(wdata), .bsel(bsel),
    .done(done), .rdata(rdata), .err_out(err_out),
    .bus_req(bus_req), .bus_grant(bus_grant), .bus_as(bus_as), .bus_rd_wr(bus_rd_wr),
    .bus_addr(bus_addr), .bus_wdata(bus_wdata), .bus_bsel(bus_bsel),
    .bus_rdata(bus_rdata), .bus_dtack(bus_dtack), .bus_err(bus_err));

  initial begin
    logic [31:0] a, w, r;
    logic        d, e;
    logic [3:0]  s;
    int          n;
    start = 1'b0; rd_wr = 1'b1; addr = '0; wdata = '0; bsel = '0;
    bus_grant = 1'b0; bus_dtack = 1'b0; bus_err = 1'b0; bus_rdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("idle: no request", 32'(bus_req), 0);
    check("idle: no strobe", 32'(bus_as), 0);
    for (int k = 0; k < 300; k++) begin
      a = $urandom; w = $urandom; d = 1'($urandom); s = 4'($urandom); r = $urandom; e = ($urandom % 8) == 0;
      start = 1'b1; rd_wr = d; addr = a; wdata = w; bsel = s;
      @(posedge clk); #1
      start = 1'b0; addr = $urandom; wdata = $urandom;   // latched, may change now
      check("request raised", 32'(bus_req), 1);
      n = $urandom % 4;
      repeat (n) begin
        check("no strobe without grant", 32'(bus_as), 0);
        @(posedge clk); #1;
      end
      bus_grant = 1'b1;
      @(posedge clk); #1
      check("strobe after grant", 32'(bus_as), 1);
      check("address held", bus_addr, a);
      check("direction held", 32'(bus_rd_wr), 32'(d));
      check("data held", bus_wdata, w);
      check("byte selects held", 32'(bus_bsel), 32'(s));
      n = $urandom % 4;
      repeat (n) begin
        check("no done before the answer", 32'(done), 0);
        @(posedge clk); #1;
        check("strobe held", 32'(bus_as), 1);
      end
      bus_rdata = r; bus_dtack = !e; bus_err = e;
      @(posedge clk); #1
      bus_dtack = 1'b0; bus_err = 1'b0; bus_rdata = '0;
      check("done pulse", 32'(done), 1);
      check("read data", rdata, r);
      check("error flag", 32'(err_out), 32'(e));
      check("strobe dropped", 32'(bus_as), 0);
      check("request dropped", 32'(bus_req), 0);
      bus_grant = 1'b0;
      @(posedge clk); #1
      check("done is one clock", 32'(done), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
