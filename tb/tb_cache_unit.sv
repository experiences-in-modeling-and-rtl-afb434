// tb_cache_unit: test of the cache as a whole.
// A model processor issues random reads and writes (word and byte lanes)
// to a small set of addresses that collide in the cache lines, plus a few
// device addresses above CACHE_TOP. A model memory with random latency and
// grant delay answers the bus side. Each read must return the model memory's
// word; hits must finish without a bus cycle in two clocks; writes must reach
// memory; device reads must never hit; a bus error must reach the processor
// and not fill the line. Hits and misses must both occur.
module tb_cache_unit;
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

  logic        cpu_req, cpu_grant, cpu_as, cpu_rd_wr, cpu_dtack, cpu_err;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0]  cpu_bsel;
  logic        bus_req, bus_grant, bus_as, bus_rd_wr, bus_dtack, bus_err;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0]  bus_bsel;
  logic        hit, miss;
  cache_unit #(.LINES(8), .CACHE_TOP(32'h7FFF_FFFF)) dut (
    .clk(clk), .rst(rst),
    .cpu_req(cpu_req), .cpu_grant(cpu_grant), .cpu_as(cpu_as), .cpu_rd_wr(cpu_rd_wr),
    .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata), .cpu_bsel(cpu_bsel),
    .cpu_rdata(cpu_rdata), .cpu_dtack(cpu_dtack), .cpu_err(cpu_err),
    .bus_req(bus_req), .bus_grant(bus_grant), .bus_as(bus_as), .bus_rd_wr(bus_rd_wr),
    .bus_addr(bus_addr), .bus_wdata(bus_wdata), .bus_bsel(bus_bsel),
    .bus_rdata(bus_rdata), .bus_dtack(bus_dtack), .bus_err(bus_err), .hit(hit), .miss(miss));

  // model memory: 64 words, address bits [7:2]; device words above 0x8000_0000
  logic [31:0] mem [64];
  logic [31:0] dev_val;
  int          bus_cycles = 0, n_hit = 0, n_miss = 0;
  logic        err_next;
  always @(posedge clk) begin
    if (hit) n_hit++;
    if (miss) n_miss++;
  end
  initial begin : slave
    bus_grant = 1'b0; bus_dtack = 1'b0; bus_err = 1'b0; bus_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && bus_req) begin
        repeat ($urandom % 3) @(posedge clk);
        bus_grant <= 1'b1;
        while (!bus_as) @(posedge clk);
        bus_cycles++;
        repeat ($urandom % 4) @(posedge clk);
        if (err_next) bus_err <= 1'b1;
        else begin
          bus_dtack <= 1'b1;
          if (bus_addr[31]) begin
            bus_rdata <= dev_val;
          end else if (bus_rd_wr) begin
            bus_rdata <= mem[bus_addr[7:2]];
          end else begin
            for (int b = 0; b < 4; b++)
              if (bus_bsel[b]) mem[bus_addr[7:2]][8*b +: 8] <= bus_wdata[8*b +: 8];
          end
        end
        @(posedge clk);
        bus_dtack <= 1'b0; bus_err <= 1'b0; bus_rdata <= '0;
        while (bus_as) @(posedge clk);
        bus_grant <= 1'b0;
      end
    end
  end

  task automatic access(input logic rw, input logic [31:0] a, input logic [31:0] w, input logic [3:0] s,
                        output logic [31:0] r, output logic e, output int clocks, output int cycles);
    int c0;
    c0 = bus_cycles;
    cpu_req = 1'b1;
    #1 check("grant at once", 32'(cpu_grant), 1);
    cpu_as = 1'b1; cpu_rd_wr = rw; cpu_addr = a; cpu_wdata = w; cpu_bsel = s;
    clocks = 0;
    do begin
      @(posedge clk); #1 clocks++;
    end while (!cpu_dtack && !cpu_err && clocks < 100);
    r = cpu_rdata; e = cpu_err;
    @(posedge clk); #1
    cpu_as = 1'b0; cpu_req = 1'b0; cpu_addr = '0; cpu_wdata = '0; cpu_bsel = '0; cpu_rd_wr = 1'b1;
    cycles = bus_cycles - c0;
  endtask

  initial begin
    logic [31:0] a, w, r, exp;
    logic [3:0]  s;
    logic        e, rw;
    int          clocks, cycles;
    cpu_req = 1'b0; cpu_as = 1'b0; cpu_rd_wr = 1'b1; cpu_addr = '0; cpu_wdata = '0; cpu_bsel = '0;
    err_next = 1'b0; dev_val = '0;
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // first read misses, second hits
    exp = mem[5];
    access(1'b1, 32'h14, 0, 4'hF, r, e, clocks, cycles);
    check("first read data", r, exp);
    check("first read uses the bus", 32'(cycles), 1);
    access(1'b1, 32'h14, 0, 4'hF, r, e, clocks, cycles);
    check("second read data", r, exp);
    check("second read: no bus cycle", 32'(cycles), 0);
    check("hit takes two clocks", 32'(clocks), 1);
    // device reads are never cached
    for (int k = 0; k < 3; k++) begin
      dev_val = $urandom;
      access(1'b1, 32'h8000_0014, 0, 4'hF, r, e, clocks, cycles);
      check("device read data", r, dev_val);
      check("device read uses the bus", 32'(cycles), 1);
    end
    // a bus error reaches the processor and does not fill the line
    err_next = 1'b1;
    access(1'b1, 32'h3C, 0, 4'hF, r, e, clocks, cycles);
    err_next = 1'b0;
    check("bus error reported", 32'(e), 1);
    access(1'b1, 32'h3C, 0, 4'hF, r, e, clocks, cycles);
    check("no fill after error", 32'(cycles), 1);
    check("data after error", r, mem[15]);
    // random traffic on 64 words sharing 8 lines
    for (int k = 0; k < 2000; k++) begin
      a = {24'd0, 6'($urandom), 2'b00};
      rw = ($urandom % 3) != 0;
      w = $urandom;
      s = ($urandom % 2) ? 4'hF : 4'($urandom);
      exp = mem[a[7:2]];
      access(rw, a, w, s, r, e, clocks, cycles);
      check("no error", 32'(e), 0);
      if (rw) check($sformatf("read %h", a), r, exp);
      else begin
        for (int b = 0; b < 4; b++) if (s[b]) exp[8*b +: 8] = w[8*b +: 8];
        check($sformatf("write through %h", a), mem[a[7:2]], exp);
        check("write uses the bus", 32'(cycles), 1);
      end
    end
    checks++; if (n_hit == 0)  begin failures++; $display("FAIL no hits"); end
    checks++; if (n_miss == 0) begin failures++; $display("FAIL no misses"); end
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
