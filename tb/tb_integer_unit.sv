// tb_integer_unit: test of the integer unit alone, on a testbench memory.
// The memory answers each bus cycle after a random 0..3 extra clocks and raises
// ERR above 32 KiB. Three programs start at address 32 and end with an unimp
// instruction, which halts the unit (illegal-instruction trap with ET = 0):
//  1. the shift loop of the document's example program, storing 1 << i into
//     bytes 60..71;
//  2. a program of this testbench: window save / restore passing a value
//     through the overlapping registers, umul with Y, rd %y, a taken bl
//     with its delay slot, ldsb, sth and st;
//  3. a load from beyond the memory, which halts with data access error
//     (TT 0x29).
// The memory contents and the trap type are checked after each run.
module tb_integer_unit;
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
    #10000000;
    $display("FAIL watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  import sparc_asm_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        req, as, rd_wr, dtack, err, iack, halted, dbg_trap;
  logic [31:0] addr, wdata, rdata, dbg_pc, dbg_psr;
  logic [3:0]  bsel;
  logic [7:0]  dbg_tt;
  logic [31:0] tmem [8192];
  logic        served;
  int          waitc, nwaits;

  integer_unit dut (
    .clk(clk), .rst(rst), .bus_req(req), .bus_grant(req), .bus_as(as), .bus_rd_wr(rd_wr),
    .bus_addr(addr), .bus_wdata(wdata), .bus_bsel(bsel), .bus_rdata(rdata), .bus_dtack(dtack),
    .bus_err(err), .irq(15'd0), .iack(iack), .halted(halted), .dbg_pc(dbg_pc), .dbg_psr(dbg_psr),
    .dbg_tt(dbg_tt), .dbg_trap(dbg_trap));

  // testbench memory: one acknowledge per strobe, random wait states
  always_ff @(posedge clk) begin
    dtack <= 1'b0;
    err   <= 1'b0;
    rdata <= '0;
    if (rst) begin
      served <= 1'b0;
      waitc  <= 0;
      nwaits <= 0;
    end else if (as && !served) begin
      if (waitc > 0) begin
        waitc  <= waitc - 1;
        nwaits <= nwaits + 1;
      end else begin
        served <= 1'b1;
        if (addr >= 32'h8000) err <= 1'b1;
        else begin
          dtack <= 1'b1;
          if (rd_wr) rdata <= tmem[addr[14:2]];
          else for (int b = 0; b < 4; b++)
            if (bsel[b]) tmem[addr[14:2]][8 * b +: 8] <= wdata[8 * b +: 8];
        end
      end
    end else if (!as) begin
      served <= 1'b0;
      waitc  <= int'($urandom % 4);
    end
  end

  task automatic clear_mem();
    for (int i = 0; i < 8192; i++) tmem[i] = '0;
  endtask

  task automatic run(input string name, input int max_cycles);
    int n;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    while (!halted && n < max_cycles) begin @(posedge clk); n++; end
    #1;
    check({name, ": halted"}, 32'(halted), 1);
  endtask

  initial begin
    clear_mem();
    // 1. shift loop
    begin
      logic [31:0] p [7] = '{32'h82102001, 32'h87284002, 32'hC628A03C, 32'h80A0A00C,
                             32'h12BFFFFD, 32'h8400A001, 32'h00000000};
      for (int i = 0; i < 7; i++) tmem[8 + i] = p[i];
    end
    run("shift loop", 5000);
    check("bytes 60..63", tmem[15], 32'h0102_0408);
    check("bytes 64..67", tmem[16], 32'h1020_4080);
    check("bytes 68..71", tmem[17], 32'h0000_0000);
    check("loop counter", dut.u_regglob.r[2], 32'd13);
    check("halt trap type", 32'(dbg_tt), 32'h02);
    check("wait states were inserted", 32'(nwaits > 0), 1);
    // 2. windows, multiply, branch, sub-word accesses
    clear_mem();
    begin
      logic [31:0] p [21];
      p[0]  = sethi(1, 32'h1234_5678);
      p[1]  = set_lo(1, 32'h1234_5678);
      p[2]  = ari(6'h02, 8, 0, 7);            // or  %g0, 7, %o0
      p[3]  = ari(6'h3C, 0, 0, 0);            // save
      p[4]  = ari(6'h00, 16, 24, 5);          // add %i0, 5, %l0
      p[5]  = mem_i(6'h04, 16, 0, 32'h400);   // st  %l0, [0x400]
      p[6]  = ari(6'h3D, 0, 0, 0);            // restore
      p[7]  = mem_i(6'h04, 8, 0, 32'h404);    // st  %o0, [0x404]
      p[8]  = ari(6'h0A, 3, 1, 16);           // umul %g1, 16, %g3
      p[9]  = mem_i(6'h04, 3, 0, 32'h408);    // st  %g3, [0x408]
      p[10] = arr(6'h28, 4, 0, 0);            // rd  %y, %g4
      p[11] = mem_i(6'h04, 4, 0, 32'h40C);    // st  %g4, [0x40C]
      p[12] = ari(6'h14, 5, 0, 1);            // subcc %g0, 1, %g5
      p[13] = bicc(4'h3, 1'b0, 3);            // bl  +3
      p[14] = ari(6'h02, 6, 0, 1);            // or  %g0, 1, %g6 (delay slot)
      p[15] = ari(6'h02, 6, 0, 99);           // skipped
      p[16] = mem_i(6'h09, 7, 0, 32'h408);    // ldsb [0x408], %g7
      p[17] = mem_i(6'h06, 5, 0, 32'h412);    // sth %g5, [0x412]
      p[18] = mem_i(6'h04, 6, 0, 32'h414);    // st  %g6, [0x414]
      p[19] = mem_i(6'h04, 7, 0, 32'h418);    // st  %g7, [0x418]
      p[20] = UNIMP;
      for (int i = 0; i < 21; i++) tmem[8 + i] = p[i];
    end
    run("program 2", 5000);
    check("value passed through the window overlap", tmem[32'h400 / 4], 32'd12);
    check("out register kept after restore", tmem[32'h404 / 4], 32'd7);
    check("umul low", tmem[32'h408 / 4], 32'h2345_6780);
    check("umul high in Y", tmem[32'h40C / 4], 32'd1);
    check("sth lower half", tmem[32'h410 / 4], 32'h0000_FFFF);
    check("delay slot executed, target reached", tmem[32'h414 / 4], 32'd1);
    check("ldsb", tmem[32'h418 / 4], 32'h23);
    check("CWP back to 0", 32'(dbg_psr[4:0]), 0);
    // 3. bus error
    clear_mem();
    tmem[8]  = sethi(2, 32'h0001_0000);
    tmem[9]  = mem_i(6'h00, 1, 2, 0);
    tmem[10] = UNIMP;
    run("bus error", 2000);
    check("data access error", 32'(dbg_tt), 32'h29);
    check("stopped at the load", dbg_pc, 32'd36);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
