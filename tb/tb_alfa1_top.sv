// tb_alfa1_top: end-to-end test of the Alfa-1 computer at its default size.
//
// Runs four programs on alfa1_top, each loaded into the memory array while
// reset is held and run until the processor halts:
//  1. the shift-and-store loop: 0x01 shifted 0..12 places, each low byte
//     stored at dest + i (twelve-times loop with a delay-slot increment);
//  2. storing parts of 0x12345678 with st / sth / stb at various addresses;
//  3. udiv of 274543375 by 13908050, stored to memory (expected 19);
//  4. a system test: trap table, window overflow with retry, overlapping
//     windows, division by zero, misaligned load, software trap, memory
//     error, an external memory-mapped device, annulled and taken branches
//     with annul, call/return, signed multiply into Y, an interrupt, user mode
//     with a limit violation and a privileged instruction, and a final trap
//     whose handler halts on unimp.
// Programs 1-3 use the instruction words printed with the original examples;
// the expected memory contents are worked out here from the instruction
// semantics. During program 4 an external bus master (priority above the
// CPU) writes a word into memory and an external slave at 0x8000_0000 answers.
// Every mechanism is counted and must occur at least once.
module tb_alfa1_top;
  import alfa_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [15:1] irq;
  logic        iack, halted, dbg_trap, cache_hit, cache_miss;
  logic [31:0] dbg_pc, dbg_psr;
  logic [7:0]  dbg_tt;
  logic        ext_m_req, ext_m_as, ext_m_rd_wr, ext_m_grant, ext_m_dtack, ext_m_err;
  logic [31:0] ext_m_addr, ext_m_wdata, ext_m_rdata;
  logic [3:0]  ext_m_bsel;
  logic        ext_s_dtack, ext_s_err;
  logic [31:0] ext_s_rdata;
  logic        bus_as, bus_rd_wr, bus_busy, bus_dtack, bus_err;
  logic [31:0] bus_addr, bus_wdata;
  logic [3:0]  bus_bsel;

  alfa1_top dut (
    .clk(clk), .rst(rst), .irq(irq), .iack(iack),
    .ext_m_req(ext_m_req), .ext_m_as(ext_m_as), .ext_m_rd_wr(ext_m_rd_wr),
    .ext_m_addr(ext_m_addr), .ext_m_wdata(ext_m_wdata), .ext_m_bsel(ext_m_bsel),
    .ext_m_grant(ext_m_grant), .ext_m_dtack(ext_m_dtack), .ext_m_err(ext_m_err),
    .ext_m_rdata(ext_m_rdata),
    .ext_s_dtack(ext_s_dtack), .ext_s_err(ext_s_err), .ext_s_rdata(ext_s_rdata),
    .bus_as(bus_as), .bus_rd_wr(bus_rd_wr), .bus_addr(bus_addr), .bus_wdata(bus_wdata),
    .bus_bsel(bus_bsel), .bus_busy(bus_busy), .bus_dtack(bus_dtack), .bus_err(bus_err),
    .cs_mask_we(1'b0), .cs_mask_sel(1'b0), .cs_mask_d(32'd0),
    .halted(halted), .dbg_pc(dbg_pc), .dbg_psr(dbg_psr), .dbg_tt(dbg_tt), .dbg_trap(dbg_trap),
    .cache_hit(cache_hit), .cache_miss(cache_miss)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  int cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ memory access
  task automatic poke(input int addr, input logic [31:0] w);
    dut.u_mem.mem[addr / 4] = w;
  endtask
  function automatic logic [31:0] peek(input int addr);
    return dut.u_mem.mem[addr / 4];
  endfunction
  task automatic clear_mem();
    for (int i = 0; i < 32768 / 4; i++) dut.u_mem.mem[i] = 32'd0;
  endtask
  // write a program: consecutive words from address a
  task automatic load(input int a, input logic [31:0] prog[$]);
    foreach (prog[i]) poke(a + 4 * i, prog[i]);
  endtask

  // ------------------------------------------------ mechanism counters
  int n_wait = 0, n_trap[int], n_ext_grant = 0, n_ext_dev = 0, n_irq = 0, n_user_cycles = 0;
  int n_cpu_grant_lost = 0, n_hit = 0, n_miss = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.bus_as && !dut.u_cpu.bus_dtack && !dut.u_cpu.bus_err) n_wait++;
    if (dbg_trap) n_trap[int'(dut.u_cpu.tt_q)] = n_trap.exists(int'(dut.u_cpu.tt_q)) ? n_trap[int'(dut.u_cpu.tt_q)] + 1 : 1;
    if (iack) n_irq++;
    if (!dbg_psr[PSR_S]) n_user_cycles++;
    if (dut.u_cache.bus_req && !dut.u_cache.bus_grant && ext_m_grant) n_cpu_grant_lost++;
    if (cache_hit) n_hit++;
    if (cache_miss) n_miss++;
  end

  // ------------------------------------------ external slave at 0x8000_0000
  logic [31:0] dev_reg;
  logic        dev_busy;
  always @(posedge clk) begin
    ext_s_dtack <= 1'b0;
    ext_s_rdata <= 32'd0;
    if (rst) begin
      dev_busy <= 1'b0;
      dev_reg  <= 32'd0;
    end else if (bus_as && bus_addr[31] && !dev_busy) begin
      dev_busy    <= 1'b1;
      ext_s_dtack <= 1'b1;
      n_ext_dev++;
      if (bus_rd_wr) ext_s_rdata <= dev_reg + 32'd1;
      else           dev_reg     <= bus_wdata;
    end else if (!bus_as) dev_busy <= 1'b0;
  end
  assign ext_s_err = 1'b0;

  // ------------------------------------------- external master (I/O device)
  task automatic ext_write(input logic [31:0] a, input logic [31:0] d);
    ext_m_req <= 1'b1;
    do @(posedge clk); while (!ext_m_grant);
    n_ext_grant++;
    ext_m_addr <= a; ext_m_wdata <= d; ext_m_bsel <= 4'hF; ext_m_rd_wr <= 1'b0; ext_m_as <= 1'b1;
    do @(posedge clk); while (!ext_m_dtack);
    ext_m_as <= 1'b0; ext_m_req <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run_until_halt(input int max_cycles, output int used);
    int start;
    start = cycles;
    rst <= 1'b0;
    while (!halted && cycles - start < max_cycles) @(posedge clk);
    used = cycles - start;
  endtask

  task automatic reset_dut();
    rst <= 1'b1;
    repeat (3) @(posedge clk);
  endtask

  // ------------------------------------------------------------ programs
  logic [31:0] prog[$];
  int used;
  int irq_at;
  int skip_tt[6] = '{'h2A, 'h07, 'h85, 'h29, 'h09, 'h03};   // handlers that skip the instruction
  int all_tt[9]  = '{'h05, 'h2A, 'h07, 'h85, 'h29, 'h09, 'h03, 'h80, 'h15};

  initial begin
    irq = '0;
    ext_m_req = 0; ext_m_as = 0; ext_m_rd_wr = 1; ext_m_addr = 0; ext_m_wdata = 0; ext_m_bsel = 0;
    reset_dut();

    // ---------------------------------------------- 1. shift and store
    clear_mem();
    load(32, '{32'h82102001, 32'h87284002, 32'hC628A03C, 32'h80A0A00C,
               32'h12BFFFFD, 32'h8400A001, 32'h00000000});
    for (int a = 60; a < 80; a += 4) poke(a, 32'h20202020);
    run_until_halt(20000, used);
    check("p1 halted", 32'(halted), 1);
    begin
      logic [7:0] exp_b [60:79];
      for (int a = 60; a < 80; a++) exp_b[a] = 8'h20;
      for (int i = 0; i <= 12; i++) exp_b[60 + i] = 8'(32'd1 << i);
      for (int a = 60; a < 80; a += 4)
        check($sformatf("p1 mem[%0d]", a), peek(a), {exp_b[a], exp_b[a+1], exp_b[a+2], exp_b[a+3]});
    end
    check("p1 r2", dut.u_cpu.u_regglob.r[2], 13);
    check("p1 halt trap is illegal instruction", 32'(dbg_tt), 32'(TT_ILLEG_INST));
    $display("p1: %0d cycles", used);

    // ------------------------------------------------- 2. partial stores
    reset_dut();
    clear_mem();
    load(32, '{sethi(1, 32'h12345678), set_lo(1, 32'h12345678),
               32'hC2202048, 32'hC230204C, 32'hC2302052, 32'hC2282054,
               32'hC2282059, 32'hC228205E, 32'hC2282063, 32'h00000000});
    for (int a = 72; a < 104; a += 4) poke(a, 32'h20202020);
    run_until_halt(20000, used);
    check("p2 halted", 32'(halted), 1);
    begin
      logic [7:0] b [72:103];
      logic [31:0] v;
      v = 32'h12345678;
      for (int a = 72; a < 104; a++) b[a] = 8'h20;
      {b[72], b[73], b[74], b[75]} = v;           // st  [72]
      {b[76], b[77]} = v[15:0];                   // sth [76]
      {b[82], b[83]} = v[15:0];                   // sth [82]
      b[84] = v[7:0]; b[89] = v[7:0]; b[94] = v[7:0]; b[99] = v[7:0];
      for (int a = 72; a < 104; a += 4)
        check($sformatf("p2 mem[%0d]", a), peek(a), {b[a], b[a+1], b[a+2], b[a+3]});
    end
    $display("p2: %0d cycles", used);

    // ---------------------------------------------------------- 3. udiv
    reset_dut();
    clear_mem();
    load(32, '{sethi(24, 274543375), set_lo(24, 274543375),
               sethi(22, 13908050),  set_lo(22, 13908050),
               arr(OP3_UDIV, 10, 24, 22),
               mem_i(OP3_ST, 10, 0, 64),
               UNIMP});
    poke(64, 32'hFFFF_FFFF);
    run_until_halt(20000, used);
    check("p3 udiv result", peek(64), 274543375 / 13908050);
    $display("p3: %0d cycles", used);

    // ---------------------------------------------------- 4. system test
    reset_dut();
    clear_mem();
    prog = {};
    prog.push_back(sethi(1, 32'h1000));                  // g1 = trap table
    prog.push_back(ari(OP3_WRTBR, 0, 1, 0));
    prog.push_back(sethi(2, 32'h8000_0000));             // WIM = window 31 invalid
    prog.push_back(ari(OP3_WRWIM, 0, 2, 0));
    prog.push_back(ari(OP3_WRPSR, 0, 0, 'hA0));          // S=1 ET=1 CWP=0
    prog.push_back(NOP);
    prog.push_back(ari(OP3_ADD, 8, 0, 'h55));            // o0 = 0x55
    prog.push_back(ari(OP3_SAVE, 0, 0, 0));              // overflow trap, retried
    prog.push_back(mem_i(OP3_ST, 24, 0, 'h800));         // i0 (= caller o0) -> 0x800
    prog.push_back(ari(OP3_RESTORE, 0, 0, 0));
    prog.push_back(ari(OP3_ADD, 3, 0, 7));
    prog.push_back(arr(OP3_UDIV, 4, 3, 0));              // divide by zero
    prog.push_back(mem_i(OP3_LD, 4, 0, 'h802));          // misaligned
    prog.push_back(ticc(4'h8, 0, 5));                    // ta 5
    prog.push_back(sethi(5, 32'h0001_0000));
    prog.push_back(mem_i(OP3_LD, 4, 5, 0));              // beyond memory: ERR
    prog.push_back(sethi(5, 32'h8000_0000));             // external device
    prog.push_back(ari(OP3_ADD, 3, 0, 'h3C));
    prog.push_back(mem_i(OP3_ST, 3, 5, 0));
    prog.push_back(mem_i(OP3_LD, 4, 5, 4));
    prog.push_back(mem_i(OP3_ST, 4, 0, 'h804));          // 0x3D
    prog.push_back(ari(OP3_ADD, 3, 0, 1));
    prog.push_back(ari(6'h14, 0, 3, 1));                 // subcc g3,1,g0: Z=1
    prog.push_back(bicc(4'h9, 1'b1, 2));                 // bne,a: not taken, slot annulled
    prog.push_back(ari(OP3_ADD, 4, 0, 'h77));            //   annulled
    prog.push_back(mem_i(OP3_ST, 4, 0, 'h808));          // still 0x3D
    prog.push_back(bicc(4'h1, 1'b1, 3));                 // be,a: taken, slot executed
    prog.push_back(ari(OP3_ADD, 6, 0, 'h11));            //   slot
    prog.push_back(ari(OP3_ADD, 6, 0, 'h22));            //   skipped
    prog.push_back(mem_i(OP3_ST, 6, 0, 'h80C));          // 0x11
    prog.push_back(call(4));                             // to the subroutine below
    prog.push_back(NOP);
    prog.push_back(mem_i(OP3_ST, 6, 0, 'h810));          // 0x99 from the subroutine
    prog.push_back(bicc(4'h8, 1'b1, 3));                 // ba,a over the subroutine
    prog.push_back(ari(OP3_JMPL, 0, 15, 8));             // subroutine: retl
    prog.push_back(ari(OP3_ADD, 6, 0, 'h99));            //   slot
    prog.push_back(ari(OP3_ADD, 3, 0, -3));
    prog.push_back(ari(OP3_SMUL, 4, 3, 1000));           // -3000, Y = -1
    prog.push_back(ari(OP3_RDY, 5, 0, 0));
    prog.push_back(mem_i(OP3_ST, 4, 0, 'h814));
    prog.push_back(mem_i(OP3_ST, 5, 0, 'h818));
    prog.push_back(ari(OP3_WRY, ASR_BASE, 0, 0));        // BASE = 0
    prog.push_back(sethi(3, 32'h2000));
    prog.push_back(ari(OP3_WRY, ASR_LIMIT, 3, 0));       // LIMIT = 0x2000
    prog.push_back(ari(OP3_WRPSR, 0, 0, 'h20));          // user mode, ET=1
    prog.push_back(NOP);
    prog.push_back(mem_i(OP3_LD, 4, 0, 'hFFC));          // inside the limit: fine
    prog.push_back(sethi(3, 32'h3000));
    prog.push_back(mem_i(OP3_LD, 4, 3, 0));              // above the limit: exception
    prog.push_back(ari(OP3_RDPSR, 4, 0, 0));             // privileged
    prog.push_back(ticc(4'h8, 0, 0));                    // ta 0 -> halts in its handler
    prog.push_back(UNIMP);
    load(32, prog);
    poke('hFFC, 32'h0BAD_F00D);
    // trap handlers, 16 bytes each at 0x1000 + 16*tt
    load('h1000 + 16 * 'h05, '{ari(OP3_WRWIM, 0, 0, 0), ari(OP3_JMPL, 0, 17, 0), ari(OP3_RETT, 0, 18, 0), NOP});
    foreach (skip_tt[k])
      load('h1000 + 16 * skip_tt[k],
           '{ari(OP3_JMPL, 0, 18, 0), ari(OP3_RETT, 0, 18, 4), NOP, NOP});
    load('h1000 + 16 * 'h15, '{ari(OP3_JMPL, 0, 17, 0), ari(OP3_RETT, 0, 18, 0), NOP, NOP});
    load('h1000 + 16 * 'h80, '{UNIMP});

    fork
      run_until_halt(50000, used);
      begin
        // external master writes while the CPU runs
        repeat (120) @(posedge clk);
        ext_write(32'h7F00, 32'hDEAD_BEEF);
        // interrupt request on line 5, held until acknowledged
        repeat (200) @(posedge clk);
        irq[5] <= 1'b1;
        irq_at = cycles;
        while (!iack && cycles - irq_at < 20000) @(posedge clk);
        irq[5] <= 1'b0;
      end
    join
    $display("p4: %0d cycles", used);
    check("p4 halted", 32'(halted), 1);
    check("p4 window overlap (i0 after save = o0 before)", peek('h800), 32'h55);
    check("p4 external device read", peek('h804), 32'h3D);
    check("p4 annulled delay slot", peek('h808), 32'h3D);
    check("p4 be,a taken slot", peek('h80C), 32'h11);
    check("p4 call/return", peek('h810), 32'h99);
    check("p4 smul low", peek('h814), 32'(-3000));
    check("p4 smul Y", peek('h818), 32'hFFFF_FFFF);
    check("p4 external master write", peek('h7F00), 32'hDEAD_BEEF);
    check("p4 device register", dev_reg, 32'h3C);
    check("p4 user load inside the limit", dut.u_cpu.u_regglob.r[4], 32'h0BAD_F00D);
    check("p4 final trap type (unimp in handler)", 32'(dbg_tt), 32'(TT_ILLEG_INST));
    check("p4 CWP after traps", 32'(dbg_psr[4:0]), 5'd31);

    // every mechanism must have happened
    foreach (all_tt[k]) begin
      int t;
      t = all_tt[k];
      check($sformatf("trap 0x%0h taken once", t), n_trap.exists(t) ? n_trap[t] : 0, 1);
    end
    checks++; if (n_wait == 0)       begin failures++; $display("FAIL no memory wait states"); end
    checks++; if (n_ext_grant == 0)  begin failures++; $display("FAIL external master never granted"); end
    checks++; if (n_ext_dev < 2)     begin failures++; $display("FAIL external slave not reached"); end
    checks++; if (n_irq == 0)        begin failures++; $display("FAIL no interrupt acknowledged"); end
    checks++; if (n_user_cycles == 0) begin failures++; $display("FAIL never in user mode"); end
    checks++; if (n_hit == 0)        begin failures++; $display("FAIL no cache hit"); end
    checks++; if (n_miss == 0)       begin failures++; $display("FAIL no cache miss"); end
    $display("mechanisms: wait=%0d ext_grant=%0d ext_dev=%0d irq=%0d user_cycles=%0d cpu_waited_for_ext=%0d cache_hit=%0d cache_miss=%0d",
             n_wait, n_ext_grant, n_ext_dev, n_irq, n_user_cycles, n_cpu_grant_lost, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
