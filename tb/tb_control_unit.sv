// tb_control_unit: test of the control unit. Part one decodes one instruction
// of every class (built with the assembler functions) and compares the decoded
// control fields with the SPARC meaning of the instruction. Part two drives
// the sequencer: the fetch waits for DTACK; loads and stores go through the
// memory state, multiply/divide through the MUL/DIV wait state; a trap with
// ET = 1 runs the three trap-entry states, with ET = 0 the unit halts.
module tb_control_unit;
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
  import sparc_asm_pkg::*;
  logic [31:0] ir;
  logic        et, dtack, md_done, tf;
  cpu_state_e  state;
  ctl_t        ctl;
  control_unit dut (.clk(clk), .rst(rst), .ir(ir), .psr_et(et), .dtack(dtack), .md_done(md_done),
                    .trap_found(tf), .state(state), .ctl(ctl));

  task automatic step(input cpu_state_e exp, input string what);
    @(posedge clk); #1;
    check(what, 32'(state), 32'(exp));
  endtask

  initial begin
    ir = NOP; et = 1'b1; dtack = 1'b0; md_done = 1'b0; tf = 1'b0;
    // ---------------- decoder
    ir = arr(6'h00, 5'd3, 5'd1, 5'd2); #1;       // add
    check("add is_alu", 32'(ctl.is_alu), 1); check("add c_en", 32'(ctl.c_en), 1);
    check("add fcod", 32'(ctl.alu_fcod), 0); check("add no cc", 32'(ctl.set_cc), 0);
    ir = ari(6'h14, 5'd0, 5'd1, 13'd5); #1;      // subcc (cmp)
    check("subcc set_cc", 32'(ctl.set_cc), 1); check("subcc fcod", 32'(ctl.alu_fcod), 4);
    ir = arr(6'h25, 5'd3, 5'd1, 5'd2); #1;       // sll
    check("sll en_shf", 32'(ctl.en_shf), 1); check("sll en_alu", 32'(ctl.en_alu), 0);
    ir = arr(6'h0E, 5'd3, 5'd1, 5'd2); #1;       // udiv
    check("udiv is_md", 32'(ctl.is_md), 1); check("udiv en_md", 32'(ctl.en_md), 1);
    ir = mem_i(6'h09, 5'd3, 5'd1, 13'd0); #1;    // ldsb
    check("ldsb load", 32'(ctl.is_load), 1); check("ldsb sign", 32'(ctl.ld_sign), 1);
    check("ldsb size", 32'(ctl.size), 32'(SZ_BYTE)); check("ldsb c_en", 32'(ctl.c_en), 1);
    ir = mem_i(6'h06, 5'd3, 5'd1, 13'd0); #1;    // sth
    check("sth store", 32'(ctl.is_store), 1); check("sth size", 32'(ctl.size), 32'(SZ_HALF));
    check("sth no write-back", 32'(ctl.c_en), 0);
    ir = sethi(5'd1, 32'h1234_5400); #1;
    check("sethi", 32'(ctl.is_sethi), 1); check("sethi c_en", 32'(ctl.c_en), 1);
    ir = bicc(4'h9, 1'b0, 22'h3FFFFD); #1;
    check("bne", 32'(ctl.is_bicc), 1); check("bne c_en", 32'(ctl.c_en), 0);
    ir = call(30'd4); #1;
    check("call", 32'(ctl.is_call), 1); check("call c_en", 32'(ctl.c_en), 1);
    ir = arr(6'h29, 5'd1, 5'd0, 5'd0); #1;       // rd %psr
    check("rdpsr", 32'(ctl.is_rdsp), 1); check("rdpsr priv", 32'(ctl.priv), 1);
    ir = arr(6'h28, 5'd1, 5'd0, 5'd0); #1;       // rd %y
    check("rdy not priv", 32'(ctl.priv), 0);
    ir = ari(6'h31, 5'd0, 5'd1, 13'd0); #1;      // wr %psr
    check("wrpsr", 32'(ctl.is_wrsp), 1); check("wrpsr xor", 32'(ctl.alu_fcod), 3);
    check("wrpsr no rd", 32'(ctl.c_en), 0);
    ir = ari(6'h30, 5'd16, 5'd1, 13'd0); #1;     // wr BASE
    check("wr base priv", 32'(ctl.priv), 1); check("wr base legal", 32'(ctl.illegal), 0);
    ir = ari(6'h30, 5'd5, 5'd1, 13'd0); #1;      // wr asr 5: not present
    check("wr asr5 illegal", 32'(ctl.illegal), 1);
    ir = ari(6'h3C, 5'd14, 5'd14, 13'h1FA0); #1; // save
    check("save", 32'(ctl.is_save), 1); check("save decrements", 32'(ctl.incdec_fcod), 0);
    ir = arr(6'h3D, 5'd0, 5'd0, 5'd0); #1;       // restore
    check("restore", 32'(ctl.is_restore), 1); check("restore increments", 32'(ctl.incdec_fcod), 1);
    ir = ari(6'h39, 5'd0, 5'd18, 13'd0); #1;     // rett
    check("rett", 32'(ctl.is_rett), 1); check("rett priv", 32'(ctl.priv), 1); check("rett increments", 32'(ctl.incdec_fcod), 1);
    ir = ticc(4'h8, 5'd0, 7'd5); #1;
    check("ta", 32'(ctl.is_ticc), 1);
    ir = UNIMP; #1;
    check("unimp illegal", 32'(ctl.illegal), 1); check("unimp no write", 32'(ctl.c_en), 0);
    ir = mem_i(6'h0F, 5'd1, 5'd1, 13'd0); #1;    // swap: not implemented
    check("swap illegal", 32'(ctl.illegal), 1);
    // ---------------- sequencer
    @(posedge clk); #1; rst = 1'b0;
    check("reset state", 32'(state), 32'(S_RESET));
    step(S_FETCH, "fetch");
    step(S_FETCH, "fetch waits for dtack");
    ir = mem_i(6'h00, 5'd1, 5'd0, 13'd64);       // ld
    dtack = 1'b1; step(S_EXEC, "exec"); dtack = 1'b0;
    step(S_MEM, "load goes to memory");
    step(S_MEM, "memory waits");
    dtack = 1'b1; step(S_WB, "write back"); dtack = 1'b0;
    step(S_FETCH, "next fetch");
    ir = arr(6'h0A, 5'd1, 5'd1, 5'd2);           // umul
    dtack = 1'b1; step(S_EXEC, "exec umul"); dtack = 1'b0;
    step(S_MULDIV, "muldiv wait");
    step(S_MULDIV, "muldiv still waits");
    md_done = 1'b1; step(S_WB, "muldiv done"); md_done = 1'b0;
    step(S_FETCH, "fetch after muldiv");
    ir = NOP;
    dtack = 1'b1; step(S_EXEC, "exec nop"); dtack = 1'b0;
    step(S_WB, "nop to write back");
    step(S_FETCH, "fetch");
    ir = UNIMP;
    dtack = 1'b1; step(S_EXEC, "exec unimp"); dtack = 1'b0;
    tf = 1'b1; et = 1'b1;
    step(S_TRAP, "trap");
    tf = 1'b0;
    step(S_TRAP_L1, "trap l1");
    step(S_TRAP_L2, "trap l2");
    step(S_FETCH, "fetch of the handler");
    dtack = 1'b1; step(S_EXEC, "exec"); dtack = 1'b0;
    tf = 1'b1; et = 1'b0;
    step(S_HALT, "trap with ET = 0 halts");
    tf = 1'b0;
    step(S_HALT, "stays halted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
