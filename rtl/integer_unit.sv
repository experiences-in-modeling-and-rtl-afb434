// integer_unit: the Alfa-1 processor (a SPARC-like integer unit).
//
// Datapath around the control unit:
//  * PC, nPC, IR, Y, WIM, TBR and the BASE/LIMIT registers of the address
//    unit are registers of this module; the PSR holds N Z V C, PIL, S, PS, ET and
//    the 5-bit CWP (other bits read 0).
//  * The register file is the eight globals (regglob) plus the 512-entry
//    window file (regblock); cwp_logic maps the 5-bit register numbers of the
//    instruction through the CWP. Port A reads rs1; port B reads rs2, or rd
//    during the memory cycle of a store.
//  * alu_unit (ALU, MUL/DIV, shifter) computes results, load/store and
//    jump addresses and the condition codes; sign extension of simm13 and
//    disp22 by signext; the PC-relative target by an adder; nPC + 4 by inc4.
//  * incdec and wim_check move the window pointer and detect window
//    overflow/underflow; cclogic evaluates branch and trap conditions.
//  * address_unit relocates and checks user-mode addresses before they go to
//    the bus; align_store / align_load place store data and extract loaded
//    data.
//  * trap_logic picks the highest-priority trap of the cycle, irq_logic the
//    pending interrupt (taken after write-back when ET = 1).
// Instruction cycle (see control_unit): FETCH, EXEC, [MULDIV], [MEM], WB;
// results are latched in EXEC/MULDIV/MEM and committed in WB. A trap saves
// PC and nPC in l1/l2 of the new window, sets TBR.tt and continues at TBR;
// with ET = 0 the processor halts (error mode), which is how a program ends
// on its final unimp.
// Bus master port: REQ while it needs the bus, AS/RD_WR/ADDR/WDATA/BSEL
// while GRANT, cycle ends on DTACK or ERR. RD_WR = 1 is a read.
// What follows the document: the register organisation (8 globals + 512
// window registers, 5-bit CWP), the PSR and TBR layouts, the block set, the
// multiply/divide use of Y, the trap table, the rules of the control unit.
// This design's choices: the SPARC V8 encodings and trap-entry sequence,
// the state sequence, big-endian bytes, the use of ASR 16/17 for BASE and
// LIMIT, and register 0 reading as zero.
// Lint: the ALU block's Overflow line and the carry of the PC-relative adder
// are left open (V comes with the condition codes; the target wraps), and
// the is_shf field of the control word is unused because the shifter
// result is routed by en_shf.
module integer_unit
  import alfa_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0020
) (
  input  logic        clk,
  input  logic        rst,
  // bus master
  output logic        bus_req,
  input  logic        bus_grant,
  output logic        bus_as,
  output logic        bus_rd_wr,
  output logic [31:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic [3:0]  bus_bsel,
  input  logic [31:0] bus_rdata,
  input  logic        bus_dtack,
  input  logic        bus_err,
  // interrupts
  input  logic [15:1] irq,
  output logic        iack,
  // status
  output logic        halted,
  output logic [31:0] dbg_pc,
  output logic [31:0] dbg_psr,
  output logic [7:0]  dbg_tt,
  output logic        dbg_trap          // one pulse per trap taken
);
  // ---------------------------------------------------------- registers
  cpu_state_e state;
  ctl_t       ctl;

  logic [31:0] pc, npc, ir, y, wim, tbr, base, limit;
  icc_t        icc;
  logic [3:0]  pil;
  logic        s_bit, ps_bit, et_bit;
  logic [4:0]  cwp;

  logic [31:0] res_q;      // value for rd
  logic [31:0] addr_q;     // load/store address, jump target
  logic [31:0] tgt_q;      // branch / call target
  logic        taken_q;    // branch taken
  icc_t        icc_q;
  logic [31:0] y_q;
  logic        y_we_q;
  logic [7:0]  tt_q;
  logic        md_done, div_zero;

  // --------------------------------------------------- instruction fields
  logic [4:0]  rd, rs1, rs2;
  logic        use_imm, annul;
  logic [3:0]  cond;
  logic [31:0] simm13, disp22, disp30, sethi_imm;

  assign rd      = ir[29:25];
  assign rs1     = ir[18:14];
  assign rs2     = ir[4:0];
  assign use_imm = ir[13];
  assign annul   = ir[29];
  assign cond    = ir[28:25];

  signext #(.IN_W(13)) u_sx13 (.op(ir[12:0]), .res(simm13));
  signext #(.IN_W(24)) u_sx22 (.op({ir[21:0], 2'b00}), .res(disp22));  // disp22 * 4
  assign disp30    = {ir[29:0], 2'b00};
  assign sethi_imm = {ir[21:0], 10'd0};

  // ------------------------------------------------------------ control
  logic trap_found;
  logic [7:0] trap_type;

  control_unit u_cu (
    .clk(clk), .rst(rst), .ir(ir), .psr_et(et_bit), .dtack(bus_dtack),
    .md_done(md_done), .trap_found(trap_found), .state(state), .ctl(ctl)
  );

  // ------------------------------------------------------- register file
  logic [4:0]  wsel;                 // architectural register written
  logic        rf_we;
  logic [31:0] rf_wdata;
  logic [4:0]  bsel_r;
  logic [2:0]  ga, gb, gc;
  logic [8:0]  wa, wb, wc;
  logic        ra_w, rb_w, rc_w;
  logic [31:0] ga_out, gb_out, wa_out, wb_out, rs1_val, rs2_val;

  assign bsel_r = (state == S_MEM) ? rd : rs2;

  cwp_logic u_cwpa (.cwp(cwp), .sel(rs1),    .gsel(ga), .rsel(wa), .rg(ra_w));
  cwp_logic u_cwpb (.cwp(cwp), .sel(bsel_r), .gsel(gb), .rsel(wb), .rg(rb_w));
  cwp_logic u_cwpc (.cwp(cwp), .sel(wsel),   .gsel(gc), .rsel(wc), .rg(rc_w));

  regglob #(.N(8)) u_regglob (
    .clk(clk), .reset(rst), .asel(ga), .bsel(gb), .csel(gc),
    .cen(rf_we && !rc_w), .cin(rf_wdata), .aout(ga_out), .bout(gb_out)
  );
  regblock #(.N(512)) u_regblock (
    .clk(clk), .reset(rst), .asel(wa), .bsel(wb), .csel(wc),
    .cen(rf_we && rc_w), .cin(rf_wdata), .aout(wa_out), .bout(wb_out)
  );
  assign rs1_val = ra_w ? wa_out : ga_out;
  assign rs2_val = rb_w ? wb_out : gb_out;

  // --------------------------------------------------------- ALU block
  logic [31:0] op2_val, ain, bin, alu_out, md_yout, sp_val;
  icc_t        alu_cc;

  assign op2_val = use_imm ? simm13 : rs2_val;

  always_comb begin
    unique case (rs1)
      ASR_BASE:  sp_val = base;
      ASR_LIMIT: sp_val = limit;
      default:   sp_val = y;
    endcase
    unique case (ir[24:19])
      OP3_RDPSR: sp_val = dbg_psr;
      OP3_RDWIM: sp_val = wim;
      OP3_RDTBR: sp_val = tbr;
      default:   ;
    endcase
  end

  always_comb begin
    ain = rs1_val;
    bin = op2_val;
    if (ctl.is_sethi)                    begin ain = '0;     bin = sethi_imm; end
    else if (ctl.is_rdsp)                begin ain = sp_val; bin = '0;        end
    else if (ctl.is_call)                begin ain = pc;     bin = '0;        end
  end

  alu_unit u_alu_unit (
    .clk(clk), .rst(rst), .ain(ain), .bin(bin), .cin(icc.c), .fcod(ctl.alu_fcod),
    .en_alu(ctl.en_alu), .en_md(ctl.en_md), .en_shf(ctl.en_shf), .yin(y),
    .start(state == S_EXEC && ctl.is_md), .cout(alu_out), .yout(md_yout),
    .cc(alu_cc), .overflow(), .md_done(md_done), .div_zero(div_zero)
  );

  // ------------------------------------------------- PC, targets, window
  logic [31:0] pc_rel, npc4, tgt4, npc8;
  logic        cond_true, wim_bad;
  logic [4:0]  cwp_new;

  adder u_pcadd (.opa(pc), .opb(ctl.is_call ? disp30 : disp22),
                 .res(pc_rel), .carry());
  inc4  u_inc_npc (.op(npc),   .res(npc4));
  inc4  u_inc_npc8(.op(npc4),  .res(npc8));
  inc4  u_inc_tgt (.op(tgt_q), .res(tgt4));

  cclogic u_cc (.carry(icc.c), .zero(icc.z), .negat(icc.n), .ovflw(icc.v),
                .cond(cond), .res(cond_true));

  incdec #(.W(5)) u_incdec (.op(cwp), .fcod(state == S_TRAP ? 1'b0 : ctl.incdec_fcod),
                            .res(cwp_new));
  wim_check u_wim (.cwp(cwp_new), .wim(wim), .res(wim_bad));

  // ------------------------------------------------------ address unit
  logic [31:0] vaddr, paddr;
  logic        acc_excep, misalign, tgt_misalign;

  assign vaddr = (state == S_FETCH) ? pc : addr_q;
  address_unit u_au (.addr_in(vaddr), .base(base), .limit(limit), .state(!s_bit),
                     .addr_out(paddr), .acc_excep(acc_excep));

  always_comb begin
    unique case (ctl.size)
      SZ_HALF: misalign = alu_out[0];
      SZ_WORD: misalign = alu_out[1:0] != 2'b00;
      default: misalign = 1'b0;
    endcase
  end
  assign tgt_misalign = alu_out[1:0] != 2'b00;

  // ---------------------------------------------------------- bus master
  logic [31:0] st_data, ld_data;
  logic [3:0]  st_bsel;

  align_store u_als (.op(rs2_val), .size(ctl.size), .kind(addr_q[1:0]),
                     .res(st_data), .bsel(st_bsel));
  align_load  u_all (.op(bus_rdata), .size(ctl.size), .kind(addr_q[1:0]),
                     .sign(ctl.ld_sign), .res(ld_data));

  logic in_bus_state;
  assign in_bus_state = (state == S_FETCH) || (state == S_MEM);
  assign bus_req   = in_bus_state;
  assign bus_as    = in_bus_state && bus_grant && !acc_excep;
  assign bus_rd_wr = !(state == S_MEM && ctl.is_store);
  assign bus_addr  = bus_as ? paddr : '0;
  assign bus_wdata = (bus_as && !bus_rd_wr) ? st_data : '0;
  assign bus_bsel  = !bus_as ? 4'b0000 : bus_rd_wr ? 4'b1111 : st_bsel;

  // -------------------------------------------------------------- traps
  trap_lines_t tl;
  logic        irq_tf, trap_inst;
  logic [7:0]  irq_tt;

  irq_logic u_irq (.irq(irq), .pil(pil), .tf(irq_tf), .tt(irq_tt));

  always_comb begin
    tl        = '0;
    trap_inst = 1'b0;
    unique case (state)
      S_FETCH: begin
        tl.inst_acc_excep = acc_excep;
        tl.inst_acc_err   = bus_err;
      end
      S_EXEC: begin
        tl.illeg_inst     = ctl.illegal || (ctl.is_rett && et_bit && s_bit);
        tl.priv_inst      = ctl.priv && !s_bit;
        tl.win_over       = ctl.is_save && wim_bad;
        tl.win_under      = (ctl.is_restore || (ctl.is_rett && !et_bit)) && wim_bad;
        tl.addr_not_align = ((ctl.is_load || ctl.is_store) && misalign) ||
                            ((ctl.is_jmpl || ctl.is_rett) && tgt_misalign);
        trap_inst         = ctl.is_ticc && cond_true;
      end
      S_MULDIV: tl.div_zero = md_done && div_zero;
      S_MEM: begin
        tl.data_acc_excep = acc_excep;
        tl.data_acc_err   = bus_err && ctl.is_load;
        tl.data_st_err    = bus_err && ctl.is_store;
      end
      default: ;
    endcase
  end

  trap_logic u_trap (
    .traps(tl), .trap_inst(trap_inst), .trap_num(alu_out[6:0]),
    .irq_tf(irq_tf && et_bit && state == S_WB), .irq_tt(irq_tt),
    .trap_found(trap_found), .trap_type(trap_type)
  );

  // ------------------------------------------------- register write port
  always_comb begin
    rf_we    = 1'b0;
    wsel     = rd;
    rf_wdata = res_q;
    unique case (state)
      S_WB:      begin rf_we = ctl.c_en; wsel = ctl.is_call ? 5'd15 : rd; end
      S_TRAP_L1: begin rf_we = 1'b1; wsel = 5'd17; rf_wdata = pc;  end
      S_TRAP_L2: begin rf_we = 1'b1; wsel = 5'd18; rf_wdata = npc; end
      default: ;
    endcase
  end

  // ------------------------------------------------- sequential datapath
  // special-register writes take rs1 xor operand 2, latched in addr_q
  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC; npc <= RESET_PC + 32'd4; ir <= '0;
      y <= '0; wim <= '0; tbr <= '0; base <= '0; limit <= '0;
      icc <= '0; pil <= '0; s_bit <= 1'b1; ps_bit <= 1'b1; et_bit <= 1'b0; cwp <= '0;
      res_q <= '0; addr_q <= '0; tgt_q <= '0; taken_q <= 1'b0; icc_q <= '0;
      y_q <= '0; y_we_q <= 1'b0; tt_q <= '0;
    end else begin
      unique case (state)
        S_FETCH: if (bus_dtack) ir <= bus_rdata;
        S_EXEC: begin
          res_q   <= (ctl.is_jmpl) ? pc : alu_out;
          addr_q  <= alu_out;
          tgt_q   <= pc_rel;
          taken_q <= cond_true;
          icc_q   <= alu_cc;
          y_we_q  <= 1'b0;
          if (!trap_found && (ctl.is_save || ctl.is_restore)) cwp <= cwp_new;
        end
        S_MULDIV: if (md_done) begin
          res_q  <= alu_out;
          icc_q  <= alu_cc;
          y_q    <= md_yout;
          y_we_q <= 1'b1;
        end
        S_MEM: if (bus_dtack && ctl.is_load) res_q <= ld_data;
        S_WB: begin
          if (ctl.set_cc && (ctl.is_alu || ctl.is_md)) icc <= icc_q;
          if (y_we_q) y <= y_q;
          if (ctl.is_wrsp) begin
            unique case (ir[24:19])
              OP3_WRY: unique case (rd)
                         ASR_BASE:  base  <= addr_q;
                         ASR_LIMIT: limit <= addr_q;
                         default:   y     <= addr_q;
                       endcase
              OP3_WRPSR: begin
                icc    <= addr_q[23:20];
                pil    <= addr_q[11:8];
                s_bit  <= addr_q[PSR_S];
                ps_bit <= addr_q[PSR_PS];
                et_bit <= addr_q[PSR_ET];
                cwp    <= addr_q[4:0];
              end
              OP3_WRWIM: wim <= addr_q;
              default:   tbr <= {addr_q[31:12], tbr[11:0]};
            endcase
          end
          if (ctl.is_rett) begin
            cwp    <= cwp_new;
            et_bit <= 1'b1;
            s_bit  <= ps_bit;
          end
          // PC / nPC
          if (ctl.is_bicc && annul && (!taken_q || cond == 4'b1000)) begin
            if (taken_q) begin pc <= tgt_q; npc <= tgt4; end   // ba,a
            else         begin pc <= npc4;  npc <= npc8; end   // annulled slot
          end else begin
            pc <= npc;
            if ((ctl.is_bicc && taken_q) || ctl.is_call) npc <= tgt_q;
            else if (ctl.is_jmpl || ctl.is_rett)          npc <= addr_q;
            else                                           npc <= npc4;
          end
        end
        S_TRAP: begin
          et_bit <= 1'b0;
          ps_bit <= s_bit;
          s_bit  <= 1'b1;
          cwp    <= cwp_new;
          tbr    <= {tbr[31:12], tt_q, 4'b0000};
        end
        S_TRAP_L2: begin
          pc  <= tbr;
          npc <= tbr + 32'd4;
        end
        default: ;
      endcase
      if (trap_found) tt_q <= trap_type;
    end
  end

  // ------------------------------------------------------------ status
  assign dbg_psr  = {8'd0, icc, 8'd0, pil, s_bit, ps_bit, et_bit, cwp};
  assign dbg_pc   = pc;
  assign dbg_tt   = tt_q;
  assign dbg_trap = (state == S_TRAP);
  assign halted   = (state == S_HALT);
  assign iack     = (state == S_TRAP) && (tt_q[7:4] == 4'h1);

  // the bus address stays stable while a cycle is in progress
  logic        prev_open;   // a cycle was open in the previous clock
  logic [31:0] prev_addr;
  always_ff @(posedge clk) begin
    if (rst) begin
      prev_open <= 1'b0;
      prev_addr <= '0;
    end else begin
      prev_open <= bus_as && !bus_dtack && !bus_err;
      prev_addr <= bus_addr;
    end
  end
  always_comb begin
    if (!rst && bus_as && prev_open)
      assert (bus_addr == prev_addr) else $error("integer_unit: address changed during a bus cycle");
  end
endmodule
