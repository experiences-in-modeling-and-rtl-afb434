// control_unit: instruction decoder and sequencer of the integer unit.
//
// Decode (combinational): from the instruction register it derives the
// instruction class, the ALU function code and the unit enables, whether rd
// is written, the load/store size and sign, and whether the instruction is
// illegal or privileged (struct ctl_t). The ALU code is IR bits 22..19 for
// arithmetic instructions, XOR for writes of special registers (the written
// value is rs1 xor operand 2) and ADD otherwise. The window pointer is
// incremented for restore and rett and decremented for save (IR bit 19).
// rd is written in the write-back cycle except for branches, stores and
// special-register writes. These rules are the document's control unit.
//
// Sequencing (one state register): RESET -> FETCH (bus read of the
// instruction; waits here for DTACK, like the document's wait-for-memory
// flag) -> EXEC -> [MULDIV: waits for the multiply/divide unit] ->
// [MEM: bus cycle of a load/store, waits for DTACK] -> WB -> FETCH.
// A trap found in any of these goes to TRAP -> TRAP_L1 -> TRAP_L2 -> FETCH
// when traps are enabled (ET = 1) and to HALT (error mode) when not.
// The state names and the split into states are this design's choice.
// Lint: IR bits 13..0 (immediate, rs2, asi) are unused here; the decoder
// needs only op, op2, op3, rd and rs1.
module control_unit
  import alfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ir,
  input  logic        psr_et,
  input  logic        dtack,       // bus cycle done
  input  logic        md_done,
  input  logic        trap_found,
  output cpu_state_e  state,
  output ctl_t        ctl
);
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  logic [4:0] rd, rs1;

  assign op  = ir[31:30];
  assign op2 = ir[24:22];
  assign op3 = ir[24:19];
  assign rd  = ir[29:25];
  assign rs1 = ir[18:14];

  // ------------------------------------------------------------- decoder
  always_comb begin
    ctl          = '0;
    ctl.alu_fcod = ALU_ADD;
    ctl.en_alu   = 1'b1;
    ctl.incdec_fcod = ir[19];
    unique case (op)
      OP_FMT2: begin
        if (op2 == OP2_SETHI)     begin ctl.is_sethi = 1'b1; ctl.c_en = 1'b1; end
        else if (op2 == OP2_BICC) ctl.is_bicc = 1'b1;
        else                      ctl.illegal = 1'b1;   // unimp and the rest
      end
      OP_CALL: begin
        ctl.is_call = 1'b1;
        ctl.c_en    = 1'b1;                              // %o7 <- PC
      end
      OP_ARITH: begin
        if (op3[5] == 1'b0) begin
          // arithmetic / logic / multiply / divide, op3[4] = set cc
          ctl.set_cc   = op3[4];
          ctl.alu_fcod = op3[3:0];
          ctl.c_en     = 1'b1;
          unique case (op3[3:0])
            4'h0, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h8, 4'hC:
              ctl.is_alu = 1'b1;
            4'hA, 4'hB, 4'hE, 4'hF: begin
              ctl.is_md  = 1'b1;
              ctl.en_md  = 1'b1;
              ctl.en_alu = 1'b0;
            end
            default: begin ctl.illegal = 1'b1; ctl.c_en = 1'b0; end
          endcase
        end else begin
          unique case (op3)
            OP3_SLL, OP3_SRL, OP3_SRA: begin
              ctl.is_shf = 1'b1; ctl.en_shf = 1'b1; ctl.en_alu = 1'b0;
              ctl.alu_fcod = op3[3:0];
              ctl.c_en = 1'b1;
            end
            OP3_RDY: begin
              ctl.is_rdsp = 1'b1; ctl.c_en = 1'b1;
              if (rs1 != 5'd0 && rs1 != ASR_BASE && rs1 != ASR_LIMIT) ctl.illegal = 1'b1;
              ctl.priv = (rs1 != 5'd0);
            end
            OP3_RDPSR, OP3_RDWIM, OP3_RDTBR: begin
              ctl.is_rdsp = 1'b1; ctl.c_en = 1'b1; ctl.priv = 1'b1;
            end
            OP3_WRY: begin
              ctl.is_wrsp = 1'b1; ctl.alu_fcod = ALU_XOR;
              if (rd != 5'd0 && rd != ASR_BASE && rd != ASR_LIMIT) ctl.illegal = 1'b1;
              ctl.priv = (rd != 5'd0);
            end
            OP3_WRPSR, OP3_WRWIM, OP3_WRTBR: begin
              ctl.is_wrsp = 1'b1; ctl.alu_fcod = ALU_XOR; ctl.priv = 1'b1;
            end
            OP3_JMPL:    begin ctl.is_jmpl = 1'b1; ctl.c_en = 1'b1; end
            OP3_RETT:    begin ctl.is_rett = 1'b1; ctl.priv = 1'b1; end
            OP3_TICC:    ctl.is_ticc = 1'b1;
            OP3_SAVE:    begin ctl.is_save = 1'b1; ctl.c_en = 1'b1; end
            OP3_RESTORE: begin ctl.is_restore = 1'b1; ctl.c_en = 1'b1; end
            default:     ctl.illegal = 1'b1;
          endcase
        end
      end
      default: begin // OP_MEM
        unique case (op3)
          OP3_LD:   begin ctl.is_load = 1'b1; ctl.size = SZ_WORD; end
          OP3_LDUB: begin ctl.is_load = 1'b1; ctl.size = SZ_BYTE; end
          OP3_LDUH: begin ctl.is_load = 1'b1; ctl.size = SZ_HALF; end
          OP3_LDSB: begin ctl.is_load = 1'b1; ctl.size = SZ_BYTE; ctl.ld_sign = 1'b1; end
          OP3_LDSH: begin ctl.is_load = 1'b1; ctl.size = SZ_HALF; ctl.ld_sign = 1'b1; end
          OP3_ST:   begin ctl.is_store = 1'b1; ctl.size = SZ_WORD; end
          OP3_STB:  begin ctl.is_store = 1'b1; ctl.size = SZ_BYTE; end
          OP3_STH:  begin ctl.is_store = 1'b1; ctl.size = SZ_HALF; end
          default:  ctl.illegal = 1'b1;
        endcase
        ctl.c_en = ctl.is_load;
      end
    endcase
    if (ctl.illegal) ctl.c_en = 1'b0;
  end

  // ----------------------------------------------------------- sequencer
  cpu_state_e nxt;
  cpu_state_e trap_or_halt;
  assign trap_or_halt = psr_et ? S_TRAP : S_HALT;

  always_comb begin
    nxt = state;
    unique case (state)
      S_RESET:   nxt = S_FETCH;
      S_FETCH:   if (trap_found) nxt = trap_or_halt; else if (dtack) nxt = S_EXEC;
      S_EXEC:    if (trap_found)                        nxt = trap_or_halt;
                 else if (ctl.is_md)                    nxt = S_MULDIV;
                 else if (ctl.is_load || ctl.is_store)  nxt = S_MEM;
                 else                                   nxt = S_WB;
      S_MULDIV:  if (trap_found) nxt = trap_or_halt; else if (md_done) nxt = S_WB;
      S_MEM:     if (trap_found) nxt = trap_or_halt; else if (dtack) nxt = S_WB;
      S_WB:      if (trap_found) nxt = trap_or_halt; else nxt = S_FETCH;
      S_TRAP:    nxt = S_TRAP_L1;
      S_TRAP_L1: nxt = S_TRAP_L2;
      S_TRAP_L2: nxt = S_FETCH;
      S_HALT:    nxt = S_HALT;
      default:   nxt = S_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= nxt;
  end
endmodule
