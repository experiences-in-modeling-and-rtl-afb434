// alfa_pkg: types and constants shared by the Alfa-1 integer unit.
//
// The Alfa-1 processor executes a subset of the SPARC V8 integer instruction
// set. This package holds the instruction field encodings (op, op2, op3), the
// ALU / shifter / multiply-divide function codes, the Processor Status Register
// layout (bits 23..20 N Z V C, 11..8 PIL, 7 S, 6 PS, 5 ET, 4..0 CWP), the trap
// types of the trap table and the bus-cycle and instruction-cycle enums.
// The PSR layout and the trap types and priorities follow the document's tables;
// the opcode values are those of SPARC V8.
package alfa_pkg;

  // ---------------------------------------------------------------- formats
  localparam logic [1:0] OP_FMT2  = 2'b00;  // sethi, branches, unimp
  localparam logic [1:0] OP_CALL  = 2'b01;
  localparam logic [1:0] OP_ARITH = 2'b10;
  localparam logic [1:0] OP_MEM   = 2'b11;

  localparam logic [2:0] OP2_UNIMP = 3'b000;
  localparam logic [2:0] OP2_BICC  = 3'b010;
  localparam logic [2:0] OP2_SETHI = 3'b100;

  // op3 of the arithmetic / control group (op = 10)
  localparam logic [5:0] OP3_ADD    = 6'h00;
  localparam logic [5:0] OP3_UMUL   = 6'h0A;
  localparam logic [5:0] OP3_SMUL   = 6'h0B;
  localparam logic [5:0] OP3_UDIV   = 6'h0E;
  localparam logic [5:0] OP3_SDIV   = 6'h0F;
  localparam logic [5:0] OP3_SLL    = 6'h25;
  localparam logic [5:0] OP3_SRL    = 6'h26;
  localparam logic [5:0] OP3_SRA    = 6'h27;
  localparam logic [5:0] OP3_RDY    = 6'h28;  // rs1 = 0: %y, 16: BASE, 17: LIMIT
  localparam logic [5:0] OP3_RDPSR  = 6'h29;
  localparam logic [5:0] OP3_RDWIM  = 6'h2A;
  localparam logic [5:0] OP3_RDTBR  = 6'h2B;
  localparam logic [5:0] OP3_WRY    = 6'h30;  // rd = 0: %y, 16: BASE, 17: LIMIT
  localparam logic [5:0] OP3_WRPSR  = 6'h31;
  localparam logic [5:0] OP3_WRWIM  = 6'h32;
  localparam logic [5:0] OP3_WRTBR  = 6'h33;
  localparam logic [5:0] OP3_JMPL   = 6'h38;
  localparam logic [5:0] OP3_RETT   = 6'h39;
  localparam logic [5:0] OP3_TICC   = 6'h3A;
  localparam logic [5:0] OP3_SAVE   = 6'h3C;
  localparam logic [5:0] OP3_RESTORE= 6'h3D;

  // op3 of the load/store group (op = 11)
  localparam logic [5:0] OP3_LD   = 6'h00;
  localparam logic [5:0] OP3_LDUB = 6'h01;
  localparam logic [5:0] OP3_LDUH = 6'h02;
  localparam logic [5:0] OP3_ST   = 6'h04;
  localparam logic [5:0] OP3_STB  = 6'h05;
  localparam logic [5:0] OP3_STH  = 6'h06;
  localparam logic [5:0] OP3_LDSB = 6'h09;
  localparam logic [5:0] OP3_LDSH = 6'h0A;

  // ASR numbers of the address unit registers
  localparam logic [4:0] ASR_BASE  = 5'd16;
  localparam logic [4:0] ASR_LIMIT = 5'd17;

  // ------------------------------------------------------------ ALU codes
  // FCOD is op3[3:0] of the arithmetic instructions.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0, ALU_AND  = 4'h1, ALU_OR   = 4'h2, ALU_XOR  = 4'h3,
    ALU_SUB  = 4'h4, ALU_ANDN = 4'h5, ALU_ORN  = 4'h6, ALU_XNOR = 4'h7,
    ALU_ADDX = 4'h8, ALU_SUBX = 4'hC
  } alu_op_e;

  // shifter code (op3[1:0] of sll/srl/sra)
  localparam logic [1:0] SH_SLL = 2'b01;
  localparam logic [1:0] SH_SRL = 2'b10;
  localparam logic [1:0] SH_SRA = 2'b11;

  // multiply/divide code {divide, signed}
  localparam logic [1:0] MD_UMUL = 2'b00;
  localparam logic [1:0] MD_SMUL = 2'b01;
  localparam logic [1:0] MD_UDIV = 2'b10;
  localparam logic [1:0] MD_SDIV = 2'b11;

  // load/store sizes used by the aligners
  localparam logic [1:0] SZ_BYTE = 2'd0;
  localparam logic [1:0] SZ_HALF = 2'd1;
  localparam logic [1:0] SZ_WORD = 2'd2;

  // ------------------------------------------------------------------ PSR
  localparam int PSR_N = 23, PSR_Z = 22, PSR_V = 21, PSR_C = 20;
  localparam int PSR_S = 7, PSR_PS = 6, PSR_ET = 5;

  typedef struct packed {
    logic n, z, v, c;
  } icc_t;

  // ---------------------------------------------------------------- traps
  // The eleven trap lines of the trap table, highest priority first.
  typedef struct packed {
    logic data_st_err;     // prio  2, tt 0x2B
    logic inst_acc_err;    // prio  3, tt 0x21
    logic inst_acc_excep;  // prio  5, tt 0x01
    logic priv_inst;       // prio  6, tt 0x03
    logic illeg_inst;      // prio  7, tt 0x02
    logic win_over;        // prio  9, tt 0x05
    logic win_under;       // prio  9, tt 0x06
    logic addr_not_align;  // prio 10, tt 0x07
    logic data_acc_err;    // prio 12, tt 0x29
    logic data_acc_excep;  // prio 13, tt 0x09
    logic div_zero;        // prio 15, tt 0x2A
  } trap_lines_t;

  localparam logic [7:0] TT_INST_ACC_EXCEP = 8'h01;
  localparam logic [7:0] TT_ILLEG_INST     = 8'h02;
  localparam logic [7:0] TT_PRIV_INST      = 8'h03;
  localparam logic [7:0] TT_WIN_OVER       = 8'h05;
  localparam logic [7:0] TT_WIN_UNDER      = 8'h06;
  localparam logic [7:0] TT_ADDR_NOT_ALIGN = 8'h07;
  localparam logic [7:0] TT_DATA_ACC_EXCEP = 8'h09;
  localparam logic [7:0] TT_INST_ACC_ERR   = 8'h21;
  localparam logic [7:0] TT_DATA_ACC_ERR   = 8'h29;
  localparam logic [7:0] TT_DIV_ZERO       = 8'h2A;
  localparam logic [7:0] TT_DATA_ST_ERR    = 8'h2B;
  localparam logic [7:0] TT_IRQ_BASE       = 8'h10;  // + level
  localparam logic [7:0] TT_TRAP_INST_BASE = 8'h80;  // + software trap number

  // ---------------------------------------------------------------- gates
  typedef enum logic [1:0] { GATE_AND, GATE_OR, GATE_NOT, GATE_XOR } gate_e;

  // ------------------------------------------------------ instruction cycle
  typedef enum logic [3:0] {
    S_RESET,     // leave reset
    S_FETCH,     // bus read of the instruction at PC
    S_EXEC,      // decode, read registers, compute
    S_MULDIV,    // wait for the multiply/divide unit
    S_MEM,       // bus read/write of a load/store
    S_WB,        // write back, update PC/nPC
    S_TRAP,      // trap entry: PSR and TBR update, CWP - 1
    S_TRAP_L1,   // trap entry: l1 <- PC
    S_TRAP_L2,   // trap entry: l2 <- nPC, PC <- TBR
    S_HALT       // error mode
  } cpu_state_e;

  // decoded instruction, produced by the control unit
  typedef struct packed {
    logic       is_alu;      // add/sub/logic (and cc forms)
    logic       is_md;       // umul/smul/udiv/sdiv (and cc forms)
    logic       is_shf;      // sll/srl/sra
    logic       set_cc;      // op3 bit 4 of arithmetic instructions
    logic       is_sethi;
    logic       is_bicc;
    logic       is_call;
    logic       is_jmpl;
    logic       is_rett;
    logic       is_ticc;
    logic       is_save;
    logic       is_restore;
    logic       is_rdsp;     // read y/psr/wim/tbr/base/limit
    logic       is_wrsp;     // write y/psr/wim/tbr/base/limit
    logic       is_load;
    logic       is_store;
    logic       ld_sign;
    logic [1:0] size;        // SZ_BYTE / SZ_HALF / SZ_WORD
    logic       illegal;     // unimp or unknown opcode
    logic       priv;        // needs kernel mode
    logic       c_en;        // writes rd in the write-back cycle
    logic [3:0] alu_fcod;
    logic       en_alu;
    logic       en_md;
    logic       en_shf;
    logic       incdec_fcod; // 1 increment CWP (restore, rett), 0 decrement
  } ctl_t;

endpackage
