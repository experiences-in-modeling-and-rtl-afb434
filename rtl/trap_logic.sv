// trap_logic: selects the trap to service.
//
// Inputs are the eleven trap lines of the trap table, the trap-instruction
// line with its 7-bit number, and the interrupt request from irq_logic.
// TRAP_FOUND is 1 when any of them is set; TRAP_TYPE is the type of the
// highest-priority one. Priorities and types of the eleven lines are the
// document's trap table (lower priority number wins: data store error first,
// division by zero last). The trap instruction (type 0x80 + number) ranks
// below them and an interrupt below everything: that ordering is SPARC's,
// chosen here because the document does not place them. Combinational.
module trap_logic
  import alfa_pkg::*;
(
  input  trap_lines_t traps,
  input  logic        trap_inst,
  input  logic [6:0]  trap_num,
  input  logic        irq_tf,
  input  logic [7:0]  irq_tt,
  output logic        trap_found,
  output logic [7:0]  trap_type
);
  always_comb begin
    trap_found = 1'b1;
    if      (traps.data_st_err)    trap_type = TT_DATA_ST_ERR;
    else if (traps.inst_acc_err)   trap_type = TT_INST_ACC_ERR;
    else if (traps.inst_acc_excep) trap_type = TT_INST_ACC_EXCEP;
    else if (traps.priv_inst)      trap_type = TT_PRIV_INST;
    else if (traps.illeg_inst)     trap_type = TT_ILLEG_INST;
    else if (traps.win_over)       trap_type = TT_WIN_OVER;
    else if (traps.win_under)      trap_type = TT_WIN_UNDER;
    else if (traps.addr_not_align) trap_type = TT_ADDR_NOT_ALIGN;
    else if (traps.data_acc_err)   trap_type = TT_DATA_ACC_ERR;
    else if (traps.data_acc_excep) trap_type = TT_DATA_ACC_EXCEP;
    else if (traps.div_zero)       trap_type = TT_DIV_ZERO;
    else if (trap_inst)            trap_type = TT_TRAP_INST_BASE | {1'b0, trap_num};
    else if (irq_tf)               trap_type = irq_tt;
    else begin
      trap_found = 1'b0;
      trap_type  = 8'h00;
    end
  end
endmodule
