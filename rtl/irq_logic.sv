// irq_logic: interrupt request masking and priority.
//
// IRQ[i-1] is interrupt line i (IRQ1..IRQ15). Lines whose number is greater
// than the Processor Interrupt Level PIL are pending; TF is 1 when any is
// pending and TT = 0x10 + the highest pending line number. Combinational; the
// integer unit samples TF at instruction boundaries when traps are enabled.
// Masking by PIL and "highest level wins" are the document's; the trap type
// base 0x10 is SPARC's.
module irq_logic
  import alfa_pkg::*;
(
  input  logic [15:1] irq,
  input  logic [3:0]  pil,
  output logic        tf,
  output logic [7:0]  tt
);
  logic [3:0] lvl;
  always_comb begin
    lvl = 4'd0;
    for (int i = 1; i <= 15; i++)
      if (irq[i] && 4'(i) > pil) lvl = 4'(i);
  end
  assign tf = (lvl != 4'd0);
  assign tt = tf ? (TT_IRQ_BASE | {4'd0, lvl}) : 8'h00;
endmodule
