// chip_selector: address decoder for one bus slave.
//
// CS is 1 when the address strobe AS is high and MIN <= ADDR <= MAX. Two
// registers, the MAX and MIN masks, hold the bounds; comparator A compares the
// address with MAX (EQ or LW gives "<= MAX"), comparator B with MIN (not LW
// gives ">= MIN"), and the two results and AS are ANDed. The masks reset to
// MAX_INIT / MIN_INIT and can be reloaded through MASK_WE (MASK_SEL 1 = MAX,
// 0 = MIN). CS is combinational in ADDR and AS. Structure and gates are the
// document's chip selector; the reload port and reset values are this
// design's choice, the document does not say how the masks are set.
// Lint: the EQ output of the MIN comparator is unused, since 'address >= MIN'
// is the inverse of its LW output alone.
module chip_selector
  import alfa_pkg::*;
#(
  parameter logic [31:0] MAX_INIT = 32'h7FFF_FFFF,
  parameter logic [31:0] MIN_INIT = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  input  logic        as,
  input  logic        mask_we,
  input  logic        mask_sel,
  input  logic [31:0] mask_d,
  output logic        cs
);
  logic [31:0] max_mask, min_mask;
  logic        eq_a, lw_a, eq_b, lw_b, le_max, ge_min, in_range;

  latch_reg #(.W(32), .RST_VAL(MAX_INIT)) u_masmax (
    .clk(clk), .rst(rst), .in(mask_d), .ein(mask_we && mask_sel), .clear(1'b0), .out(max_mask));
  latch_reg #(.W(32), .RST_VAL(MIN_INIT)) u_masmin (
    .clk(clk), .rst(rst), .in(mask_d), .ein(mask_we && !mask_sel), .clear(1'b0), .out(min_mask));

  cmp #(.W(32)) u_cmpa (.opa(addr), .opb(max_mask), .eq(eq_a), .lw(lw_a));
  cmp #(.W(32)) u_cmpb (.opa(addr), .opb(min_mask), .eq(eq_b), .lw(lw_b));

  logic_gate #(.KIND(GATE_OR))  u_or   (.op1(eq_a),   .op2(lw_a),   .res(le_max));
  logic_gate #(.KIND(GATE_NOT)) u_not  (.op1(lw_b),   .op2(1'b0),   .res(ge_min));
  logic_gate #(.KIND(GATE_AND)) u_and1 (.op1(le_max), .op2(ge_min), .res(in_range));
  logic_gate #(.KIND(GATE_AND)) u_and2 (.op1(as),     .op2(in_range), .res(cs));
endmodule
