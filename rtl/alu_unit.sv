// alu_unit: the ALU block of the processor.
//
// Ain and Bin feed three units in parallel: the ALU (4-line FCOD, carry in),
// the MUL/DIV unit (two FCOD lines: divide, signed; Y register in and out)
// and the shifter (two FCOD lines). One enable line per unit (en_alu, en_md,
// en_shf) drives the MUX4 that selects the result C out, and the same enables
// drive the small MUX that selects the condition codes CC from the ALU or from
// MUL/DIV (the shifter leaves N/Z from its result, V = C = 0).
// Timing: ALU and shifter results are combinational. For multiply/divide,
// pulse START with en_md set; MD_DONE marks the cycle from which C out, Yout
// and CC hold the MUL/DIV result (they stay until the next START).
// The structure (three units, MUX4, CC MUX, enables) is the document's ALU
// block; which FCOD bits reach MUL/DIV and the shifter is this design's
// choice (bits {2,0} and {1,0}, from the SPARC op3 encoding).
module alu_unit
  import alfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ain,
  input  logic [31:0] bin,
  input  logic        cin,
  input  logic [3:0]  fcod,
  input  logic        en_alu,
  input  logic        en_md,
  input  logic        en_shf,
  input  logic [31:0] yin,
  input  logic        start,
  output logic [31:0] cout,
  output logic [31:0] yout,
  output icc_t        cc,
  output logic        overflow,
  output logic        md_done,
  output logic        div_zero
);
  logic [31:0] alu_res, md_res, shf_res;
  logic        a_c, a_z, a_n, a_v;
  logic        m_z, m_n, m_v;

  alu u_alu (
    .opa(ain), .opb(bin), .fcod(fcod), .cin(cin),
    .res(alu_res), .carry(a_c), .zero(a_z), .negat(a_n), .ovflw(a_v)
  );

  muldiv u_muldiv (
    .clk(clk), .rst(rst), .start(start && en_md),
    .opa(ain), .opb(bin), .yin(yin), .fcod({fcod[2], fcod[0]}),
    .res(md_res), .yout(yout), .zero(m_z), .negat(m_n), .ovflw(m_v),
    .done(md_done), .div_zero(div_zero)
  );

  shifter u_shifter (
    .opa(ain), .opb(bin), .fcod(fcod[1:0]), .res(shf_res)
  );

  // MUX4 of the result (fourth input unused)
  onehot_mux #(.N(4), .W(32)) u_mux4 (
    .d  ({32'd0, shf_res, md_res, alu_res}),
    .sel({1'b0, en_shf, en_md, en_alu}),
    .y  (cout)
  );

  // condition-code MUX
  icc_t alu_cc, md_cc, shf_cc;
  assign alu_cc = '{n: a_n, z: a_z, v: a_v, c: a_c};
  assign md_cc  = '{n: m_n, z: m_z, v: m_v, c: 1'b0};
  assign shf_cc = '{n: shf_res[31], z: (shf_res == 32'd0), v: 1'b0, c: 1'b0};

  onehot_mux #(.N(4), .W(4)) u_ccmux (
    .d  ({4'd0, shf_cc, md_cc, alu_cc}),
    .sel({1'b0, en_shf, en_md, en_alu}),
    .y  (cc)
  );

  assign overflow = cc.v;
endmodule
