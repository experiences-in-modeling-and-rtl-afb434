// sysbus: the system bus with its daisy-chained bus grant.
//
// NM masters, master 0 of highest priority; the CPU is connected as the last
// one. The grant starts as a constant 1 at master 0 and passes from cell to
// cell (bus_grant_cell) until it reaches a requesting master. The owner's
// AS, RD_WR, ADDRESS, DATA and BSEL are placed on the shared bus; BUSY is 1
// while any master owns it. NS slaves answer with DTACK, ERR and read DATA,
// which are merged (ORed, read data taken from the slave giving DTACK) and
// returned to the owning master only. Masters must raise AS only while they
// own the bus; an assertion checks it. Combinational apart from the grant
// cells. The chain, BUSY and the signal set are the document's bus; merging
// by OR is this design's choice.
// Lint: the grant leaving the last (lowest-priority) master is unused; no
// master sits below the CPU in the chain.
module sysbus #(
  parameter int NM = 2,
  parameter int NS = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  // masters
  input  logic [NM-1:0]        m_req,
  input  logic [NM-1:0]        m_as,
  input  logic [NM-1:0]        m_rd_wr,
  input  logic [NM-1:0][31:0]  m_addr,
  input  logic [NM-1:0][31:0]  m_wdata,
  input  logic [NM-1:0][3:0]   m_bsel,
  output logic [NM-1:0]        m_grant,
  output logic [NM-1:0]        m_dtack,
  output logic [NM-1:0]        m_err,
  output logic [31:0]          m_rdata,
  // slaves
  input  logic [NS-1:0]        s_dtack,
  input  logic [NS-1:0]        s_err,
  input  logic [NS-1:0][31:0]  s_rdata,
  // shared bus
  output logic                 b_as,
  output logic                 b_rd_wr,
  output logic [31:0]          b_addr,
  output logic [31:0]          b_wdata,
  output logic [3:0]           b_bsel,
  output logic                 b_busy,
  output logic                 b_dtack,
  output logic                 b_err
);
  logic [NM:0] bgrant;
  assign bgrant[0] = 1'b1;

  for (genvar i = 0; i < NM; i++) begin : g_cell
    bus_grant_cell u_cell (
      .clk(clk), .rst(rst), .bgrant_in(bgrant[i]), .req(m_req[i]),
      .as(m_as[i]), .busy(b_busy), .bgrant_out(bgrant[i+1]), .owned(m_grant[i])
    );
  end

  always_comb begin
    b_busy  = |m_grant;
    b_as    = 1'b0;
    b_rd_wr = 1'b0;
    b_addr  = '0;
    b_wdata = '0;
    b_bsel  = '0;
    for (int i = 0; i < NM; i++) begin
      if (m_grant[i]) begin
        b_as    |= m_as[i];
        b_rd_wr |= m_rd_wr[i];
        b_addr  |= m_addr[i];
        b_wdata |= m_wdata[i];
        b_bsel  |= m_bsel[i];
      end
    end
    b_dtack = |s_dtack;
    b_err   = |s_err;
    m_rdata = '0;
    for (int j = 0; j < NS; j++)
      if (s_dtack[j]) m_rdata |= s_rdata[j];
    m_dtack = m_grant & {NM{b_dtack}};
    m_err   = m_grant & {NM{b_err}};
  end

  // a master strobes only while it owns the bus, and at most one owns it
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ((m_as & ~m_grant) == '0) else $error("sysbus: AS without grant");
      assert ($onehot0(m_grant)) else $error("sysbus: two bus owners");
    end
  end
endmodule
