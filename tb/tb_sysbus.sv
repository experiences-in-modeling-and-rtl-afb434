// tb_sysbus: test of the shared bus with three masters and two slaves.
// Masters request at random and, once they own the bus, run cycles of random
// length. Each clock the testbench checks: at most one owner; ownership as a
// model of the BGRANT daisy chain predicts (the chain starts at master 0,
// which has the highest priority, and stops at the first requesting master); the
// bus carries the owner's strobe, address and data; DTACK/ERR and the ORed
// read data reach only the owner. A directed case shows master 0 taking the bus
// before master 2 when both request together.
module tb_sysbus;
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
  localparam int NM = 3, NS = 2;
  logic [NM-1:0]       m_req, m_as, m_rd_wr, m_grant, m_dtack, m_err;
  logic [NM-1:0][31:0] m_addr, m_wdata;
  logic [NM-1:0][3:0]  m_bsel;
  logic [31:0]         m_rdata;
  logic [NS-1:0]       s_dtack, s_err;
  logic [NS-1:0][31:0] s_rdata;
  logic                b_as, b_rd_wr, b_busy, b_dtack, b_err;
  logic [31:0]         b_addr, b_wdata;
  logic [3:0]          b_bsel;
  logic [NM-1:0]       owned;   // model
  int                  grants [NM];

  sysbus #(.NM(NM), .NS(NS)) dut (
    .clk(clk), .rst(rst), .m_req(m_req), .m_as(m_as), .m_rd_wr(m_rd_wr), .m_addr(m_addr),
    .m_wdata(m_wdata), .m_bsel(m_bsel), .m_grant(m_grant), .m_dtack(m_dtack), .m_err(m_err),
    .m_rdata(m_rdata), .s_dtack(s_dtack), .s_err(s_err), .s_rdata(s_rdata),
    .b_as(b_as), .b_rd_wr(b_rd_wr), .b_addr(b_addr), .b_wdata(b_wdata), .b_bsel(b_bsel),
    .b_busy(b_busy), .b_dtack(b_dtack), .b_err(b_err));

  // model of the daisy chain, evaluated before a clock edge
  function automatic logic [NM-1:0] next_owned(input logic [NM-1:0] own, input logic [NM-1:0] req,
                                                input logic [NM-1:0] as);
    logic g;
    logic busy;
    logic [NM-1:0] n;
    g = 1'b1;
    busy = |own;
    for (int i = 0; i < NM; i++) begin
      if (!own[i]) n[i] = g && req[i] && !busy;
      else         n[i] = !(!as[i] && (!req[i] || !g));
      g = g && !req[i] && !own[i];
    end
    return n;
  endfunction

  initial begin
    m_req = '0; m_as = '0; m_rd_wr = '0; m_addr = '0; m_wdata = '0; m_bsel = '0;
    s_dtack = '0; s_err = '0; s_rdata = '0;
    owned = '0;
    for (int i = 0; i < NM; i++) grants[i] = 0;
    @(posedge clk); #1; rst = 1'b0;
    // directed: masters 0 and 2 request together, 0 wins
    m_req = 3'b101; #1;
    @(posedge clk); #1;
    check("master 0 first", 32'(m_grant), 32'b001);
    m_req = 3'b100; #1;
    @(posedge clk); #1;
    check("master 0 released", 32'(m_grant), 32'b000);
    @(posedge clk); #1;
    check("then master 2", 32'(m_grant), 32'b100);
    m_req = 3'b000; #1;
    @(posedge clk); #1;
    owned = m_grant;
    check("all released", 32'(m_grant), 0);
    for (int k = 0; k < 5000; k++) begin
      logic [NM-1:0] nreq;
      for (int i = 0; i < NM; i++) begin
        // requests are sticky for a while; strobe only while owning
        nreq[i] = (($urandom % 8) == 0) ? !m_req[i] : m_req[i];
        m_as[i] = owned[i] && m_req[i] && 1'($urandom);
        m_addr[i] = $urandom; m_wdata[i] = $urandom; m_bsel[i] = 4'($urandom); m_rd_wr[i] = 1'($urandom);
      end
      m_req = nreq;
      m_as = m_as & m_req;
      s_dtack = NS'($urandom) & {NS{b_as}}; s_err = NS'($urandom % 2 == 0 ? 0 : $urandom) & {NS{b_as}};
      for (int j = 0; j < NS; j++) s_rdata[j] = $urandom;
      #1;
      check("one owner", 32'($onehot0(m_grant)), 1);
      check("owner", 32'(m_grant), 32'(owned));
      check("busy", 32'(b_busy), 32'(|owned));
      begin
        logic [31:0] ea, ew, er;
        logic [3:0] eb;
        logic eas, erw;
        ea = 0; ew = 0; eb = 0; eas = 0; erw = 0; er = 0;
        for (int i = 0; i < NM; i++) if (owned[i]) begin
          ea = m_addr[i]; ew = m_wdata[i]; eb = m_bsel[i]; eas = m_as[i]; erw = m_rd_wr[i];
          grants[i]++;
        end
        for (int j = 0; j < NS; j++) if (s_dtack[j]) er |= s_rdata[j];
        check("bus AS", 32'(b_as), 32'(eas));
        check("bus address", b_addr, ea);
        check("bus data", b_wdata, ew);
        check("bus bsel", 32'(b_bsel), 32'(eb));
        check("bus rd_wr", 32'(b_rd_wr), 32'(erw));
        check("dtack to the owner", 32'(m_dtack), 32'(owned & {NM{|s_dtack}}));
        check("err to the owner", 32'(m_err), 32'(owned & {NM{|s_err}}));
        check("read data", m_rdata, er);
      end
      @(posedge clk);
      owned = next_owned(owned, m_req, m_as);
      #1;
    end
    for (int i = 0; i < NM; i++) check($sformatf("master %0d owned the bus at some time", i), 32'(grants[i] > 0), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
