// tb_bus_grant_cell: test of one link of the BGRANT daisy chain. A master
// that does not request passes the grant on; a requesting master with the
// grant and a free bus takes the bus (owned) and blocks the grant; it keeps the
// bus during its cycle and while it still requests with the grant; it frees it
// when it stops requesting or loses the grant, once its strobe is low.
module tb_bus_grant_cell;
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
  logic gin, req, as, busy, gout, owned;
  bus_grant_cell dut (.clk(clk), .rst(rst), .bgrant_in(gin), .req(req), .as(as), .busy(busy),
                      .bgrant_out(gout), .owned(owned));

  initial begin
    logic m_owned;
    gin = 1'b0; req = 1'b0; as = 1'b0; busy = 1'b0;
    @(posedge clk); #1; rst = 1'b0;
    check("not owned after reset", 32'(owned), 0);
    gin = 1'b1; #1; check("grant passed on", 32'(gout), 1);
    req = 1'b1; busy = 1'b1; #1; check("grant stopped by request", 32'(gout), 0);
    @(posedge clk); #1; check("busy bus not taken", 32'(owned), 0);
    busy = 1'b0; @(posedge clk); #1; check("bus taken", 32'(owned), 1);
    busy = 1'b1; as = 1'b1; gin = 1'b0; @(posedge clk); #1; check("kept during the cycle", 32'(owned), 1);
    as = 1'b0; @(posedge clk); #1; check("released after losing the grant", 32'(owned), 0);
    // random against a model
    m_owned = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      gin = 1'($urandom); req = 1'($urandom); as = m_owned && 1'($urandom); busy = m_owned || (($urandom % 4) == 0);
      #1;
      check("grant out", 32'(gout), 32'(gin && !req && !m_owned));
      @(posedge clk);
      if (!m_owned) m_owned = gin && req && !busy;
      else if (!as && (!req || !gin)) m_owned = 1'b0;
      #1;
      check("owned", 32'(owned), 32'(m_owned));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
