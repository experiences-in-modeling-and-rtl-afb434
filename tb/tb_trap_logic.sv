// tb_trap_logic: test of the trap priority encoder.
// First the document's example: every trap line on at once must give trap
// found and TT = 0x2B (data store error, the highest priority). Then each
// line alone gives its own TT, random sets of lines give the TT of the highest
// priority line, a trap instruction gives 0x80 + number, and an interrupt
// only wins when nothing else is pending.
module tb_trap_logic;
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
  trap_lines_t traps;
  logic        ti, itf, tf;
  logic [6:0]  tn;
  logic [7:0]  itt, tt;
  trap_logic dut (.traps(traps), .trap_inst(ti), .trap_num(tn), .irq_tf(itf), .irq_tt(itt),
                  .trap_found(tf), .trap_type(tt));

  // TT of each trap line, in the priority order of the struct (MSB first)
  localparam logic [7:0] TTS [11] = '{8'h2B, 8'h21, 8'h01, 8'h03, 8'h02, 8'h05, 8'h06, 8'h07, 8'h29, 8'h09, 8'h2A};

  function automatic logic [8:0] model(input logic [10:0] l, input logic ti, input logic [6:0] tn,
                                       input logic itf, input logic [7:0] itt);
    for (int i = 0; i < 11; i++)
      if (l[10 - i]) return {1'b1, TTS[i]};
    if (ti) return {1'b1, 1'b1, tn};
    if (itf) return {1'b1, itt};
    return 9'd0;
  endfunction

  initial begin
    traps = '1; ti = 1'b1; tn = 7'd5; itf = 1'b1; itt = 8'h1F;
    #1;
    check("all lines: trap found", 64'(tf), 64'd1);
    check("all lines: TT", 64'(tt), 64'h2B);
    for (int i = 0; i < 11; i++) begin
      traps = trap_lines_t'(11'(1 << (10 - i))); ti = 1'b0; itf = 1'b0;
      #1;
      check($sformatf("line %0d TT", i), 64'(tt), 64'(TTS[i]));
      check($sformatf("line %0d found", i), 64'(tf), 64'd1);
    end
    traps = '0; ti = 1'b0; itf = 1'b0; #1;
    check("nothing pending", 64'(tf), 64'd0);
    itf = 1'b1; itt = 8'h1A; #1;
    check("irq alone", 64'(tt), 64'h1A);
    ti = 1'b1; tn = 7'h7F; #1;
    check("trap instruction beats irq", 64'(tt), 64'hFF);
    for (int k = 0; k < 3000; k++) begin
      logic [10:0] l;
      l = 11'($urandom) & 11'($urandom) & 11'($urandom);
      traps = trap_lines_t'(l); ti = 1'($urandom); tn = 7'($urandom);
      itf = 1'($urandom); itt = {4'h1, 4'($urandom)};
      #1;
      check("random", 64'({tf, tt}), 64'(model(l, ti, tn, itf, itt)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
