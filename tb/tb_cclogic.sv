// tb_cclogic: test of the branch condition logic. All 16 Bicc conditions
// (ba, bn, be, bne, bg, ble, bge, bl, bgu, bleu, bcc, bcs, bpos, bneg, bvc,
// bvs) for all 16 values of N, Z, V, C, against the SPARC condition table.
module tb_cclogic;
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
  logic [3:0] cond;
  logic       n, z, v, c, r;
  cclogic dut (.carry(c), .zero(z), .negat(n), .ovflw(v), .cond(cond), .res(r));

  function automatic logic model(input logic [3:0] cd, input logic n, z, v, c);
    case (cd)
      4'h8: return 1'b1;              // ba
      4'h0: return 1'b0;              // bn
      4'h9: return !z;                // bne
      4'h1: return z;                 // be
      4'hA: return !(z || (n ^ v));   // bg
      4'h2: return z || (n ^ v);      // ble
      4'hB: return !(n ^ v);          // bge
      4'h3: return n ^ v;             // bl
      4'hC: return !(c || z);         // bgu
      4'h4: return c || z;            // bleu
      4'hD: return !c;                // bcc
      4'h5: return c;                 // bcs
      4'hE: return !n;                // bpos
      4'h6: return n;                 // bneg
      4'hF: return !v;                // bvc
      default: return v;              // bvs
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        cond = 4'(i); {n, z, v, c} = 4'(j);
        #1;
        check($sformatf("cond %h icc %h", i, j), 64'(r), 64'(model(cond, n, z, v, c)));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
