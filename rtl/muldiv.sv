// muldiv: multiply / divide unit.
//
// FCOD = {divide, signed}. A pulse on START latches the operands.
// Multiply: OPA * OPB as a 64-bit product, the high 32 bits to YOUT and the
// low 32 bits to RES; DONE rises the next cycle.
// Divide: the 64-bit dividend is YIN:OPA, the divisor OPB; the 32-bit quotient
// goes to RES and the remainder to YOUT. A restoring shift-subtract divider
// produces one quotient bit per cycle over the 64 dividend bits, on the
// magnitudes; signs are applied at the end, and DONE rises 66 cycles after
// START. A quotient that does not fit
// in 32 bits saturates (0xFFFFFFFF unsigned, 0x7FFFFFFF / 0x80000000 signed)
// and sets OVFLW. A zero divisor sets DIV_ZERO with DONE on the next cycle and
// leaves the result 0. ZERO and NEGAT describe RES.
// The register use of multiply and divide is the document's; the algorithm,
// the latency and the overflow rule are this design's choice (SPARC-like).
// RES/YOUT/flags are held stable from DONE until the next START.
// Lint: bit 32 of the partial remainder is never read; it only exists so
// the trial subtraction has a borrow bit.
module muldiv
  import alfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [31:0] yin,
  input  logic [1:0]  fcod,
  output logic [31:0] res,
  output logic [31:0] yout,
  output logic        zero,
  output logic        negat,
  output logic        ovflw,
  output logic        done,
  output logic        div_zero
);
  typedef enum logic [1:0] { MD_IDLE, MD_DIV, MD_FIX } md_state_e;
  md_state_e   st;
  logic [63:0] dvd;        // remaining dividend magnitude / quotient bits
  logic [31:0] dvs;        // divisor magnitude
  logic [32:0] rem;        // partial remainder
  logic [6:0]  cnt;
  logic        q_neg, r_neg, sgn;
  logic [63:0] quot;       // 64-bit quotient magnitude
  logic        is_div, is_signed;

  assign is_div    = fcod[1];
  assign is_signed = fcod[0];

  function automatic logic [63:0] abs64(input logic [63:0] v, input logic s);
    return (s && v[63]) ? -v : v;
  endfunction

  logic [63:0] prod;
  assign prod = is_signed ? 64'($signed(opa) * $signed(opb)) : 64'(opa) * 64'(opb);

  logic [32:0] trial;
  assign trial = {rem[31:0], dvd[63]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    done     <= 1'b0;
    if (rst) begin
      st       <= MD_IDLE;
      res      <= '0;
      yout     <= '0;
      ovflw    <= 1'b0;
      div_zero <= 1'b0;
      cnt      <= '0;
      dvd      <= '0;
      dvs      <= '0;
      rem      <= '0;
      quot     <= '0;
      q_neg    <= 1'b0;
      r_neg    <= 1'b0;
      sgn      <= 1'b0;
    end else begin
      unique case (st)
        MD_IDLE: if (start) begin
          div_zero <= 1'b0;
          ovflw    <= 1'b0;
          if (!is_div) begin
            {yout, res} <= prod;
            done        <= 1'b1;
          end else if (opb == 32'd0) begin
            res      <= '0;
            yout     <= yin;
            div_zero <= 1'b1;
            done     <= 1'b1;
          end else begin
            dvd   <= abs64({yin, opa}, is_signed);
            dvs   <= (is_signed && opb[31]) ? -opb : opb;
            q_neg <= is_signed && (yin[31] ^ opb[31]);
            r_neg <= is_signed && yin[31];
            sgn   <= is_signed;
            rem   <= '0;
            quot  <= '0;
            cnt   <= 7'd64;
            st    <= MD_DIV;
          end
        end
        MD_DIV: begin
          if (!trial[32]) begin
            rem  <= trial;
            quot <= {quot[62:0], 1'b1};
          end else begin
            rem  <= {rem[31:0], dvd[63]};
            quot <= {quot[62:0], 1'b0};
          end
          dvd <= {dvd[62:0], 1'b0};
          cnt <= cnt - 7'd1;
          if (cnt == 7'd1) st <= MD_FIX;
        end
        MD_FIX: begin
          st   <= MD_IDLE;
          done <= 1'b1;
          yout <= r_neg ? -rem[31:0] : rem[31:0];
          if (!sgn) begin
            if (quot[63:32] != 32'd0) begin res <= 32'hFFFF_FFFF; ovflw <= 1'b1; end
            else res <= quot[31:0];
          end else if (!q_neg) begin
            if (quot > 64'h7FFF_FFFF) begin res <= 32'h7FFF_FFFF; ovflw <= 1'b1; end
            else res <= quot[31:0];
          end else begin
            if (quot > 64'h8000_0000) begin res <= 32'h8000_0000; ovflw <= 1'b1; end
            else res <= -quot[31:0];
          end
        end
        default: st <= MD_IDLE;
      endcase
    end
  end

  assign zero  = (res == 32'd0);
  assign negat = res[31];
endmodule
