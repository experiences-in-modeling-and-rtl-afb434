// memory: main memory as a bus slave.
//
// MEM_BYTES of byte-addressed storage held as 32-bit words, big-endian within
// the word (address offset 0 is bits 31..24). A cycle starts when AS (the
// chip-select of this memory) is sampled high. LATENCY cycles later the memory
// either completes it, with a one-cycle DTACK pulse, or refuses it with a
// one-cycle ERR pulse if the address lies beyond MEM_BYTES. A read (RD_WR = 1)
// returns the addressed word on RDATA, valid in the DTACK cycle and 0
// otherwise; a write (RD_WR = 0) stores the byte lanes of WDATA enabled by
// BSEL. After DTACK/ERR the memory waits for AS to fall before it accepts a
// new cycle. The master must hold ADDR, RD_WR, BSEL and WDATA while AS is high.
// The read/write/strobe/acknowledge/error behaviour and the default size are
// the document's; latency, RD_WR polarity and the AS-release rule are this
// design's choice. Reset clears the control state but not the contents.
module memory #(
  parameter int MEM_BYTES = 32768,
  parameter int LATENCY   = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        as,
  input  logic        rd_wr,
  input  logic [31:0] addr,
  input  logic [3:0]  bsel,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        dtack,
  output logic        err
);
  localparam int WORDS = MEM_BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  typedef enum logic [1:0] { M_IDLE, M_BUSY, M_HOLD } mstate_e;
  mstate_e     st;
  logic [7:0]  cnt;
  logic [AW-1:0] widx;
  logic        bad;

  assign widx = addr[AW+1:2];
  assign bad  = (addr >= 32'(MEM_BYTES));

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= M_IDLE;
      cnt   <= '0;
      dtack <= 1'b0;
      err   <= 1'b0;
      rdata <= '0;
    end else begin
      dtack <= 1'b0;
      err   <= 1'b0;
      rdata <= '0;
      unique case (st)
        M_IDLE: if (as) begin
          cnt <= 8'(LATENCY - 1);
          st  <= M_BUSY;
        end
        M_BUSY: begin
          if (!as) begin
            st <= M_IDLE;                   // master gave up
          end else if (cnt == 8'd0) begin
            st <= M_HOLD;
            if (bad) begin
              err <= 1'b1;
            end else begin
              dtack <= 1'b1;
              if (rd_wr) rdata <= mem[widx];
              else begin
                for (int b = 0; b < 4; b++)
                  if (bsel[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
              end
            end
          end else begin
            cnt <= cnt - 8'd1;
          end
        end
        M_HOLD: if (!as) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
