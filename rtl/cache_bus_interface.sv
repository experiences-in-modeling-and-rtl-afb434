// cache_bus_interface: the cache's connection to the system bus.
//
// When the cache unit opens it (START, with the address, direction, data and
// byte selects), the interface runs one bus cycle as a bus master: it
// requests the bus, waits for the grant, raises AS with the latched
// signals, waits for DTACK or ERR, then drops AS and the request. DONE
// pulses for one clock with the read data (RDATA) and ERR_OUT; the interface
// is then closed again. A START while a cycle is open is ignored.
// Timing: at least 3 clocks (request, strobe, acknowledge) plus the slave's
// latency. The open/close bus interface is the document's; the handshake is
// that of the other bus masters of this design.
module cache_bus_interface (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        rd_wr,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  bsel,
  output logic        done,
  output logic [31:0] rdata,
  output logic        err_out,
  // bus master port
  output logic        bus_req,
  input  logic        bus_grant,
  output logic        bus_as,
  output logic        bus_rd_wr,
  output logic [31:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic [3:0]  bus_bsel,
  input  logic [31:0] bus_rdata,
  input  logic        bus_dtack,
  input  logic        bus_err
);
  typedef enum logic [1:0] { B_IDLE, B_REQ, B_CYCLE } bif_state_e;
  bif_state_e st;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      st        <= B_IDLE;
      bus_req   <= 1'b0;
      bus_as    <= 1'b0;
      bus_rd_wr <= 1'b1;
      bus_addr  <= '0;
      bus_wdata <= '0;
      bus_bsel  <= '0;
      rdata     <= '0;
      err_out   <= 1'b0;
    end else begin
      unique case (st)
        B_IDLE: if (start) begin
          bus_req   <= 1'b1;
          bus_rd_wr <= rd_wr;
          bus_addr  <= addr;
          bus_wdata <= wdata;
          bus_bsel  <= bsel;
          st        <= B_REQ;
        end
        B_REQ: if (bus_grant) begin
          bus_as <= 1'b1;
          st     <= B_CYCLE;
        end
        B_CYCLE: if (bus_dtack || bus_err) begin
          bus_as  <= 1'b0;
          bus_req <= 1'b0;
          rdata   <= bus_rdata;
          err_out <= bus_err;
          done    <= 1'b1;
          st      <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
