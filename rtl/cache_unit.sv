// cache_unit: the external cache between the integer unit and the bus.
//
// Couples the parts of the cache: the directory (tags), the validity
// control (valid bits), the memory bank (data) and the bus interface; the
// processor interface and the hit/miss control are in this module.
// The integer unit sees the cache as its bus: its request is granted at
// once (cpu_grant is cpu_req passed through) and every strobe (AS) is
// answered with DTACK or ERR.
//  * Read hit (line valid and tag equal): DTACK with the bank word one
//    clock after AS; no bus cycle.
//  * Read miss: the bus interface is opened for a word read; its data
//    fills the line (bank, tag, valid) and goes to the processor.
//  * Write: written through to the bus; on a hit the bank lanes of BSEL
//    are updated too; a write miss does not fill the line.
//  * Addresses above CACHE_TOP (the memory-mapped devices) and accesses
//    that end in a bus error are never cached.
// HIT and MISS pulse for one clock per cached read, for statistics.
// Interface: processor side cpu_*, bus master side bus_*.
// Timing: a hit takes 2 clocks from AS to the end of the access; a miss
// or write takes the bus cycle plus 1 clock.
// The parts and their connections follow the document's Figure 5; the size
// (LINES one-word lines), direct mapping, write-through policy and the
// uncached device window are this design's choices, since the document does
// not give them. The cache does not watch writes of other bus masters, so
// those must not touch cached words the processor will read again.
module cache_unit #(
  parameter int          LINES     = 64,
  parameter logic [31:0] CACHE_TOP = 32'h7FFF_FFFF
) (
  input  logic        clk,
  input  logic        rst,
  // processor interface
  input  logic        cpu_req,
  output logic        cpu_grant,
  input  logic        cpu_as,
  input  logic        cpu_rd_wr,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic [3:0]  cpu_bsel,
  output logic [31:0] cpu_rdata,
  output logic        cpu_dtack,
  output logic        cpu_err,
  // bus interface
  output logic        bus_req,
  input  logic        bus_grant,
  output logic        bus_as,
  output logic        bus_rd_wr,
  output logic [31:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic [3:0]  bus_bsel,
  input  logic [31:0] bus_rdata,
  input  logic        bus_dtack,
  input  logic        bus_err,
  // statistics
  output logic        hit,
  output logic        miss
);
  localparam int IDX_W = $clog2(LINES);
  localparam int TAG_W = 30 - IDX_W;

  typedef enum logic [1:0] { C_IDLE, C_HIT, C_BUS } cache_state_e;
  cache_state_e st;

  logic [IDX_W-1:0] index;
  logic [TAG_W-1:0] tag;
  logic             tag_eq, valid, cacheable, lookup_hit;
  logic [31:0]      bank_q, bank_d;
  logic [3:0]       bank_bsel;
  logic             bank_we, fill;
  logic             bif_start, bif_done, bif_err;
  logic [31:0]      bif_rdata;
  logic [31:0]      hit_data;

  assign index      = cpu_addr[2 +: IDX_W];
  assign tag        = cpu_addr[31 -: TAG_W];
  assign cacheable  = (cpu_addr <= CACHE_TOP);
  assign lookup_hit = cacheable && valid && tag_eq;

  cache_directory #(.LINES(LINES), .TAG_W(TAG_W)) u_dir (
    .clk(clk), .rst(rst), .index(index), .tag_in(tag), .we(fill), .hit(tag_eq)
  );
  cache_validity_control #(.LINES(LINES)) u_valid (
    .clk(clk), .rst(rst), .index(index), .set(fill), .invalidate(1'b0), .valid(valid)
  );
  cache_memory_bank #(.LINES(LINES)) u_bank (
    .clk(clk), .rst(rst), .index(index), .we(bank_we), .bsel(bank_bsel),
    .wdata(bank_d), .rdata(bank_q)
  );
  cache_bus_interface u_bif (
    .clk(clk), .rst(rst), .start(bif_start), .rd_wr(cpu_rd_wr), .addr(cpu_addr),
    .wdata(cpu_wdata), .bsel(cpu_bsel), .done(bif_done), .rdata(bif_rdata), .err_out(bif_err),
    .bus_req(bus_req), .bus_grant(bus_grant), .bus_as(bus_as), .bus_rd_wr(bus_rd_wr),
    .bus_addr(bus_addr), .bus_wdata(bus_wdata), .bus_bsel(bus_bsel),
    .bus_rdata(bus_rdata), .bus_dtack(bus_dtack), .bus_err(bus_err)
  );

  // a cached read that missed fills its line; a write hit updates its lanes
  assign fill      = (st == C_BUS) && bif_done && !bif_err && cpu_rd_wr && cacheable;
  assign bank_we   = fill || ((st == C_BUS) && bif_done && !bif_err && !cpu_rd_wr && lookup_hit);
  assign bank_bsel = fill ? 4'b1111 : cpu_bsel;
  assign bank_d    = fill ? bif_rdata : cpu_wdata;
  assign bif_start = (st == C_IDLE) && cpu_as && !(cpu_rd_wr && lookup_hit);

  always_ff @(posedge clk) begin
    hit  <= 1'b0;
    miss <= 1'b0;
    if (rst) begin
      st       <= C_IDLE;
      hit_data <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (cpu_as) begin
          if (cpu_rd_wr && lookup_hit) begin
            hit_data <= bank_q;
            hit      <= 1'b1;
            st       <= C_HIT;
          end else begin
            miss <= cpu_rd_wr && cacheable;
            st   <= C_BUS;
          end
        end
        C_HIT:   st <= C_IDLE;
        C_BUS:   if (bif_done) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  assign cpu_grant = cpu_req;
  assign cpu_dtack = (st == C_HIT) || ((st == C_BUS) && bif_done && !bif_err);
  assign cpu_err   = (st == C_BUS) && bif_done && bif_err;
  assign cpu_rdata = (st == C_HIT) ? hit_data : bif_rdata;
endmodule
