// alfa1_top: the Alfa-1 computer.
//
// The integer unit, its external cache, the main memory and the bus that
// joins them:
//  * The integer unit reaches the bus through the cache (cache_unit), which
//    answers read hits itself and writes through; cache_hit / cache_miss
//    pulse once per cached read.
//  * sysbus with two masters: master 0 (highest priority, BGRANT from the
//    constant 1) is an external I/O-device port, master 1 is the cache's bus
//    interface at the end of the grant chain.
//  * Two slaves: the memory, selected by its chip selector (csmem) over the
//    window MEM_BASE..MEM_TOP, and an external slave port for memory-mapped
//    devices, which answers with ext_s_dtack / ext_s_err / ext_s_rdata.
//  * IRQ1..IRQ15 come in from outside; IACK goes out.
// The CPU starts at RESET_PC with traps disabled in kernel mode and halts
// (error mode) when a trap arrives with traps disabled.
// Timing: one clock; a memory access takes MEM_LATENCY cycles from the
// strobe to DTACK. The memory contents are not touched by reset; a
// program is placed in u_mem.mem before reset is released.
// The set of parts, the cache of Figure 5 and the daisy-chained bus are the
// document's (the cache's size and policies are this design's); the
// external ports stand in for I/O devices the document does not describe.
module alfa1_top
  import alfa_pkg::*;
#(
  parameter int          MEM_BYTES   = 32768,
  parameter int          MEM_LATENCY = 2,
  parameter logic [31:0] MEM_BASE    = 32'h0000_0000,
  parameter logic [31:0] MEM_TOP     = 32'h7FFF_FFFF,
  parameter logic [31:0] RESET_PC    = 32'h0000_0020,
  parameter int          CACHE_LINES = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:1] irq,
  output logic        iack,
  // external bus master (I/O device of highest priority)
  input  logic        ext_m_req,
  input  logic        ext_m_as,
  input  logic        ext_m_rd_wr,
  input  logic [31:0] ext_m_addr,
  input  logic [31:0] ext_m_wdata,
  input  logic [3:0]  ext_m_bsel,
  output logic        ext_m_grant,
  output logic        ext_m_dtack,
  output logic        ext_m_err,
  output logic [31:0] ext_m_rdata,
  // external slave (memory-mapped devices) and the shared bus they watch
  input  logic        ext_s_dtack,
  input  logic        ext_s_err,
  input  logic [31:0] ext_s_rdata,
  output logic        bus_as,
  output logic        bus_rd_wr,
  output logic [31:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic [3:0]  bus_bsel,
  output logic        bus_busy,
  output logic        bus_dtack,
  output logic        bus_err,
  // chip selector masks of the memory
  input  logic        cs_mask_we,
  input  logic        cs_mask_sel,
  input  logic [31:0] cs_mask_d,
  // status
  output logic        halted,
  output logic [31:0] dbg_pc,
  output logic [31:0] dbg_psr,
  output logic [7:0]  dbg_tt,
  output logic        dbg_trap,
  output logic        cache_hit,
  output logic        cache_miss
);
  logic        cpu_req, cpu_grant, cpu_as, cpu_rd_wr, cpu_dtack, cpu_err;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata, m_rdata;
  logic [3:0]  cpu_bsel;
  logic        cm_req, cm_grant, cm_as, cm_rd_wr, cm_dtack, cm_err;
  logic [31:0] cm_addr, cm_wdata;
  logic [3:0]  cm_bsel;
  logic [1:0]  m_grant, m_dtack, m_err;
  logic        cs_mem;
  logic [31:0] mem_rdata;
  logic        mem_dtack, mem_err;

  integer_unit #(.RESET_PC(RESET_PC)) u_cpu (
    .clk(clk), .rst(rst),
    .bus_req(cpu_req), .bus_grant(cpu_grant), .bus_as(cpu_as), .bus_rd_wr(cpu_rd_wr),
    .bus_addr(cpu_addr), .bus_wdata(cpu_wdata), .bus_bsel(cpu_bsel),
    .bus_rdata(cpu_rdata), .bus_dtack(cpu_dtack), .bus_err(cpu_err),
    .irq(irq), .iack(iack), .halted(halted),
    .dbg_pc(dbg_pc), .dbg_psr(dbg_psr), .dbg_tt(dbg_tt), .dbg_trap(dbg_trap)
  );

  cache_unit #(.LINES(CACHE_LINES), .CACHE_TOP(MEM_TOP)) u_cache (
    .clk(clk), .rst(rst),
    .cpu_req(cpu_req), .cpu_grant(cpu_grant), .cpu_as(cpu_as), .cpu_rd_wr(cpu_rd_wr),
    .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata), .cpu_bsel(cpu_bsel),
    .cpu_rdata(cpu_rdata), .cpu_dtack(cpu_dtack), .cpu_err(cpu_err),
    .bus_req(cm_req), .bus_grant(cm_grant), .bus_as(cm_as), .bus_rd_wr(cm_rd_wr),
    .bus_addr(cm_addr), .bus_wdata(cm_wdata), .bus_bsel(cm_bsel),
    .bus_rdata(m_rdata), .bus_dtack(cm_dtack), .bus_err(cm_err),
    .hit(cache_hit), .miss(cache_miss)
  );

  sysbus #(.NM(2), .NS(2)) u_bus (
    .clk(clk), .rst(rst),
    .m_req  ({cm_req,   ext_m_req}),
    .m_as   ({cm_as,       ext_m_as}),
    .m_rd_wr({cm_rd_wr, ext_m_rd_wr}),
    .m_addr ({cm_addr,  ext_m_addr}),
    .m_wdata({cm_wdata, ext_m_wdata}),
    .m_bsel ({cm_bsel,  ext_m_bsel}),
    .m_grant(m_grant), .m_dtack(m_dtack), .m_err(m_err), .m_rdata(m_rdata),
    .s_dtack({ext_s_dtack, mem_dtack}),
    .s_err  ({ext_s_err,   mem_err}),
    .s_rdata({ext_s_rdata, mem_rdata}),
    .b_as(bus_as), .b_rd_wr(bus_rd_wr), .b_addr(bus_addr), .b_wdata(bus_wdata),
    .b_bsel(bus_bsel), .b_busy(bus_busy), .b_dtack(bus_dtack), .b_err(bus_err)
  );

  assign cm_grant    = m_grant[1];
  assign cm_dtack    = m_dtack[1];
  assign cm_err      = m_err[1];
  assign ext_m_grant = m_grant[0];
  assign ext_m_dtack = m_dtack[0];
  assign ext_m_err   = m_err[0];
  assign ext_m_rdata = m_rdata;

  chip_selector #(.MAX_INIT(MEM_TOP), .MIN_INIT(MEM_BASE)) u_csmem (
    .clk(clk), .rst(rst), .addr(bus_addr), .as(bus_as),
    .mask_we(cs_mask_we), .mask_sel(cs_mask_sel), .mask_d(cs_mask_d), .cs(cs_mem)
  );

  memory #(.MEM_BYTES(MEM_BYTES), .LATENCY(MEM_LATENCY)) u_mem (
    .clk(clk), .rst(rst), .as(cs_mem), .rd_wr(bus_rd_wr), .addr(bus_addr - MEM_BASE),
    .bsel(bus_bsel), .wdata(bus_wdata), .rdata(mem_rdata), .dtack(mem_dtack), .err(mem_err)
  );
endmodule
