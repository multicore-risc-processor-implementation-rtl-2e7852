// multicore_top: the dual-core MIPS system.
//
// Two pipelined cores, each with private instruction and data caches, share
// a 1 KiB main memory (512-byte instruction segment, 512-byte data segment)
// through the bus system, which arbitrates block transfers and keeps the data
// caches coherent with the MESI protocol. Core c starts fetching at
// RESET_PC[c]; both see the same instruction segment, so one program image
// can hold a separate entry point per core.
//
// The load port (ld_*) writes main memory while the system is held in reset;
// the debug port reads a word of the data segment. The per-core signals
// memwrite/memread/dataadr/writedata show each core's completed data
// accesses, halted rises when a core has executed hlt, and retire pulses per
// completed instruction. The two-core organisation follows the document;
// the per-core start addresses and the load/debug ports are this design's.
module multicore_top
  import mips_pkg::*;
#(
  parameter int unsigned NCORES            = 2,
  parameter logic [31:0] RESET_PC [NCORES] = '{32'h000, 32'h100},
  parameter int unsigned SEG_BYTES         = 512,
  parameter int unsigned MEM_LATENCY       = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ld_we,
  input  logic              ld_seg,
  input  logic [31:0]       ld_addr,
  input  logic [31:0]       ld_data,
  input  logic [31:0]       dbg_addr,
  output logic [31:0]       dbg_data,
  output logic [NCORES-1:0] halted,
  output logic [NCORES-1:0] memwrite,
  output logic [NCORES-1:0] memread,
  output logic [31:0]       dataadr   [NCORES],
  output logic [31:0]       writedata [NCORES],
  output logic [NCORES-1:0] retire
);
  ic2bus_t  ic_req [NCORES];
  bus2ic_t  ic_rsp [NCORES];
  mem_req_t icm_req [NCORES];
  mem_rsp_t icm_rsp [NCORES];
  dc2bus_t  dc_req [NCORES];
  bus2dc_t  dc_rsp [NCORES];
  mem_req_t dcm_req [NCORES];
  mem_rsp_t dcm_rsp [NCORES];
  snoop_t   snp [NCORES];
  logic [31:0] snp_addr;
  mesi_e    snp_state [NCORES];
  logic     wb_done [NCORES];
  mem_req_t imem_req, dmem_req;
  mem_rsp_t imem_rsp, dmem_rsp;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    mips_core #(.RESET_PC(RESET_PC[c])) u_core (
      .clk, .rst,
      .ic_bus_o(ic_req[c]), .ic_bus_i(ic_rsp[c]), .ic_mem_o(icm_req[c]), .ic_mem_i(icm_rsp[c]),
      .dc_bus_o(dc_req[c]), .dc_bus_i(dc_rsp[c]), .dc_mem_o(dcm_req[c]), .dc_mem_i(dcm_rsp[c]),
      .snp_i(snp[c]), .snp_addr, .snp_state(snp_state[c]), .wb_done(wb_done[c]),
      .halted(halted[c]), .memwrite(memwrite[c]), .memread(memread[c]),
      .dataadr(dataadr[c]), .writedata(writedata[c]), .retire(retire[c])
    );
  end

  bus_system #(.NCORES(NCORES)) u_bus (
    .clk, .rst,
    .ic_i(ic_req), .ic_o(ic_rsp), .icm_i(icm_req), .icm_o(icm_rsp),
    .dc_i(dc_req), .dc_o(dc_rsp), .dcm_i(dcm_req), .dcm_o(dcm_rsp),
    .snp_o(snp), .snp_addr, .snp_state, .wb_done,
    .imem_o(imem_req), .imem_i(imem_rsp), .dmem_o(dmem_req), .dmem_i(dmem_rsp)
  );

  main_memory #(.SEG_BYTES(SEG_BYTES), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst,
    .i_req(imem_req), .i_rsp(imem_rsp), .d_req(dmem_req), .d_rsp(dmem_rsp),
    .ld_we, .ld_seg, .ld_addr, .ld_data, .dbg_addr, .dbg_data
  );
endmodule
