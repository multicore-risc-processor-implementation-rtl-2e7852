// main_memory: the shared 1 KiB main memory of the dual-core system.
//
// Two segments of 512 bytes each, one for instructions and one for data,
// each organised as 32 blocks of 4 words of 4 bytes (the organisation the
// document gives). Each segment has its own port, so instruction fills and
// data transfers can proceed at the same time. A port transfers one word of
// a block per access: block = addr[8:4], word = wsel. Reads are
// combinational; writes happen on the rising edge. Mem_rdy is raised once
// the access has waited LATENCY cycles (a delay counter restarted by
// rst_dly = 1 and after every completed word); with the default LATENCY = 0
// every word completes in the cycle it is presented, which is this design's
// choice since the document gives no memory timing. A load port fills either
// segment (seg 0 = instructions, 1 = data) and a debug port reads the data
// segment; both exist for test and start-up and are this design's addition.
module main_memory
  import mips_pkg::*;
#(
  parameter int unsigned SEG_BYTES = 512,
  parameter int unsigned LATENCY   = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  mem_req_t    i_req,
  output mem_rsp_t    i_rsp,
  input  mem_req_t    d_req,
  output mem_rsp_t    d_rsp,
  input  logic        ld_we,
  input  logic        ld_seg,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data
);
  localparam int unsigned SEG_WORDS = SEG_BYTES / 4;
  localparam int unsigned AW        = $clog2(SEG_WORDS);

  logic [31:0] imem [SEG_WORDS];
  logic [31:0] dmem [SEG_WORDS];
  logic [3:0]  i_dly, d_dly;
  logic [AW-1:0] i_idx, d_idx, ld_idx;

  assign i_idx  = {i_req.addr[AW+1:4], i_req.wsel};
  assign d_idx  = {d_req.addr[AW+1:4], d_req.wsel};
  assign ld_idx = ld_addr[AW+1:2];

  assign i_rsp.rdata = imem[i_idx];
  assign d_rsp.rdata = dmem[d_idx];
  assign i_rsp.rdy   = !i_req.rst_dly && (i_req.rd || i_req.wr) && i_dly == 4'(LATENCY);
  assign d_rsp.rdy   = !d_req.rst_dly && (d_req.rd || d_req.wr) && d_dly == 4'(LATENCY);
  assign dbg_data    = dmem[dbg_addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (rst || i_req.rst_dly || i_rsp.rdy) i_dly <= '0;
    else if (i_req.rd || i_req.wr)          i_dly <= i_dly + 4'd1;
    if (rst || d_req.rst_dly || d_rsp.rdy) d_dly <= '0;
    else if (d_req.rd || d_req.wr)          d_dly <= d_dly + 4'd1;
  end

  always_ff @(posedge clk) begin
    if (ld_we) begin
      if (ld_seg) dmem[ld_idx] <= ld_data;
      else        imem[ld_idx] <= ld_data;
    end else begin
      if (d_req.wr && d_rsp.rdy) dmem[d_idx] <= d_req.wdata;
      if (i_req.wr && i_rsp.rdy) imem[i_idx] <= i_req.wdata;
    end
  end
endmodule
