// tb_bus_system: self-checking test of the bus system on its own.
//
// The testbench drives the cache-side requests and snoop answers directly
// and checks: round-robin arbitration of the instruction port with routing
// of the owner's memory request and Mem_rdy; a data read whose block is
// Exclusive in the other cache (the other copy is told to go Shared in the
// grant cycle and the requester is told the block is shared); a data write
// whose block is Modified in the other cache (wb_in to that cache with an
// invalidate, its write-back routed to memory, and the grant only after
// wb_done); and a read with no other copy (not shared).
module tb_bus_system;
  import mips_pkg::*;

  logic     clk = 1'b0, rst;
  ic2bus_t  ic_i  [2];
  bus2ic_t  ic_o  [2];
  mem_req_t icm_i [2];
  mem_rsp_t icm_o [2];
  dc2bus_t  dc_i  [2];
  bus2dc_t  dc_o  [2];
  mem_req_t dcm_i [2];
  mem_rsp_t dcm_o [2];
  snoop_t   snp_o [2];
  logic [31:0] snp_addr;
  mesi_e    snp_state [2];
  logic     wb_done [2];
  mem_req_t imem_o, dmem_o;
  mem_rsp_t imem_i, dmem_i;

  bus_system #(.NCORES(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic mem_req_t mreq(input logic [31:0] a, input bit rd, input bit wr);
    return '{addr: a, wsel: 2'b01, rd: rd, wr: wr, rst_dly: 1'b0, wdata: a ^ 32'hFFFF};
  endfunction

  initial begin
    rst = 1;
    for (int c = 0; c < 2; c++) begin
      ic_i[c] = '0; icm_i[c] = '0; dc_i[c] = '0; dcm_i[c] = '0;
      snp_state[c] = MESI_I; wb_done[c] = 1'b0;
      icm_i[c].rst_dly = 1'b1; dcm_i[c].rst_dly = 1'b1;
    end
    imem_i = '{rdata: 32'hCAFE_0000, rdy: 1'b1};
    dmem_i = '{rdata: 32'hBEEF_0000, rdy: 1'b1};
    repeat (2) @(posedge clk); #1;
    rst = 0;

    // ---------- instruction port ----------
    ic_i[0].req = 1; ic_i[1].req = 1;
    icm_i[0] = mreq(32'h100, 1, 0); icm_i[1] = mreq(32'h200, 1, 0);
    #1;
    check(!ic_o[0].gnt && !ic_o[1].gnt, "no grant in the request cycle");
    @(posedge clk); #1;
    check(ic_o[0].gnt && !ic_o[1].gnt, "core 0 granted first");
    check(imem_o.addr == 32'h100 && imem_o.rd, "owner's request routed to memory");
    check(icm_o[0].rdy && !icm_o[1].rdy, "Mem_rdy only to the owner");
    check(icm_o[0].rdata == 32'hCAFE_0000, "read data returned");
    ic_i[0].done = 1;
    @(posedge clk); #1;
    ic_i[0] = '0;
    check(!ic_o[0].gnt && !ic_o[1].gnt, "bus released after done");
    @(posedge clk); #1;
    check(ic_o[1].gnt, "core 1 granted next");
    ic_i[1].done = 1;
    @(posedge clk); #1;
    ic_i[1] = '0;

    // ---------- data read, other copy Exclusive ----------
    dc_i[0] = '{req: 1'b1, req_wr: 1'b0, done: 1'b0, addr: 32'h44};
    snp_state[1] = MESI_E;
    #1;
    check(snp_addr == 32'h44, "snoop address is the requester's address");
    check(snp_o[1].op == SNP_SHARE && !snp_o[1].wb_in, "other Exclusive copy told to share");
    check(snp_o[0].op == SNP_NONE, "requester not snooped");
    @(posedge clk); #1;
    snp_state[1] = MESI_S;
    check(dc_o[0].gnt && dc_o[0].shared, "read granted, block shared");
    check(snp_o[1].op == SNP_NONE, "snoop action lasts one cycle");
    dcm_i[0] = mreq(32'h40, 1, 0);
    #1;
    check(dmem_o.addr == 32'h40 && dmem_o.rd, "requester's fill routed to memory");
    dc_i[0].done = 1;
    @(posedge clk); #1;
    dc_i[0] = '0; dcm_i[0] = '0; dcm_i[0].rst_dly = 1'b1;
    snp_state[1] = MESI_I;

    // ---------- data write, other copy Modified ----------
    dc_i[1] = '{req: 1'b1, req_wr: 1'b1, done: 1'b0, addr: 32'h84};
    snp_state[0] = MESI_M;
    #1;
    check(snp_o[0].op == SNP_NONE && !snp_o[0].wb_in, "no state change before the write-back");
    @(posedge clk); #1;
    check(snp_o[0].wb_in && snp_o[0].op == SNP_INV, "wb_in with invalidate to the Modified owner");
    check(!dc_o[1].gnt, "requester waits for the write-back");
    check(snp_addr == 32'h84, "snoop address held during the write-back");
    dcm_i[0] = mreq(32'h80, 0, 1);
    #1;
    check(dmem_o.wr && dmem_o.addr == 32'h80 && dmem_o.wdata == (32'h80 ^ 32'hFFFF),
          "write-back routed to memory");
    check(dcm_o[0].rdy && !dcm_o[1].rdy, "Mem_rdy to the writing-back cache");
    repeat (3) @(posedge clk); #1;
    wb_done[0] = 1;
    @(posedge clk); #1;
    wb_done[0] = 0; snp_state[0] = MESI_I;
    dcm_i[0] = '0; dcm_i[0].rst_dly = 1'b1;
    check(!snp_o[0].wb_in, "wb_in dropped after wb_done");
    check(dc_o[1].gnt && !dc_o[1].shared, "writer granted after the write-back, not shared");
    dc_i[1].done = 1;
    @(posedge clk); #1;
    dc_i[1] = '0;

    // ---------- data read, no other copy ----------
    dc_i[0] = '{req: 1'b1, req_wr: 1'b0, done: 1'b0, addr: 32'h10};
    @(posedge clk); #1;
    check(dc_o[0].gnt && !dc_o[0].shared, "read with no other copy: not shared");
    dc_i[0].done = 1;
    @(posedge clk); #1;
    dc_i[0] = '0;
    #1;
    check(!dc_o[0].gnt && !dc_o[1].gnt, "data bus idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
