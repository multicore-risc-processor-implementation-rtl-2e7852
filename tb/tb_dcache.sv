// tb_dcache: self-checking test of the data cache and its MESI controller.
//
// The testbench plays the bus system and main memory: it grants the bus one
// cycle after a request, answers every word with Mem_rdy after MEM_WAIT
// cycles, and keeps its own copy of memory. It checks a read miss (fill
// from memory, state E, latency), read and write hits served in the same
// cycle, a write hit turning E into M, a conflicting miss that first writes
// the dirty victim back, a fill in state S when the bus reports sharing, a
// write to a Shared line asking the bus for ownership, snoop lookups, a snoop
// invalidate, a snoop write-back request (wb_in) taking priority over a
// pending access, and byte-enable writes.
module tb_dcache;
  import mips_pkg::*;

  localparam int MEM_WAIT = 1;

  logic        clk = 1'b0, rst;
  logic        re, we;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  be;
  logic        stall;
  dc2bus_t     bus_o;
  bus2dc_t     bus_i;
  mem_req_t    mem_o;
  mem_rsp_t    mem_i;
  snoop_t      snp_i;
  logic [31:0] snp_addr;
  mesi_e       snp_state;
  logic        wb_done;

  dcache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- memory + bus model ----------------
  logic [31:0] mem [128];
  int          wait_cnt;
  logic        gnt_q;
  logic        gnt_enable = 1'b1;

  function automatic int widx(input logic [31:0] a, input logic [1:0] w);
    return int'({a[8:4], w});
  endfunction

  always_comb begin
    mem_i.rdata = mem[widx(mem_o.addr, mem_o.wsel)];
    mem_i.rdy   = (gnt_q || snp_i.wb_in) && (mem_o.rd || mem_o.wr) && wait_cnt == MEM_WAIT;
    bus_i.gnt   = gnt_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt_q <= 1'b0; wait_cnt <= 0;
    end else begin
      if (!gnt_q && bus_o.req && gnt_enable) gnt_q <= 1'b1;
      else if (gnt_q && bus_o.done)          gnt_q <= 1'b0;
      if (mem_o.rst_dly || mem_i.rdy) wait_cnt <= 0;
      else                            wait_cnt <= wait_cnt + 1;
      if (mem_o.wr && mem_i.rdy) mem[widx(mem_o.addr, mem_o.wsel)] <= mem_o.wdata;
    end
  end

  // ---------------- helpers ----------------
  task automatic idle();
    re = 0; we = 0;
  endtask

  // issue an access and wait until it is served; returns cycles stalled
  task automatic access(input bit w, input logic [31:0] a, input logic [31:0] d,
                        input logic [3:0] b, output logic [31:0] rd, output int ncyc);
    re = !w; we = w; addr = a; wdata = d; be = b;
    ncyc = 0;
    #1;
    while (stall) begin
      @(posedge clk); #1;
      ncyc++;
      if (ncyc > 100) break;
    end
    rd = rdata;
    @(posedge clk); #1;
    idle();
  endtask

  logic [31:0] rd;
  int          n;

  initial begin
    rst = 1; idle(); addr = '0; wdata = '0; be = '0;
    bus_i.shared = 1'b0;
    snp_i = '{wb_in: 1'b0, op: SNP_NONE}; snp_addr = '0;
    for (int i = 0; i < 128; i++) mem[i] = 32'hA000_0000 + 32'(i);
    repeat (2) @(posedge clk); #1;
    rst = 0;

    // read miss of 0x40 (block 4): grant 1 cycle + 4 words x (MEM_WAIT+1) + serve
    access(0, 32'h44, 0, 4'hF, rd, n);
    check(rd == mem[widx(32'h40, 2'd1)], $sformatf("read miss data %h", rd));
    check(n == 1 + 4 * (MEM_WAIT + 1) + 1, $sformatf("read miss took %0d stall cycles", n));
    check(dut.mesi[0] == MESI_E, "line filled as Exclusive");
    // read hit: no stall
    access(0, 32'h4C, 0, 4'hF, rd, n);
    check(n == 0 && rd == mem[widx(32'h40, 2'd3)], "read hit in the same cycle");
    // write hit on E: no bus, becomes M
    access(1, 32'h48, 32'h1234_5678, 4'hF, rd, n);
    check(n == 0, "write hit on E is served at once");
    check(dut.mesi[0] == MESI_M, "E -> M on write");
    access(0, 32'h48, 0, 4'hF, rd, n);
    check(rd == 32'h1234_5678, "written word reads back");
    // byte write
    access(1, 32'h49, 32'hCDCD_CDCD, 4'b0010, rd, n);
    access(0, 32'h48, 0, 4'hF, rd, n);
    check(rd == 32'h1234_CD78, $sformatf("byte write, got %h", rd));
    check(mem[widx(32'h40, 2'd2)] == 32'hA000_0012, "memory still holds the old word");

    // snoop lookup
    snp_addr = 32'h40; #1;
    check(snp_state == MESI_M, "snoop sees M");
    snp_addr = 32'h80; #1;
    check(snp_state == MESI_I, "snoop of another tag sees I");

    // conflicting read miss 0x80 (same line): victim write-back then fill
    access(0, 32'h80, 0, 4'hF, rd, n);
    check(rd == mem[widx(32'h80, 2'd0)], "conflict miss data");
    check(n == 1 + 8 * (MEM_WAIT + 1) + 1, $sformatf("victim write-back + fill took %0d", n));
    check(mem[widx(32'h40, 2'd2)] == 32'h1234_CD78, "dirty victim written back");
    check(mem[widx(32'h40, 2'd0)] == 32'hA000_0010, "victim's other words written back unchanged");

    // fill as Shared when the bus reports another copy
    bus_i.shared = 1'b1;
    access(0, 32'h10, 0, 4'hF, rd, n);
    bus_i.shared = 1'b0;
    check(dut.mesi[1] == MESI_S, "line filled as Shared");
    // write to Shared: needs the bus (request with req_wr), then M
    re = 0; we = 1; addr = 32'h14; wdata = 32'hFACE_0001; be = 4'hF; #1;
    check(stall && bus_o.req && bus_o.req_wr, "write to S requests ownership");
    access(1, 32'h14, 32'hFACE_0001, 4'hF, rd, n);
    check(n == 2, $sformatf("upgrade took %0d cycles", n));
    check(dut.mesi[1] == MESI_M, "S -> M after upgrade");

    // snoop invalidate of an E line (line 0 holds 0x80 as E)
    snp_addr = 32'h80; snp_i.op = SNP_INV;
    @(posedge clk); #1;
    snp_i.op = SNP_NONE;
    check(dut.mesi[0] == MESI_I, "snoop invalidate");

    // snoop write-back of the M line 0x10 block, with a pending local access
    gnt_enable = 1'b0;
    re = 1; addr = 32'hC0;   // a miss on another line that must wait
    snp_addr = 32'h10; snp_i = '{wb_in: 1'b1, op: SNP_SHARE};
    n = 0;
    #1;
    while (!wb_done && n < 50) begin @(posedge clk); #1; n++; end
    check(wb_done, "write-back completes");
    check(n == 4 * (MEM_WAIT + 1), $sformatf("write-back took %0d cycles", n));
    @(posedge clk); #1;
    snp_i = '{wb_in: 1'b0, op: SNP_NONE};
    check(mem[widx(32'h10, 2'd1)] == 32'hFACE_0001, "snoop write-back reached memory");
    check(dut.mesi[1] == MESI_S, "M -> S after write-back for a reader");
    check(stall, "local miss still waiting");
    gnt_enable = 1'b1;
    idle();
    repeat (12) @(posedge clk); #1;

    // a local write to the snooped line is held back in the snoop cycle
    access(0, 32'h20, 0, 4'hF, rd, n);             // line 2, E
    re = 0; we = 1; addr = 32'h24; wdata = 32'h1; be = 4'hF;
    snp_addr = 32'h20; snp_i.op = SNP_INV; #1;
    check(stall, "write blocked during snoop of its line");
    @(posedge clk); #1;
    snp_i.op = SNP_NONE; idle();
    check(dut.mesi[2] == MESI_I, "snooped line invalidated, write did not slip through");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
