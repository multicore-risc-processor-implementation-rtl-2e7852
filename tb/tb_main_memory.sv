// tb_main_memory: self-checking test of the two-segment main memory.
//
// Built with LATENCY = 2 so the Mem_rdy delay is visible. It loads both
// segments through the load port, checks that a word read answers with
// Mem_rdy exactly LATENCY cycles after the request, that rst_dly restarts
// the delay, that wsel picks the word inside the block, that a data write
// lands only on Mem_rdy, that the two segments are independent, and that
// the debug port shows the data segment.
module tb_main_memory;
  import mips_pkg::*;

  localparam int LAT = 2;

  logic        clk = 1'b0, rst;
  mem_req_t    i_req, d_req;
  mem_rsp_t    i_rsp, d_rsp;
  logic        ld_we, ld_seg;
  logic [31:0] ld_addr, ld_data, dbg_addr, dbg_data;

  main_memory #(.SEG_BYTES(512), .LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] im [128], dm [128];
  int n;

  task automatic word(input bit seg, input bit wr, input logic [31:0] addr,
                      input logic [1:0] wsel, input logic [31:0] wd,
                      output logic [31:0] rd, output int ncyc);
    mem_req_t r;
    r = '{addr: addr, wsel: wsel, rd: !wr, wr: wr, rst_dly: 1'b0, wdata: wd};
    if (seg) d_req = r; else i_req = r;
    ncyc = 0;
    #1;
    while (!(seg ? d_rsp.rdy : i_rsp.rdy)) begin
      @(posedge clk); #1; ncyc++;
      if (ncyc > 50) break;
    end
    rd = seg ? d_rsp.rdata : i_rsp.rdata;
    @(posedge clk); #1;
    i_req = '0; i_req.rst_dly = 1'b1;
    d_req = '0; d_req.rst_dly = 1'b1;
  endtask

  logic [31:0] rd;

  initial begin
    rst = 1; ld_we = 0; ld_seg = 0; ld_addr = '0; ld_data = '0; dbg_addr = '0;
    i_req = '0; i_req.rst_dly = 1'b1;
    d_req = '0; d_req.rst_dly = 1'b1;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 128; i++) begin
        ld_we = 1; ld_seg = s[0]; ld_addr = 32'(4 * i); ld_data = $urandom;
        if (s == 0) im[i] = ld_data; else dm[i] = ld_data;
        @(posedge clk); #1;
      end
    ld_we = 0;

    word(0, 0, 32'h30, 2'd2, 0, rd, n);
    check(rd == im[14], "instruction word read via wsel");
    check(n == LAT, $sformatf("Mem_rdy after %0d cycles", n));
    word(1, 0, 32'h1F0, 2'd3, 0, rd, n);
    check(rd == dm[127] && n == LAT, "last data word");
    // rst_dly held: no Mem_rdy
    d_req = '{addr: 32'h0, wsel: 2'd0, rd: 1'b1, wr: 1'b0, rst_dly: 1'b1, wdata: '0};
    repeat (5) begin @(posedge clk); #1; check(!d_rsp.rdy, "rst_dly holds Mem_rdy low"); end
    d_req.rst_dly = 1'b0;
    word(1, 0, 32'h0, 2'd0, 0, rd, n);
    check(n == LAT, "delay restarts after rst_dly");
    // write
    word(1, 1, 32'h40, 2'd1, 32'hDEAD_BEEF, rd, n);
    check(n == LAT, "write latency");
    dm[17] = 32'hDEAD_BEEF;
    dbg_addr = 32'h44; #1;
    check(dbg_data == 32'hDEAD_BEEF, "debug port sees the written word");
    word(0, 0, 32'h40, 2'd1, 0, rd, n);
    check(rd == im[17], "instruction segment untouched by data write");
    // random sweep
    for (int k = 0; k < 100; k++) begin
      logic [6:0] w;
      w = 7'($urandom);
      word(1, 0, {23'b0, w[6:2], 4'b0}, w[1:0], 0, rd, n);
      check(rd == dm[w] && n == LAT, $sformatf("random data read %0d", w));
      dbg_addr = {23'b0, w, 2'b0}; #1;
      check(dbg_data == dm[w], "random debug read");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
