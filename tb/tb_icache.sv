// tb_icache: self-checking test of the instruction cache.
//
// The testbench plays the bus system and the instruction memory: it grants
// the bus one cycle after a request, answers each word with Mem_rdy after
// MEM_WAIT cycles and holds the words in its own array. It checks a cold
// miss (fill of four words, stall length 2 + 4*(MEM_WAIT+1) cycles), hits in
// the same cycle with no bus traffic, a conflicting miss replacing the line,
// the bus handed back with done, and random fetches against the model.
module tb_icache;
  import mips_pkg::*;

  localparam int MEM_WAIT = 2;

  logic        clk = 1'b0, rst;
  logic        en;
  logic [31:0] pc, instr;
  logic        stall;
  ic2bus_t     bus_o;
  bus2ic_t     bus_i;
  mem_req_t    mem_o;
  mem_rsp_t    mem_i;

  icache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [128];
  int          wait_cnt, nreq;
  logic        gnt_q;

  function automatic int widx(input logic [31:0] a, input logic [1:0] w);
    return int'({a[8:4], w});
  endfunction

  always_comb begin
    mem_i.rdata = mem[widx(mem_o.addr, mem_o.wsel)];
    mem_i.rdy   = gnt_q && mem_o.rd && wait_cnt == MEM_WAIT;
    bus_i.gnt   = gnt_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt_q <= 1'b0; wait_cnt <= 0; nreq <= 0;
    end else begin
      if (!gnt_q && bus_o.req) begin gnt_q <= 1'b1; nreq <= nreq + 1; end
      else if (gnt_q && bus_o.done) gnt_q <= 1'b0;
      if (mem_o.rst_dly || mem_i.rdy) wait_cnt <= 0;
      else                            wait_cnt <= wait_cnt + 1;
    end
  end

  task automatic fetch(input logic [31:0] a, output logic [31:0] ins, output int ncyc);
    en = 1; pc = a; ncyc = 0;
    #1;
    while (stall) begin
      @(posedge clk); #1;
      ncyc++;
      if (ncyc > 100) break;
    end
    ins = instr;
    @(posedge clk); #1;
    en = 0;
  endtask

  logic [31:0] ins, a;
  int          n, n0;

  initial begin
    rst = 1; en = 0; pc = '0;
    for (int i = 0; i < 128; i++) mem[i] = $urandom;
    repeat (2) @(posedge clk); #1;
    rst = 0;

    #1;
    check(!stall && !bus_o.req, "no request while idle");
    fetch(32'h24, ins, n);
    check(ins == mem[9], "cold miss returns the instruction");
    check(n == 2 + 4 * (MEM_WAIT + 1), $sformatf("miss stalled %0d cycles", n));
    #1;
    check(!bus_i.gnt, "bus handed back after the fill");
    n0 = nreq;
    for (int w = 0; w < 4; w++) begin
      fetch(32'h20 + 32'(4 * w), ins, n);
      check(n == 0 && ins == mem[8 + w], $sformatf("hit word %0d", w));
    end
    check(nreq == n0, "hits use no bus");
    // conflicting block (same line 2, other tag)
    fetch(32'h120, ins, n);
    check(ins == mem[widx(32'h120, 0)] && n > 0, "conflict miss refills the line");
    fetch(32'h20, ins, n);
    check(n > 0 && ins == mem[8], "replaced block misses again");

    // random fetches against the model
    for (int k = 0; k < 200; k++) begin
      a = {23'b0, 7'($urandom), 2'b00};
      fetch(a, ins, n);
      check(ins == mem[a[8:2]], $sformatf("random fetch %h", a));
      if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
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
