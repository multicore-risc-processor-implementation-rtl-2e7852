// tb_multicore_slow_memory: the reference program on the dual-core system
// with a slow main memory (MEM_LATENCY = 3: every word transfer waits three
// cycles for Mem_rdy).
//
// Same two runs as the default-parameter end-to-end test, reduced to what
// must hold at any memory speed. Run 1: the whole program on core 0 (core
// 1 only halts) must store 0x88 then 0x1438 to 0x40 and 0 to 0x44, and
// retire 93 instructions. Run 2: summation on core 0 and factorial on core
// 1, which waits for core 0's sum in memory; the final values must reach
// main memory (core 1 evicts its dirty line by storing to 0x80) and are
// read back through the debug port. The cycle counts of both runs are
// printed, not checked: the document gives figures only for its own
// memory. Slower word transfers widen the windows in which the two data
// caches compete for the bus and snoop each other, so this run checks
// coherence under different interleavings than the default one.
module tb_multicore_slow_memory;
  import mips_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        ld_we, ld_seg;
  logic [31:0] ld_addr, ld_data, dbg_addr, dbg_data;
  logic [1:0]  halted, memwrite, memread, retire;
  logic [31:0] dataadr [2];
  logic [31:0] writedata [2];

  multicore_top #(.MEM_LATENCY(3)) dut (
    .clk, .rst, .ld_we, .ld_seg, .ld_addr, .ld_data, .dbg_addr, .dbg_data,
    .halted, .memwrite, .memread, .dataadr, .writedata, .retire
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference program, entry 0x000
  localparam logic [31:0] PROG_SINGLE [18] = '{
    32'h20080010, 32'h200E0000, 32'h01C87020, 32'h2108FFFF, 32'h1408FFFD,
    32'hAC0E0040, 32'h200B0007, 32'h20040001, 32'h01640018, 32'h00002012,
    32'h00002810, 32'h216BFFFF, 32'h140BFFFB, 32'h8C020040, 32'h00822020,
    32'hAC040040, 32'hAC050044, 32'hF0000000
  };
  // core 0 part: sum 1..16, store to 0x40, halt
  localparam logic [31:0] PROG_P0 [7] = '{
    32'h20080010, 32'h200E0000, 32'h01C87020, 32'h2108FFFF, 32'h1408FFFD,
    32'hAC0E0040, 32'hF0000000
  };
  // core 1 part (entry 0x100): 7!, wait for 0x40 != 0, add, store 0x40/0x44,
  // store to 0x80 (same line as 0x40) to evict the dirty block, halt
  localparam logic [31:0] PROG_P1 [14] = '{
    32'h200B0007, 32'h20040001, 32'h01640018, 32'h00002012, 32'h00002810,
    32'h216BFFFF, 32'h140BFFFB, 32'h8C020040, 32'h1040FFFE, 32'h00822020,
    32'hAC040040, 32'hAC050044, 32'hAC040080, 32'hF0000000
  };

  task automatic load_word(input bit seg, input logic [31:0] a, input logic [31:0] d);
    ld_we = 1'b1; ld_seg = seg; ld_addr = a; ld_data = d;
    @(posedge clk);
    #1 ld_we = 1'b0;
  endtask

  task automatic clear_memory();
    for (int a = 0; a < 512; a += 4) begin
      load_word(1'b0, a, 32'h0);
      load_word(1'b1, a, 32'h0);
    end
  endtask

  logic [31:0] st_addr [$];
  logic [31:0] st_data [$];
  int          retired [2];
  bit          logging = 0;

  always @(posedge clk) if (logging && !rst) begin
    for (int c = 0; c < 2; c++) begin
      if (memwrite[c] && c == 0) begin
        st_addr.push_back(dataadr[c]);
        st_data.push_back(writedata[c]);
      end
      if (retire[c]) retired[c]++;
    end
  end

  task automatic run(output int ncyc);
    logging = 1;
    ncyc = 0;
    rst = 1'b0;
    while (halted != 2'b11 && ncyc < 8000) begin
      @(posedge clk);
      ncyc++;
    end
    repeat (3) @(posedge clk);
    logging = 0;
  endtask

  int cyc1, cyc2;

  initial begin
    rst = 1'b1; ld_we = 1'b0; ld_seg = 1'b0; ld_addr = '0; ld_data = '0; dbg_addr = '0;
    repeat (2) @(posedge clk);

    // ---- run 1: one core ----
    st_addr.delete(); st_data.delete(); retired = '{0, 0};
    clear_memory();
    for (int i = 0; i < 18; i++) load_word(1'b0, 32'(4 * i), PROG_SINGLE[i]);
    load_word(1'b0, 32'h100, 32'hF0000000);
    @(posedge clk); #1;
    run(cyc1);
    check(halted == 2'b11, "run 1: both cores halted");
    check(st_addr.size() == 3, $sformatf("run 1: %0d stores, expected 3", st_addr.size()));
    if (st_addr.size() == 3) begin
      check(st_addr[0] == 32'h40 && st_data[0] == 32'h88, "run 1: 0x88 stored to 0x40");
      check(st_addr[1] == 32'h40 && st_data[1] == 32'h1438, "run 1: 0x1438 stored to 0x40");
      check(st_addr[2] == 32'h44 && st_data[2] == 32'h0, "run 1: 0 stored to 0x44");
    end
    check(retired[0] == 93, $sformatf("run 1: %0d instructions retired, expected 93", retired[0]));

    // ---- run 2: two cores ----
    rst = 1'b1;
    @(posedge clk); #1;
    retired = '{0, 0};
    clear_memory();
    for (int i = 0; i < 7; i++) load_word(1'b0, 32'(4 * i), PROG_P0[i]);
    for (int i = 0; i < 14; i++) load_word(1'b0, 32'h100 + 32'(4 * i), PROG_P1[i]);
    @(posedge clk); #1;
    run(cyc2);
    check(halted == 2'b11, "run 2: both cores halted");
    dbg_addr = 32'h40; #1;
    check(dbg_data == 32'h1438, $sformatf("run 2: memory 0x40 = %h, expected 1438", dbg_data));
    dbg_addr = 32'h44; #1;
    check(dbg_data == 32'h0, $sformatf("run 2: memory 0x44 = %h, expected 0", dbg_data));
    check(retired[0] == 52, $sformatf("run 2: core 0 retired %0d, expected 52", retired[0]));
    check(retired[1] >= 44, $sformatf("run 2: core 1 retired %0d, expected at least 44", retired[1]));

    $display("MEM_LATENCY 3: one core %0d cycles, two cores %0d cycles", cyc1, cyc2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
