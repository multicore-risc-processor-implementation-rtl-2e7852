// tb_multicore_top: end-to-end test of the dual-core system at its default
// parameters.
//
// Run 1 (one core): the reference program that adds 1..16 and 7! is placed
// at 0x000 for core 0, and core 1's entry at 0x100 holds only hlt. Expected:
// stores of 0x88 to 0x40, then 0x1438 to 0x40 and 0 to 0x44; 93 retired
// instructions (92 plus hlt).
// Run 2 (two cores): the same work split in two. Core 0 (0x000) sums 1..16
// and stores the sum to 0x40; core 1 (0x100) computes 7!, waits until 0x40
// is non-zero, adds, stores 0x1438 to 0x40 and 0 to 0x44, then stores to
// 0x80, which maps to the same cache line and forces the dirty block back to
// main memory, where the testbench reads it through the debug port.
// Between the two cores this exercises MESI: E on the first read, invalidate
// on core 0's write, snoop write-back of core 0's Modified line when core 1
// reads again, S in both, upgrade on core 1's write, and a victim
// write-back. The testbench counts each mechanism (cache misses, write-backs
// of both kinds, upgrades, stalls, forwarding, branch prediction hits and
// misses, multiply, halt, bus contention) and fails on any that never
// happened. It also compares cycle counts: the two-core run must be faster.
module tb_multicore_top;
  import mips_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        ld_we, ld_seg;
  logic [31:0] ld_addr, ld_data, dbg_addr, dbg_data;
  logic [1:0]  halted, memwrite, memread, retire;
  logic [31:0] dataadr [2];
  logic [31:0] writedata [2];

  multicore_top dut (
    .clk, .rst, .ld_we, .ld_seg, .ld_addr, .ld_data, .dbg_addr, .dbg_data,
    .halted, .memwrite, .memread, .dataadr, .writedata, .retire
  );

  always #5 clk = ~clk;   // 10 ns period, as in the reference simulation

  int checks = 0, failures = 0;
  int cycles;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- programs ----------------
  // reference program (entry 0x000)
  localparam logic [31:0] PROG_SINGLE [18] = '{
    32'h20080010, // 00 addi $t0,$0,0x10
    32'h200E0000, // 04 addi $t6,$0,0
    32'h01C87020, // 08 loop: add $t6,$t6,$t0
    32'h2108FFFF, // 0c addi $t0,$t0,-1
    32'h1408FFFD, // 10 bne $t0,$0,loop
    32'hAC0E0040, // 14 sw $t6,0x40($0)
    32'h200B0007, // 18 addi $t3,$0,7
    32'h20040001, // 1c addi $a0,$0,1
    32'h01640018, // 20 loop2: mult $t3,$a0
    32'h00002012, // 24 mflo $a0
    32'h00002810, // 28 mfhi $a1
    32'h216BFFFF, // 2c addi $t3,$t3,-1
    32'h140BFFFB, // 30 bne $t3,$0,loop2
    32'h8C020040, // 34 lw $v0,0x40($0)
    32'h00822020, // 38 add $a0,$a0,$v0
    32'hAC040040, // 3c sw $a0,0x40($0)
    32'hAC050044, // 40 sw $a1,0x44($0)
    32'hF0000000  // 44 hlt
  };
  // parallel version: core 0 part (entry 0x000)
  localparam logic [31:0] PROG_P0 [7] = '{
    32'h20080010, 32'h200E0000, 32'h01C87020, 32'h2108FFFF, 32'h1408FFFD,
    32'hAC0E0040, // 14 sw $t6,0x40($0)
    32'hF0000000  // 18 hlt
  };
  // parallel version: core 1 part (entry 0x100)
  localparam logic [31:0] PROG_P1 [14] = '{
    32'h200B0007, // 100 addi $t3,$0,7
    32'h20040001, // 104 addi $a0,$0,1
    32'h01640018, // 108 loop2: mult $t3,$a0
    32'h00002012, // 10c mflo $a0
    32'h00002810, // 110 mfhi $a1
    32'h216BFFFF, // 114 addi $t3,$t3,-1
    32'h140BFFFB, // 118 bne $t3,$0,loop2
    32'h8C020040, // 11c wait: lw $v0,0x40($0)
    32'h1040FFFE, // 120 beq $v0,$0,wait
    32'h00822020, // 124 add $a0,$a0,$v0
    32'hAC040040, // 128 sw $a0,0x40($0)
    32'hAC050044, // 12c sw $a1,0x44($0)
    32'hAC040080, // 130 sw $a0,0x80($0)  (same cache line as 0x40)
    32'hF0000000  // 134 hlt
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

  // ---------------- store log ----------------
  logic [31:0] st_addr [2][$];
  logic [31:0] st_data [2][$];
  int          retired [2];
  bit          logging = 0;

  always @(posedge clk) if (logging && !rst) begin
    for (int c = 0; c < 2; c++) begin
      if (memwrite[c]) begin
        st_addr[c].push_back(dataadr[c]);
        st_data[c].push_back(writedata[c]);
      end
      if (retire[c]) retired[c]++;
    end
  end

  // ---------------- mechanism counters ----------------
  // per core: [0] icache fills, [1] dcache fills, [2] shared fills,
  // [3] victim write-backs, [4] snoop write-backs, [5] upgrades,
  // [6] invalidations, [7] load-use stalls, [8] branch stalls,
  // [9] forward M->E, [10] forward W->E, [11] predicted branches,
  // [12] mispredicted branches, [13] multiplies
  int cnt [2][14];
  int n_bus_conflict;

  for (genvar c = 0; c < 2; c++) begin : g_mon
    always @(posedge clk) if (logging && !rst) begin
      if (dut.g_core[c].u_core.u_icache.fill_last) cnt[c][0]++;
      if (dut.g_core[c].u_core.u_dcache.fill_last) cnt[c][1]++;
      if (dut.g_core[c].u_core.u_dcache.fill_last && dut.dc_rsp[c].shared) cnt[c][2]++;
      if (dut.g_core[c].u_core.u_dcache.in_ww && dut.g_core[c].u_core.u_dcache.wsel == 2'd0 &&
          dut.dcm_rsp[c].rdy) cnt[c][3]++;
      if (dut.wb_done[c]) cnt[c][4]++;
      if (dut.dc_rsp[c].gnt && dut.dc_req[c].req_wr &&
          dut.g_core[c].u_core.u_dcache.state == 4'd0 && dut.g_core[c].u_core.u_dcache.hit) cnt[c][5]++;
      if (dut.snp[c].op == SNP_INV && dut.snp_state[c] != MESI_I) cnt[c][6]++;
      if (!dut.g_core[c].u_core.freeze) begin
        if (dut.g_core[c].u_core.lwstall) cnt[c][7]++;
        if (dut.g_core[c].u_core.bstall) cnt[c][8]++;
        if (dut.g_core[c].u_core.forwardAE == 2'b10 || dut.g_core[c].u_core.forwardBE == 2'b10) cnt[c][9]++;
        if (dut.g_core[c].u_core.forwardAE == 2'b01 || dut.g_core[c].u_core.forwardBE == 2'b01) cnt[c][10]++;
        if (dut.g_core[c].u_core.branchD && !dut.g_core[c].u_core.stallD) begin
          if (dut.g_core[c].u_core.redirectD) cnt[c][12]++;
          else cnt[c][11]++;
        end
        if (dut.g_core[c].u_core.ctrlE.mdop == MD_MULT) cnt[c][13]++;
      end
    end
  end

  always @(posedge clk) if (logging && !rst) begin
    if (dut.dc_req[0].req && dut.dc_req[1].req && dut.u_bus.bstate == 2'd0) n_bus_conflict++;
    if (dut.ic_req[0].req && dut.ic_req[1].req && !dut.u_bus.i_busy) n_bus_conflict++;
  end

  function automatic int total(input int k);
    return cnt[0][k] + cnt[1][k];
  endfunction

  task automatic run(output int ncyc);
    logging = 1;
    ncyc = 0;
    rst = 1'b0;
    while (halted != 2'b11 && ncyc < 5000) begin
      @(posedge clk);
      ncyc++;
    end
    // let the last stores settle
    repeat (3) @(posedge clk);
    logging = 0;
  endtask

  task automatic reset_system();
    rst = 1'b1;
    for (int c = 0; c < 2; c++) begin
      st_addr[c].delete(); st_data[c].delete(); retired[c] = 0;
    end
  endtask

  int cyc_single, cyc_multi;

  initial begin
    rst = 1'b1; ld_we = 1'b0; ld_seg = 1'b0; ld_addr = '0; ld_data = '0; dbg_addr = '0;
    repeat (2) @(posedge clk);

    // ================= run 1: one core =================
    reset_system();
    clear_memory();
    for (int i = 0; i < 18; i++) load_word(1'b0, 32'(4 * i), PROG_SINGLE[i]);
    load_word(1'b0, 32'h100, 32'hF0000000);
    @(posedge clk); #1;
    run(cyc_single);
    check(halted == 2'b11, "run 1: both cores halted");
    check(st_addr[0].size() == 3, $sformatf("run 1: core 0 made %0d stores, expected 3", st_addr[0].size()));
    if (st_addr[0].size() == 3) begin
      check(st_addr[0][0] == 32'h40 && st_data[0][0] == 32'h88,   "run 1: sum 0x88 stored to 0x40");
      check(st_addr[0][1] == 32'h40 && st_data[0][1] == 32'h1438, "run 1: 0x1438 stored to 0x40");
      check(st_addr[0][2] == 32'h44 && st_data[0][2] == 32'h0,    "run 1: 0 stored to 0x44");
    end
    check(st_addr[1].size() == 0, "run 1: core 1 stores nothing");
    check(retired[0] == 93, $sformatf("run 1: core 0 retired %0d instructions, expected 93", retired[0]));
    $display("run 1 (one core): %0d cycles, %0d instructions, CPI %0.2f",
             cyc_single, retired[0], real'(cyc_single) / real'(retired[0]));

    // ================= run 2: two cores =================
    reset_system();
    clear_memory();
    for (int i = 0; i < 7; i++)  load_word(1'b0, 32'(4 * i), PROG_P0[i]);
    for (int i = 0; i < 14; i++) load_word(1'b0, 32'h100 + 32'(4 * i), PROG_P1[i]);
    @(posedge clk); #1;
    run(cyc_multi);
    check(halted == 2'b11, "run 2: both cores halted");
    check(st_addr[0].size() == 1 && st_addr[0][0] == 32'h40 && st_data[0][0] == 32'h88,
          "run 2: core 0 stores 0x88 to 0x40");
    check(st_addr[1].size() == 3, $sformatf("run 2: core 1 made %0d stores, expected 3", st_addr[1].size()));
    if (st_addr[1].size() == 3) begin
      check(st_addr[1][0] == 32'h40 && st_data[1][0] == 32'h1438, "run 2: 0x1438 stored to 0x40");
      check(st_addr[1][1] == 32'h44 && st_data[1][1] == 32'h0,    "run 2: 0 stored to 0x44");
      check(st_addr[1][2] == 32'h80 && st_data[1][2] == 32'h1438, "run 2: 0x1438 stored to 0x80");
    end
    dbg_addr = 32'h40; #1;
    check(dbg_data == 32'h1438, $sformatf("run 2: main memory 0x40 = %h, expected 00001438", dbg_data));
    dbg_addr = 32'h44; #1;
    check(dbg_data == 32'h0, $sformatf("run 2: main memory 0x44 = %h, expected 0", dbg_data));
    $display("run 2 (two cores): %0d cycles, %0d + %0d instructions", cyc_multi, retired[0], retired[1]);
    $display("speedup %0.2f", real'(cyc_single) / real'(cyc_multi));
    check(cyc_multi < cyc_single, "two-core run is faster than one-core run");

    // ================= mechanisms =================
    $display("icache fills %0d, dcache fills %0d (shared %0d), victim write-backs %0d, snoop write-backs %0d",
             total(0), total(1), total(2), total(3), total(4));
    $display("upgrades %0d, invalidations %0d, load-use stalls %0d, branch stalls %0d",
             total(5), total(6), total(7), total(8));
    $display("forward M->E %0d, W->E %0d, branches predicted %0d, mispredicted %0d, mult %0d, bus contention %0d",
             total(9), total(10), total(11), total(12), total(13), n_bus_conflict);
    check(total(0) > 0, "instruction cache miss happened");
    check(total(1) > 0, "data cache fill happened");
    check(total(2) > 0, "fill in Shared state happened");
    check(total(3) > 0, "victim write-back happened");
    check(total(4) > 0, "snoop write-back happened");
    check(total(5) > 0, "Shared-to-Modified upgrade happened");
    check(total(6) > 0, "invalidation happened");
    check(total(7) > 0, "load-use stall happened");
    check(total(8) > 0, "branch operand stall happened");
    check(total(9) > 0, "forwarding from memory stage happened");
    check(total(10) > 0, "forwarding from write-back stage happened");
    check(total(11) > 0, "correct branch prediction happened");
    check(total(12) > 0, "branch misprediction happened");
    check(total(13) > 0, "multiply happened");
    check(n_bus_conflict > 0, "bus contention happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
