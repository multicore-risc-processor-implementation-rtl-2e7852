// tb_mips_core: self-checking test of one pipelined core with its caches.
//
// The testbench stands in for the bus system and main memory: every request
// is granted at once and every word is ready in the cycle it is asked for
// (the data cache is never snooped). It assembles a program that exercises
// the instruction set (ALU and immediate operations, shifts, set-less-than,
// lui, multiply/divide with Hi/Lo moves, all branch kinds, j, jal, jr, jalr,
// byte/half/word loads and stores, a load-use hazard, a conflict miss that
// evicts a dirty line) and stores each result to memory. The stores the core
// makes are compared, in order, with values the testbench computes itself.
// It also checks that hlt stops the core and counts retired instructions.
module tb_mips_core;
  import mips_pkg::*;

  logic        clk = 1'b0, rst;
  ic2bus_t     ic_bus_o;
  bus2ic_t     ic_bus_i;
  mem_req_t    ic_mem_o, dc_mem_o;
  mem_rsp_t    ic_mem_i, dc_mem_i;
  dc2bus_t     dc_bus_o;
  bus2dc_t     dc_bus_i;
  snoop_t      snp_i;
  logic [31:0] snp_addr;
  mesi_e       snp_state;
  logic        wb_done, halted, memwrite, memread, retire;
  logic [31:0] dataadr, writedata;

  mips_core #(.RESET_PC(32'h0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- memory model ----------------
  logic [31:0] imem [256];
  logic [31:0] dmem [256];

  always_comb begin
    ic_bus_i.gnt   = ic_bus_o.req;
    ic_mem_i.rdata = imem[{ic_mem_o.addr[9:4], ic_mem_o.wsel}];
    ic_mem_i.rdy   = ic_mem_o.rd;
    dc_bus_i.gnt    = dc_bus_o.req;
    dc_bus_i.shared = 1'b0;
    dc_mem_i.rdata  = dmem[{dc_mem_o.addr[9:4], dc_mem_o.wsel}];
    dc_mem_i.rdy    = dc_mem_o.rd || dc_mem_o.wr;
    snp_i           = '{wb_in: 1'b0, op: SNP_NONE};
    snp_addr        = '0;
  end

  always_ff @(posedge clk)
    if (dc_mem_o.wr) dmem[{dc_mem_o.addr[9:4], dc_mem_o.wsel}] <= dc_mem_o.wdata;

  // ---------------- assembler ----------------
  function automatic logic [31:0] R(input logic [5:0] fn, input int rs, input int rt, input int rd, input int sh = 0);
    return {6'b0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input logic [5:0] op, input int target);
    return {op, 26'(target >> 2)};
  endfunction

  int pc = 0;
  task automatic emit(input logic [31:0] w);
    imem[pc / 4] = w;
    pc += 4;
  endtask

  // expected stores
  logic [31:0] exp_addr [$];
  logic [31:0] exp_data [$];
  int st_slot = 'h100;
  task automatic store(input int r, input logic [31:0] expect_val);
    emit(I(OP_SW, 0, r, st_slot));
    exp_addr.push_back(32'(st_slot));
    exp_data.push_back(expect_val);
    st_slot += 4;
  endtask

  // observed stores
  logic [31:0] got_addr [$];
  logic [31:0] got_data [$];
  int n_retired = 0, n_cycles = 0;
  always @(posedge clk) if (!rst) begin
    n_cycles++;
    if (memwrite) begin got_addr.push_back(dataadr); got_data.push_back(writedata); end
    if (retire) n_retired++;
  end

  int n_instr;
  logic [31:0] a, b, jal_pc, jalr_pc, label;

  initial begin
    rst = 1;
    for (int i = 0; i < 256; i++) begin imem[i] = '0; dmem[i] = '0; end
    a = 32'd100; b = -32'sd7;

    // ---- ALU ----
    emit(I(OP_ADDI, 0, 1, 100));
    emit(I(OP_ADDI, 0, 2, -7));
    emit(R(FN_ADD, 1, 2, 3));          store(3, a + b);
    emit(R(FN_SUB, 1, 2, 4));          store(4, a - b);
    emit(R(FN_AND, 1, 2, 5));          store(5, a & b);
    emit(R(FN_OR,  1, 2, 6));          store(6, a | b);
    emit(R(FN_XOR, 1, 2, 7));          store(7, a ^ b);
    emit(R(FN_NOR, 1, 2, 8));          store(8, ~(a | b));
    emit(R(FN_SLT, 2, 1, 9));          store(9, 1);
    emit(R(FN_SLTU, 2, 1, 10));        store(10, 0);
    emit(R(FN_SLL, 0, 1, 11, 3));      store(11, a << 3);
    emit(R(FN_SRA, 0, 2, 12, 1));      store(12, 32'($signed(b) >>> 1));
    emit(R(FN_SRL, 0, 2, 13, 28));     store(13, b >> 28);
    emit(I(OP_LUI, 0, 14, 'h1234));
    emit(I(OP_ORI, 14, 14, 'h5678));   store(14, 32'h1234_5678);
    emit(I(OP_ANDI, 2, 15, 'hF0F0));   store(15, b & 32'h0000_F0F0);
    emit(I(OP_XORI, 1, 16, 'hFF));     store(16, a ^ 32'hFF);
    emit(I(OP_SLTI, 2, 17, -6));       store(17, 1);
    emit(I(OP_SLTIU, 1, 18, 99));      store(18, 0);
    emit(I(OP_ADDI, 0, 19, 5));
    emit(R(FN_SLLV, 19, 1, 20));       store(20, a << 5);
    emit(R(FN_SRAV, 19, 2, 21));       store(21, 32'($signed(b) >>> 5));
    // ---- multiply / divide ----
    emit(R(FN_MULT, 2, 1, 0));
    emit(R(FN_MFLO, 0, 0, 3));         store(3, 32'(-700));
    emit(R(FN_MFHI, 0, 0, 4));         store(4, 32'hFFFF_FFFF);
    emit(R(FN_MULTU, 2, 1, 0));
    emit(R(FN_MFHI, 0, 0, 4));         store(4, 32'((64'(b) * 64'(a)) >> 32));
    emit(R(FN_DIV, 1, 2, 0));
    emit(R(FN_MFLO, 0, 0, 5));         store(5, 32'(-14));
    emit(R(FN_MFHI, 0, 0, 6));         store(6, 2);
    emit(R(FN_DIVU, 1, 19, 0));
    emit(R(FN_MFLO, 0, 0, 5));         store(5, 20);
    emit(R(FN_MTHI, 14, 0, 0));
    emit(R(FN_MFHI, 0, 0, 6));         store(6, 32'h1234_5678);
    emit(R(FN_MTLO, 1, 0, 0));
    emit(R(FN_MFLO, 0, 0, 7));         store(7, a);
    // ---- branches: bit k of $22 set only by instructions that must run ----
    emit(I(OP_ADDI, 0, 22, 0));
    emit(I(OP_BEQ, 1, 1, 1));          emit(I(OP_ADDI, 22, 22, 1));    // taken
    emit(I(OP_BNE, 1, 1, 1));          emit(I(OP_ADDI, 22, 22, 2));    // not taken
    emit(I(OP_BLEZ, 2, 0, 1));         emit(I(OP_ADDI, 22, 22, 4));    // taken
    emit(I(OP_BGTZ, 2, 0, 1));         emit(I(OP_ADDI, 22, 22, 8));    // not taken
    emit(I(OP_REGIMM, 2, 0, 1));       emit(I(OP_ADDI, 22, 22, 16));   // bltz taken
    emit(I(OP_REGIMM, 2, 1, 1));       emit(I(OP_ADDI, 22, 22, 32));   // bgez not taken
    emit(I(OP_BGTZ, 1, 0, 1));         emit(I(OP_ADDI, 22, 22, 64));   // taken
    store(22, 2 + 8 + 32);
    // loop with a backward branch: $23 = 5+4+3+2+1
    emit(I(OP_ADDI, 0, 23, 0));
    emit(I(OP_ADDI, 0, 24, 5));
    emit(R(FN_ADD, 23, 24, 23));
    emit(I(OP_ADDI, 24, 24, -1));
    emit(I(OP_BNE, 24, 0, -3));
    store(23, 15);
    // ---- jumps ----
    jal_pc = 32'(pc);
    emit(J(OP_JAL, pc + 8));
    emit(I(OP_ADDI, 0, 25, 1));        // skipped
    store(31, jal_pc + 4);
    emit(I(OP_ADDI, 0, 25, 7));
    label = 32'(pc + 12);
    emit(I(OP_ADDI, 0, 26, int'(label)));
    emit(R(FN_JR, 26, 0, 0));
    emit(I(OP_ADDI, 0, 25, 1));        // skipped
    store(25, 7);
    emit(J(OP_J, pc + 8));
    emit(I(OP_ADDI, 0, 25, 2));        // skipped
    store(25, 7);
    label = 32'(pc + 12);
    emit(I(OP_ADDI, 0, 26, int'(label)));
    jalr_pc = 32'(pc);
    emit(R(FN_JALR, 26, 0, 27));
    emit(I(OP_ADDI, 0, 25, 3));        // skipped
    store(27, jalr_pc + 4);
    // ---- loads and stores of bytes and halves (little-endian) ----
    emit(I(OP_SW, 0, 14, 'h1E0));      exp_addr.push_back(32'h1E0); exp_data.push_back(32'h1234_5678);
    emit(I(OP_LB,  0, 3, 'h1E0));      store(3, 32'h78);
    emit(I(OP_LB,  0, 3, 'h1E3));      store(3, 32'h12);
    emit(I(OP_SB,  0, 2, 'h1E1));      exp_addr.push_back(32'h1E1); exp_data.push_back(b);
    emit(I(OP_LW,  0, 4, 'h1E0));      store(4, 32'h1234_F978);
    emit(I(OP_LB,  0, 5, 'h1E1));      store(5, 32'hFFFF_FFF9);
    emit(I(OP_LBU, 0, 5, 'h1E1));      store(5, 32'h0000_00F9);
    emit(I(OP_LH,  0, 6, 'h1E0));      store(6, 32'hFFFF_F978);
    emit(I(OP_LHU, 0, 6, 'h1E0));      store(6, 32'h0000_F978);
    emit(I(OP_LH,  0, 6, 'h1E2));      store(6, 32'h0000_1234);
    emit(I(OP_SH,  0, 2, 'h1E2));      exp_addr.push_back(32'h1E2); exp_data.push_back(b);
    emit(I(OP_LW,  0, 7, 'h1E0));      store(7, 32'hFFF9_F978);
    // load-use: the add needs the loaded value immediately
    emit(I(OP_LW,  0, 8, 'h1E0));
    emit(R(FN_ADD, 8, 1, 9));          store(9, 32'hFFF9_F978 + a);
    // conflict miss: 0x0E0 maps to the line of 0x1E0 (dirty) -> write-back
    emit(I(OP_LW,  0, 10, 'h0E0));     store(10, 32'h0);
    emit(I(OP_LW,  0, 10, 'h1E0));     store(10, 32'hFFF9_F978);
    emit(32'hF000_0000);               // hlt
    emit(I(OP_ADDI, 0, 1, 1));         // never executed
    emit(I(OP_SW, 0, 1, 'h1F0));
    n_instr = pc / 4 - 2;

    repeat (2) @(posedge clk); #1;
    rst = 0;
    fork
      wait (halted);
      repeat (3000) @(posedge clk);
    join_any
    repeat (5) @(posedge clk);

    check(halted, "core halted");
    check(got_addr.size() == exp_addr.size(),
          $sformatf("%0d stores made, %0d expected", got_addr.size(), exp_addr.size()));
    for (int i = 0; i < exp_addr.size() && i < got_addr.size(); i++)
      check(got_addr[i] == exp_addr[i] && got_data[i] == exp_data[i],
            $sformatf("store %0d: got %h <- %h, expected %h <- %h",
                      i, got_addr[i], got_data[i], exp_addr[i], exp_data[i]));
    check(dmem['h1E0 / 4] == 32'hFFF9_F978, "dirty line written back on eviction");
    $display("%0d instructions retired in %0d cycles", n_retired, n_cycles);
    // 8 instructions are jumped over, the loop body runs 4 extra times (3 each)
    check(n_retired == n_instr - 8 + 12, $sformatf("retired %0d, expected %0d", n_retired, n_instr + 4));
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
