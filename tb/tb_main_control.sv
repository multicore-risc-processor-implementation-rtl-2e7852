// tb_main_control: self-checking test of the main (opcode) decoder.
//
// A table in the testbench lists, for every opcode this design accepts, the
// fields that matter (register write and destination, immediate source and
// extension, ALU operation, memory read/write, access size and sign, branch
// kind, jump, result source, which source registers are read, hlt). Every
// one of the 64 opcodes is applied; opcodes missing from the table must
// decode to the no-operation control word.
module tb_main_control;
  import mips_pkg::*;

  logic [5:0] op;
  logic [4:0] rt;
  ctrl_t      c;

  main_control dut (.*);

  int checks = 0, failures = 0;
  int nknown;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ctrl_t expect_of(input logic [5:0] o, input logic [4:0] r, output bit known);
    ctrl_t e;
    e = CTRL_NOP;
    known = 1'b1;
    case (o)
      6'b000000: begin e.regwrite = 1; e.regdst = DST_RD; e.uses_rs = 1; e.uses_rt = 1; end
      6'b001000, 6'b001001: begin e.regwrite = 1; e.alusrc = 1; e.aluop = ALU_ADD; e.uses_rs = 1; end
      6'b001010: begin e.regwrite = 1; e.alusrc = 1; e.aluop = ALU_SLT; e.uses_rs = 1; end
      6'b001011: begin e.regwrite = 1; e.alusrc = 1; e.aluop = ALU_SLTU; e.uses_rs = 1; end
      6'b001100: begin e.regwrite = 1; e.alusrc = 1; e.zeroext = 1; e.aluop = ALU_AND; e.uses_rs = 1; end
      6'b001101: begin e.regwrite = 1; e.alusrc = 1; e.zeroext = 1; e.aluop = ALU_OR; e.uses_rs = 1; end
      6'b001110: begin e.regwrite = 1; e.alusrc = 1; e.zeroext = 1; e.aluop = ALU_XOR; e.uses_rs = 1; end
      6'b001111: begin e.regwrite = 1; e.alusrc = 1; e.zeroext = 1; e.aluop = ALU_LUI; end
      6'b100000: begin e.regwrite = 1; e.alusrc = 1; e.memread = 1; e.memsize = SZ_BYTE; e.uses_rs = 1; end
      6'b100001: begin e.regwrite = 1; e.alusrc = 1; e.memread = 1; e.memsize = SZ_HALF; e.uses_rs = 1; end
      6'b100011: begin e.regwrite = 1; e.alusrc = 1; e.memread = 1; e.memsize = SZ_WORD; e.uses_rs = 1; end
      6'b100100: begin e.regwrite = 1; e.alusrc = 1; e.memread = 1; e.memsize = SZ_BYTE; e.memunsigned = 1; e.uses_rs = 1; end
      6'b100101: begin e.regwrite = 1; e.alusrc = 1; e.memread = 1; e.memsize = SZ_HALF; e.memunsigned = 1; e.uses_rs = 1; end
      6'b101000: begin e.alusrc = 1; e.memwrite = 1; e.memsize = SZ_BYTE; e.uses_rs = 1; e.uses_rt = 1; end
      6'b101001: begin e.alusrc = 1; e.memwrite = 1; e.memsize = SZ_HALF; e.uses_rs = 1; e.uses_rt = 1; end
      6'b101011: begin e.alusrc = 1; e.memwrite = 1; e.memsize = SZ_WORD; e.uses_rs = 1; e.uses_rt = 1; end
      6'b000100: begin e.branch = BR_EQ; e.uses_rs = 1; e.uses_rt = 1; end
      6'b000101: begin e.branch = BR_NE; e.uses_rs = 1; e.uses_rt = 1; end
      6'b000110: begin e.branch = BR_LEZ; e.uses_rs = 1; end
      6'b000111: begin e.branch = BR_GTZ; e.uses_rs = 1; end
      6'b000001: begin e.branch = r[0] ? BR_GEZ : BR_LTZ; e.uses_rs = 1; end
      6'b000010: e.jump = 1;
      6'b000011: begin e.jump = 1; e.regwrite = 1; e.regdst = DST_R31; e.ressrc = RES_LINK; end
      6'b111100: e.hlt = 1;
      default: known = 1'b0;
    endcase
    return e;
  endfunction

  initial begin
    ctrl_t e;
    bit k;
    nknown = 0;
    for (int o = 0; o < 64; o++) begin
      for (int r = 0; r < 2; r++) begin
        op = 6'(o); rt = 5'(r);
        #1;
        e = expect_of(op, rt, k);
        check(c == e, $sformatf("opcode %b rt %0d: got %h expected %h", op, rt, c, e));
      end
    end
    for (int o = 0; o < 64; o++) begin
      void'(expect_of(6'(o), 5'd0, k));
      if (k) nknown = nknown + 1;
    end
    check(nknown == 25, $sformatf("%0d opcodes decoded", nknown));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
