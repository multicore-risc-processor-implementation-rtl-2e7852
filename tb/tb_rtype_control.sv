// tb_rtype_control: self-checking test of the R-type (funct) decoder.
//
// The base control word is the one the main decoder gives for opcode 0.
// For each of the 26 R-type functions this design accepts, the testbench
// checks the ALU operation, shift-amount source, register write, jump
// register, Hi/Lo operation, result source and which source registers are
// read; the other 38 funct values must decode to the no-operation word.
module tb_rtype_control;
  import mips_pkg::*;

  logic [5:0] funct;
  ctrl_t      base, c;

  rtype_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ctrl_t expect_of(input logic [5:0] f, output bit known);
    ctrl_t e;
    e = base;
    known = 1'b1;
    case (f)
      6'b100000, 6'b100001: e.aluop = ALU_ADD;
      6'b100010, 6'b100011: e.aluop = ALU_SUB;
      6'b100100: e.aluop = ALU_AND;
      6'b100101: e.aluop = ALU_OR;
      6'b100110: e.aluop = ALU_XOR;
      6'b100111: e.aluop = ALU_NOR;
      6'b101010: e.aluop = ALU_SLT;
      6'b101011: e.aluop = ALU_SLTU;
      6'b000000: begin e.aluop = ALU_SLL; e.uses_rs = 0; end
      6'b000010: begin e.aluop = ALU_SRL; e.uses_rs = 0; end
      6'b000011: begin e.aluop = ALU_SRA; e.uses_rs = 0; end
      6'b000100: begin e.aluop = ALU_SLL; e.shiftvar = 1; end
      6'b000110: begin e.aluop = ALU_SRL; e.shiftvar = 1; end
      6'b000111: begin e.aluop = ALU_SRA; e.shiftvar = 1; end
      6'b001000: begin e.jr = 1; e.regwrite = 0; e.uses_rt = 0; end
      6'b001001: begin e.jr = 1; e.ressrc = RES_LINK; e.uses_rt = 0; end
      6'b010000: begin e.ressrc = RES_HI; e.uses_rs = 0; e.uses_rt = 0; end
      6'b010010: begin e.ressrc = RES_LO; e.uses_rs = 0; e.uses_rt = 0; end
      6'b010001: begin e.mdop = MD_MTHI; e.regwrite = 0; e.uses_rt = 0; end
      6'b010011: begin e.mdop = MD_MTLO; e.regwrite = 0; e.uses_rt = 0; end
      6'b011000: begin e.mdop = MD_MULT; e.regwrite = 0; end
      6'b011001: begin e.mdop = MD_MULTU; e.regwrite = 0; end
      6'b011010: begin e.mdop = MD_DIV; e.regwrite = 0; end
      6'b011011: begin e.mdop = MD_DIVU; e.regwrite = 0; end
      default: begin e = CTRL_NOP; known = 1'b0; end
    endcase
    return e;
  endfunction

  initial begin
    int nknown;
    nknown = 0;
    base = CTRL_NOP;
    base.regwrite = 1; base.regdst = DST_RD; base.uses_rs = 1; base.uses_rt = 1;
    for (int f = 0; f < 64; f++) begin
      ctrl_t e;
      bit k;
      funct = 6'(f);
      #1;
      e = expect_of(funct, k);
      if (k) nknown++;
      check(c == e, $sformatf("funct %b: got %h expected %h", funct, c, e));
    end
    check(nknown == 26, $sformatf("%0d functions decoded", nknown));
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
