// main_control: opcode decoder of the decode stage.
//
// Turns the 6-bit opcode (and, for the REGIMM group, the rt field) into the
// control word ctrl_t of mips_pkg for every non-R-type instruction: the
// immediate ALU group, lui, the loads and stores in byte/half/word sizes,
// the branches beq/bne/blez/bgtz/bltz/bgez, j/jal and hlt. R-type
// instructions get the base word for register-register ALU operations here
// and are refined by rtype_control. Unknown opcodes decode as a no-op.
// The document shows a "Main control" block and its output names; the
// encodings of the outputs are this design's.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [4:0] rt,
  output ctrl_t      c
);
  always_comb begin
    c = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        c.regwrite = 1'b1; c.regdst = DST_RD;
        c.uses_rs = 1'b1; c.uses_rt = 1'b1;
      end
      OP_ADDI, OP_ADDIU: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.aluop = ALU_ADD; c.uses_rs = 1'b1;
      end
      OP_SLTI: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.aluop = ALU_SLT; c.uses_rs = 1'b1;
      end
      OP_SLTIU: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.aluop = ALU_SLTU; c.uses_rs = 1'b1;
      end
      OP_ANDI: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.zeroext = 1'b1; c.aluop = ALU_AND; c.uses_rs = 1'b1;
      end
      OP_ORI: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.zeroext = 1'b1; c.aluop = ALU_OR; c.uses_rs = 1'b1;
      end
      OP_XORI: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.zeroext = 1'b1; c.aluop = ALU_XOR; c.uses_rs = 1'b1;
      end
      OP_LUI: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.zeroext = 1'b1; c.aluop = ALU_LUI;
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        c.regwrite = 1'b1; c.alusrc = 1'b1; c.aluop = ALU_ADD; c.memread = 1'b1;
        c.uses_rs = 1'b1;
        c.memsize = (op == OP_LW) ? SZ_WORD : (op == OP_LH || op == OP_LHU) ? SZ_HALF : SZ_BYTE;
        c.memunsigned = (op == OP_LBU || op == OP_LHU);
      end
      OP_SB, OP_SH, OP_SW: begin
        c.alusrc = 1'b1; c.aluop = ALU_ADD; c.memwrite = 1'b1;
        c.uses_rs = 1'b1; c.uses_rt = 1'b1;
        c.memsize = (op == OP_SW) ? SZ_WORD : (op == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      OP_BEQ:  begin c.branch = BR_EQ;  c.uses_rs = 1'b1; c.uses_rt = 1'b1; end
      OP_BNE:  begin c.branch = BR_NE;  c.uses_rs = 1'b1; c.uses_rt = 1'b1; end
      OP_BLEZ: begin c.branch = BR_LEZ; c.uses_rs = 1'b1; end
      OP_BGTZ: begin c.branch = BR_GTZ; c.uses_rs = 1'b1; end
      OP_REGIMM: begin
        c.branch  = rt[0] ? BR_GEZ : BR_LTZ;
        c.uses_rs = 1'b1;
      end
      OP_J:   c.jump = 1'b1;
      OP_JAL: begin
        c.jump = 1'b1; c.regwrite = 1'b1; c.regdst = DST_R31; c.ressrc = RES_LINK;
      end
      OP_HLT: c.hlt = 1'b1;
      default: ;
    endcase
  end
endmodule
