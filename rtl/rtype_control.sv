// rtype_control: funct decoder for R-type instructions.
//
// Takes the base control word from main_control (register destination rd,
// both sources used) and refines it from the funct field: the ALU operation
// and shift kind, jr/jalr, the multiply/divide/move-to-Hi/Lo operations
// (which write no general register) and mfhi/mflo (which take their result
// from Hi or Lo). Unknown funct values decode as a no-op. The document
// shows an "R_type control" block beside the main control; the encodings
// are this design's.
module rtype_control
  import mips_pkg::*;
(
  input  logic [5:0] funct,
  input  ctrl_t      base,
  output ctrl_t      c
);
  always_comb begin
    c = base;
    unique case (funct)
      FN_ADD, FN_ADDU: c.aluop = ALU_ADD;
      FN_SUB, FN_SUBU: c.aluop = ALU_SUB;
      FN_AND:  c.aluop = ALU_AND;
      FN_OR:   c.aluop = ALU_OR;
      FN_XOR:  c.aluop = ALU_XOR;
      FN_NOR:  c.aluop = ALU_NOR;
      FN_SLT:  c.aluop = ALU_SLT;
      FN_SLTU: c.aluop = ALU_SLTU;
      FN_SLL:  begin c.aluop = ALU_SLL; c.uses_rs = 1'b0; end
      FN_SRL:  begin c.aluop = ALU_SRL; c.uses_rs = 1'b0; end
      FN_SRA:  begin c.aluop = ALU_SRA; c.uses_rs = 1'b0; end
      FN_SLLV: begin c.aluop = ALU_SLL; c.shiftvar = 1'b1; end
      FN_SRLV: begin c.aluop = ALU_SRL; c.shiftvar = 1'b1; end
      FN_SRAV: begin c.aluop = ALU_SRA; c.shiftvar = 1'b1; end
      FN_JR:   begin c.jr = 1'b1; c.regwrite = 1'b0; c.uses_rt = 1'b0; end
      FN_JALR: begin c.jr = 1'b1; c.ressrc = RES_LINK; c.uses_rt = 1'b0; end
      FN_MFHI: begin c.ressrc = RES_HI; c.uses_rs = 1'b0; c.uses_rt = 1'b0; end
      FN_MFLO: begin c.ressrc = RES_LO; c.uses_rs = 1'b0; c.uses_rt = 1'b0; end
      FN_MTHI: begin c.mdop = MD_MTHI; c.regwrite = 1'b0; c.uses_rt = 1'b0; end
      FN_MTLO: begin c.mdop = MD_MTLO; c.regwrite = 1'b0; c.uses_rt = 1'b0; end
      FN_MULT:  begin c.mdop = MD_MULT;  c.regwrite = 1'b0; end
      FN_MULTU: begin c.mdop = MD_MULTU; c.regwrite = 1'b0; end
      FN_DIV:   begin c.mdop = MD_DIV;   c.regwrite = 1'b0; end
      FN_DIVU:  begin c.mdop = MD_DIVU;  c.regwrite = 1'b0; end
      default: begin c = CTRL_NOP; end
    endcase
  end
endmodule
