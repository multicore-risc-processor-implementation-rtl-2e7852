// alu: the arithmetic/logic unit of the execute stage.
//
// Purely combinational. Operand a is rs, operand b is rt or the extended
// immediate, shamt is the shift amount (the shamt field or rs[4:0] for the
// variable shifts, chosen by the core). The operation set covers the MIPS
// integer instructions the core decodes: add/sub (no overflow trap, this
// design's choice), and/or/xor/nor, signed and unsigned set-less-than,
// logical and arithmetic shifts, and lui. The document names the ALU in its
// core diagram but not its operation encoding; the encoding is alu_op_e of
// mips_pkg.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alu_op_e     op,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'b0};
      default:  y = '0;
    endcase
  end
endmodule
