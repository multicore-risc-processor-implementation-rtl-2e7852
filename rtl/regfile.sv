// regfile: the 32 x 32-bit general register file of one core.
//
// Two combinational read ports (A1/A2 -> RD1/RD2) and one write port
// (A3/WD3/WE3) written on the rising clock edge. Register 0 always reads 0.
// A read of the register being written in the same cycle returns the new
// value (write-through), which replaces the write-on-falling-edge trick of
// classic textbook pipelines: an instruction in decode sees the result of the
// one in write-back without a forwarding path. Registers reset to 0.
module regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  a1,
  input  logic [4:0]  a2,
  input  logic [4:0]  a3,
  input  logic        we3,
  input  logic [31:0] wd3,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);
  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we3 && a3 != 5'd0) begin
      regs[a3] <= wd3;
    end
  end

  always_comb begin
    rd1 = (a1 == 5'd0) ? '0 : (we3 && a3 == a1) ? wd3 : regs[a1];
    rd2 = (a2 == 5'd0) ? '0 : (we3 && a3 == a2) ? wd3 : regs[a2];
  end
endmodule
