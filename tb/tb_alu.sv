// tb_alu: self-checking test of the ALU.
//
// Compares every ALU operation against a reference written in the
// testbench, on random operands plus the corner values 0, 1, all ones and
// the most negative number, and random shift amounts. The ALU is
// combinational, so results are checked after a short settle delay.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  alu_op_e     op;

  alu dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] x,
                                          input logic [31:0] z, input logic [4:0] s);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return ((x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z});
      ALU_SLTU: return {31'b0, x < z};
      ALU_SLL:  return z << s;
      ALU_SRL:  return z >> s;
      ALU_SRA:  begin
                  logic [63:0] t;
                  t = {{32{z[31]}}, z} >> s;
                  return t[31:0];
                end
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return '0;
    endcase
  endfunction

  localparam logic [31:0] CORNER [4] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000};
  localparam alu_op_e OPS [12] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                                   ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI};

  task automatic try1(input alu_op_e o, input logic [31:0] x, input logic [31:0] z,
                      input logic [4:0] s);
    logic [31:0] e;
    op = o; a = x; b = z; shamt = s;
    #1;
    e = ref_alu(o, x, z, s);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL: %s a=%h b=%h s=%0d y=%h expected %h", o.name(), x, z, s, y, e);
    end
  endtask

  initial begin
    foreach (OPS[i]) begin
      foreach (CORNER[j]) foreach (CORNER[k]) try1(OPS[i], CORNER[j], CORNER[k], 5'd31);
      repeat (300) try1(OPS[i], $urandom, $urandom, 5'($urandom));
    end
    // spot values
    op = ALU_SLT; a = 32'hFFFF_FFFF; b = 32'h1; #1;
    checks++; if (y != 32'd1) begin failures++; $display("FAIL: -1 < 1 signed"); end
    op = ALU_SLTU; #1;
    checks++; if (y != 32'd0) begin failures++; $display("FAIL: 0xFFFFFFFF < 1 unsigned"); end
    op = ALU_SRA; b = 32'h8000_0000; shamt = 5'd4; #1;
    checks++; if (y != 32'hF800_0000) begin failures++; $display("FAIL: sra sign fill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
