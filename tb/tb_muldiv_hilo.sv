// tb_muldiv_hilo: self-checking test of the multiply/divide unit and the
// Hi/Lo registers.
//
// Each operation is applied for one clock with en = 1 and Hi/Lo are checked
// on the next cycle against a 64-bit reference, so the one-cycle latency is
// checked too. Covers mult, multu, div, divu (including negative operands
// and the divide-by-zero convention of this design), mthi, mtlo, and that
// Hi/Lo hold their value when en = 0 or op = none.
module tb_muldiv_hilo;
  import mips_pkg::*;

  logic        clk = 1'b0, rst, en;
  md_op_e      op;
  logic [31:0] a, b, hi, lo;

  muldiv_hilo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] ehi, elo;

  task automatic apply(input md_op_e o, input logic [31:0] x, input logic [31:0] z);
    longint sx, sz;
    logic [63:0] p;
    op = o; a = x; b = z; en = 1;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      MD_MULT:  begin p = 64'(sx * sz); ehi = p[63:32]; elo = p[31:0]; end
      MD_MULTU: begin p = {32'b0, x} * {32'b0, z}; ehi = p[63:32]; elo = p[31:0]; end
      MD_DIV:   if (z == 0) begin elo = '1; ehi = x; end
                else begin elo = 32'(sx / sz); ehi = 32'(sx % sz); end
      MD_DIVU:  if (z == 0) begin elo = '1; ehi = x; end
                else begin elo = x / z; ehi = x % z; end
      MD_MTHI:  ehi = x;
      MD_MTLO:  elo = x;
      default:  ;
    endcase
    @(posedge clk); #1;
    en = 0;
    check(hi == ehi && lo == elo,
          $sformatf("%s %h,%h -> hi=%h lo=%h expected %h %h", o.name(), x, z, hi, lo, ehi, elo));
  endtask

  initial begin
    rst = 1; en = 0; op = MD_NONE; a = 0; b = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    ehi = 0; elo = 0;
    check(hi == 0 && lo == 0, "Hi/Lo reset to 0");
    apply(MD_MULT, 32'd5, 32'd6);
    apply(MD_MULT, 32'hFFFF_FFFF, 32'd7);           // -1 * 7
    apply(MD_MULTU, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(MD_DIV, 32'hFFFF_FFF9, 32'd2);            // -7 / 2
    apply(MD_DIVU, 32'd100, 32'd7);
    apply(MD_DIV, 32'd9, 32'd0);
    apply(MD_DIVU, 32'd9, 32'd0);
    apply(MD_MTHI, 32'h1111_2222, 32'd0);
    apply(MD_MTLO, 32'h3333_4444, 32'd0);
    for (int k = 0; k < 400; k++) begin
      md_op_e o;
      logic [31:0] x, z;
      o = md_op_e'($urandom_range(6, 1));
      x = $urandom; z = $urandom;
      if ($urandom_range(3) == 0) z = 32'($urandom_range(9));
      if (o == MD_DIV && x == 32'h8000_0000 && z == 32'hFFFF_FFFF) z = 32'd3;
      apply(o, x, z);
    end
    // hold
    op = MD_MULT; a = 32'd3; b = 32'd3; en = 0;
    @(posedge clk); #1;
    check(hi == ehi && lo == elo, "Hi/Lo hold when en = 0");
    op = MD_NONE; en = 1;
    @(posedge clk); #1;
    en = 0;
    check(hi == ehi && lo == elo, "Hi/Lo hold for op none");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
