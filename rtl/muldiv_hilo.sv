// muldiv_hilo: the multiply/divide unit with the Hi and Lo registers.
//
// mult/multu write the 64-bit product ({hi, lo}); div/divu write the
// quotient to lo and the remainder to hi; mthi/mtlo copy rs into hi or lo.
// The operation is taken from the execute stage and written on the rising
// edge when en is high, so an mfhi/mflo in the next instruction (read in
// execute through hi/lo) already sees the result: no forwarding and no
// stall is needed. The document shows a Mult/div unit and Hi/Lo registers
// but not how they work inside; this design computes in one cycle
// (combinational multiplier and divider). Division by zero leaves lo =
// all ones and hi = the dividend (this design's choice, MIPS leaves it
// undefined). Hi and Lo reset to 0.
module muldiv_hilo
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,      // execute stage advances with a valid op
  input  md_op_e      op,
  input  logic [31:0] a,       // rs
  input  logic [31:0] b,       // rt
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [63:0] prod_s, prod_u;
  logic [31:0] q_s, r_s, q_u, r_u;

  always_comb begin
    prod_s = $unsigned($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
    prod_u = {32'b0, a} * {32'b0, b};
    if (b == '0) begin
      q_s = '1; r_s = a; q_u = '1; r_u = a;
    end else begin
      q_s = $unsigned($signed(a) / $signed(b));
      r_s = $unsigned($signed(a) % $signed(b));
      q_u = a / b;
      r_u = a % b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi <= '0;
      lo <= '0;
    end else if (en) begin
      unique case (op)
        MD_MULT:  {hi, lo} <= prod_s;
        MD_MULTU: {hi, lo} <= prod_u;
        MD_DIV:   begin lo <= q_s; hi <= r_s; end
        MD_DIVU:  begin lo <= q_u; hi <= r_u; end
        MD_MTHI:  hi <= a;
        MD_MTLO:  lo <= a;
        default:  ;
      endcase
    end
  end
endmodule
