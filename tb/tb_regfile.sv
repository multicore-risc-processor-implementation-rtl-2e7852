// tb_regfile: self-checking test of the 32 x 32 register file.
//
// Random writes and reads are compared with a model array. Checks that
// register 0 always reads 0, that a write is visible on both read ports
// after the clock edge, that a read of the register being written in the
// same cycle returns the new value (write-through), and that reset clears
// every register.
module tb_regfile;
  logic        clk = 1'b0, rst;
  logic [4:0]  a1, a2, a3;
  logic        we3;
  logic [31:0] wd3, rd1, rd2;

  regfile #(.NREGS(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] model [32];

  initial begin
    rst = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 32; r++) begin
      a1 = 5'(r); #1;
      check(rd1 == 0, $sformatf("r%0d zero after reset", r));
    end
    for (int k = 0; k < 2000; k++) begin
      we3 = 1'($urandom); a3 = 5'($urandom); wd3 = $urandom;
      a1 = ($urandom_range(3) == 0) ? a3 : 5'($urandom);
      a2 = 5'($urandom);
      #1;
      check(rd1 == ((we3 && a1 == a3 && a1 != 0) ? wd3 : model[a1]),
            $sformatf("port 1 read r%0d", a1));
      check(rd2 == ((we3 && a2 == a3 && a2 != 0) ? wd3 : model[a2]),
            $sformatf("port 2 read r%0d", a2));
      @(posedge clk); #1;
      if (we3 && a3 != 0) model[a3] = wd3;
    end
    we3 = 1; a3 = 0; wd3 = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    we3 = 0; a1 = 0; a2 = 0; #1;
    check(rd1 == 0 && rd2 == 0, "writes to r0 are ignored");
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    a1 = 5'd7; a2 = 5'd31; #1;
    check(rd1 == 0 && rd2 == 0, "reset clears registers");
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
