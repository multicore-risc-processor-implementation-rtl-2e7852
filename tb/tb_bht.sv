// tb_bht: self-checking test of the branch history table.
//
// A model of 64 two-bit saturating counters (reset to weakly not-taken) is
// updated alongside the table with random branch outcomes at random
// addresses; the prediction read in the same cycle must match the model's
// upper counter bit. Also checks saturation at both ends, that the
// prediction changes only after two opposite outcomes from a strong state,
// and that rows are selected by pc[7:2] (addresses 256 bytes apart alias).
module tb_bht;
  logic        clk = 1'b0, rst;
  logic [31:0] rd_pc, wr_pc;
  logic        pred_taken, wr_en, taken;

  bht #(.ROWS(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [1:0] model [64];

  task automatic upd(input logic [31:0] pc, input bit t);
    wr_en = 1; wr_pc = pc; taken = t;
    @(posedge clk); #1;
    wr_en = 0;
    if (t && model[pc[7:2]] != 3) model[pc[7:2]]++;
    else if (!t && model[pc[7:2]] != 0) model[pc[7:2]]--;
  endtask

  task automatic look(input logic [31:0] pc, input string msg);
    rd_pc = pc; #1;
    check(pred_taken == model[pc[7:2]][1], msg);
  endtask

  initial begin
    rst = 1; wr_en = 0; wr_pc = 0; taken = 0; rd_pc = 0;
    foreach (model[i]) model[i] = 2'd1;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    look(32'h0, "reset predicts not taken");
    upd(32'h30, 1);
    look(32'h30, "one taken -> predict taken");
    upd(32'h30, 1); upd(32'h30, 1); upd(32'h30, 1);
    upd(32'h30, 0);
    look(32'h30, "strong taken survives one not-taken");
    upd(32'h30, 0);
    look(32'h30, "two not-taken flip the prediction");
    check(!pred_taken, "flipped to not taken");
    repeat (5) upd(32'h44, 0);
    upd(32'h44, 1);
    look(32'h44, "saturated at 0");
    check(!pred_taken, "one taken from strong not-taken still predicts not taken");
    upd(32'h8, 1);
    look(32'h108, "pc 0x108 shares row with 0x8");
    check(pred_taken, "aliasing row predicts taken");
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] p;
      p = {22'b0, 8'($urandom), 2'b00};
      upd(p, 1'($urandom));
      look({22'b0, 8'($urandom), 2'b00}, "random lookup");
    end
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
