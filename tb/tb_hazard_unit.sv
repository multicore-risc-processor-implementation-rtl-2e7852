// tb_hazard_unit: self-checking test of the hazard unit.
//
// Directed cases: forwarding from M and from W into execute (M wins when
// both match, register 0 never forwards), forwarding an ALU result from M
// into decode for a branch, the load-use stall (fetch and decode held,
// execute flushed), the branch-operand stall, the cache freeze holding the
// whole pipeline without flushing, hlt holding fetch, and a redirect
// flushing decode. Then random inputs are checked against the rules as
// properties.
module tb_hazard_unit;
  logic       freeze, stop, redirectD;
  logic [4:0] rsD, rtD, rsE, rtE, writeregE, writeregM, writeregW;
  logic       uses_rsD, uses_rtD, needregD;
  logic       regwriteE, memreadE, regwriteM, memreadM, regwriteW;
  logic [1:0] forwardAE, forwardBE;
  logic       forwardAD, forwardBD, stallF, stallD, flushD, flushE, stallEMW;
  logic       lwstall, bstall;

  hazard_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic clear();
    freeze = 0; stop = 0; redirectD = 0;
    rsD = 0; rtD = 0; rsE = 0; rtE = 0; writeregE = 0; writeregM = 0; writeregW = 0;
    uses_rsD = 0; uses_rtD = 0; needregD = 0;
    regwriteE = 0; memreadE = 0; regwriteM = 0; memreadM = 0; regwriteW = 0;
  endtask

  initial begin
    clear(); #1;
    check(!stallF && !stallD && !flushD && !flushE && !stallEMW, "quiet pipeline");
    check(forwardAE == 0 && forwardBE == 0, "no forwarding");

    rsE = 5; rtE = 6; regwriteM = 1; writeregM = 5; regwriteW = 1; writeregW = 6; #1;
    check(forwardAE == 2'b10 && forwardBE == 2'b01, "forward M to A, W to B");
    writeregW = 5; #1;
    check(forwardAE == 2'b10, "M has priority over W");
    rsE = 0; writeregM = 0; writeregW = 0; #1;
    check(forwardAE == 0, "register 0 never forwarded");
    clear();

    rsD = 3; regwriteM = 1; writeregM = 3; #1;
    check(forwardAD && !forwardBD, "forward M to decode");
    memreadM = 1; #1;
    check(!forwardAD, "no decode forwarding of a load in M");
    clear();

    uses_rsD = 1; rsD = 7; regwriteE = 1; memreadE = 1; writeregE = 7; #1;
    check(lwstall && stallF && stallD && flushE && !flushD, "load-use stall");
    uses_rsD = 0; #1;
    check(!lwstall, "no stall when rs is not read");
    uses_rtD = 1; rtD = 7; rsD = 2; #1;
    check(lwstall && stallF && flushE, "load-use stall on rt");
    clear();

    needregD = 1; uses_rtD = 1; rtD = 9; regwriteE = 1; writeregE = 9; #1;
    check(bstall && !lwstall && stallF && flushE, "branch waits for an ALU result in E");
    regwriteE = 0; regwriteM = 1; memreadM = 1; writeregM = 9; #1;
    check(bstall, "branch waits for a load in M");
    memreadM = 0; #1;
    check(!bstall && forwardBD, "branch takes an ALU result from M by forwarding");
    clear();

    freeze = 1; uses_rsD = 1; rsD = 7; regwriteE = 1; memreadE = 1; writeregE = 7; redirectD = 1; #1;
    check(stallF && stallD && stallEMW && !flushE && !flushD, "freeze holds everything");
    clear();

    stop = 1; #1;
    check(stallF && flushE && !stallEMW, "hlt holds fetch and drains");
    clear();
    redirectD = 1; #1;
    check(flushD && !stallF, "redirect flushes decode");
    uses_rsD = 1; rsD = 7; regwriteE = 1; memreadE = 1; writeregE = 7; #1;
    check(!flushD, "redirect waits while decode is stalled");
    clear();

    for (int k = 0; k < 5000; k++) begin
      {freeze, stop, redirectD, uses_rsD, uses_rtD, needregD} = 6'($urandom);
      freeze = freeze & ($urandom_range(3) == 0);
      {regwriteE, memreadE, regwriteM, memreadM, regwriteW} = 5'($urandom);
      rsD = 5'($urandom_range(3)); rtD = 5'($urandom_range(3));
      rsE = 5'($urandom_range(3)); rtE = 5'($urandom_range(3));
      writeregE = 5'($urandom_range(3)); writeregM = 5'($urandom_range(3));
      writeregW = 5'($urandom_range(3));
      #1;
      check(forwardAE != 2'b10 || (regwriteM && writeregM == rsE && rsE != 0), "fwdAE M rule");
      check(forwardAE != 2'b01 || (regwriteW && writeregW == rsE && rsE != 0 &&
                                   !(regwriteM && writeregM == rsE)), "fwdAE W rule");
      check(forwardAE != 2'b00 || rsE == 0 || !((regwriteM && writeregM == rsE) ||
                                                (regwriteW && writeregW == rsE)), "fwdAE missed");
      check(forwardBE != 2'b11 && forwardAE != 2'b11, "fwd code 11 unused");
      check(lwstall == (memreadE && regwriteE &&
                        ((uses_rsD && rsD != 0 && writeregE == rsD) ||
                         (uses_rtD && rtD != 0 && writeregE == rtD))), "lwstall rule");
      check(stallF == (freeze || lwstall || bstall || stop), "stallF rule");
      check(stallEMW == freeze, "stallEMW rule");
      check(!(freeze && (flushD || flushE)), "no flush while frozen");
      check(!(flushD && stallD), "never flush and stall decode together");
    end
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
