// hazard_unit: forwarding, stall and flush control of one pipelined core.
//
// Forwarding into execute: from memory (aluoutM, any non-load result) with
// priority over write-back (resultW); select 2'b10 = M, 2'b01 = W, 2'b00 =
// register value. Forwarding into decode (for branch compare and jr): from
// memory when the producer there is not a load (1) or none (0); results in
// write-back reach decode through the register file's write-through.
// Stalls: a load in execute whose destination decode reads (load-use);
// a branch or jr in decode whose source is produced by the instruction in
// execute or by a load in memory; a halted core (stop) freezes fetch and
// decode and feeds bubbles. freeze (either cache not ready) holds every
// pipeline register and suppresses flushes. flushD kills the wrongly fetched
// instruction after a branch misprediction or jr. The document names a
// hazard unit with these stall/forward outputs; the exact rules are this
// design's.
module hazard_unit (
  input  logic       freeze,
  input  logic       stop,
  input  logic       redirectD,
  input  logic [4:0] rsD,
  input  logic [4:0] rtD,
  input  logic       uses_rsD,
  input  logic       uses_rtD,
  input  logic       needregD,     // branch or jr in decode
  input  logic [4:0] rsE,
  input  logic [4:0] rtE,
  input  logic [4:0] writeregE,
  input  logic       regwriteE,
  input  logic       memreadE,
  input  logic [4:0] writeregM,
  input  logic       regwriteM,
  input  logic       memreadM,
  input  logic [4:0] writeregW,
  input  logic       regwriteW,
  output logic [1:0] forwardAE,
  output logic [1:0] forwardBE,
  output logic       forwardAD,
  output logic       forwardBD,
  output logic       stallF,
  output logic       stallD,
  output logic       flushD,
  output logic       flushE,
  output logic       stallEMW,
  output logic       lwstall,
  output logic       bstall
);
  logic rs_e, rt_e, rs_m, rt_m;

  always_comb begin
    forwardAE = 2'b00;
    if (rsE != 5'd0 && regwriteM && writeregM == rsE)      forwardAE = 2'b10;
    else if (rsE != 5'd0 && regwriteW && writeregW == rsE) forwardAE = 2'b01;
    forwardBE = 2'b00;
    if (rtE != 5'd0 && regwriteM && writeregM == rtE)      forwardBE = 2'b10;
    else if (rtE != 5'd0 && regwriteW && writeregW == rtE) forwardBE = 2'b01;

    forwardAD = rsD != 5'd0 && regwriteM && !memreadM && writeregM == rsD;
    forwardBD = rtD != 5'd0 && regwriteM && !memreadM && writeregM == rtD;

    rs_e = uses_rsD && rsD != 5'd0 && regwriteE && writeregE == rsD;
    rt_e = uses_rtD && rtD != 5'd0 && regwriteE && writeregE == rtD;
    rs_m = uses_rsD && rsD != 5'd0 && regwriteM && memreadM && writeregM == rsD;
    rt_m = uses_rtD && rtD != 5'd0 && regwriteM && memreadM && writeregM == rtD;

    lwstall = memreadE && (rs_e || rt_e);
    bstall  = needregD && (rs_e || rt_e || rs_m || rt_m);

    stallF   = freeze || lwstall || bstall || stop;
    stallD   = stallF;
    stallEMW = freeze;
    flushE   = !freeze && (lwstall || bstall || stop);
    flushD   = !freeze && !lwstall && !bstall && !stop && redirectD;
  end
endmodule
