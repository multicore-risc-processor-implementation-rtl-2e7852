// mips_core: one core of the multicore system, a 5-stage pipelined MIPS
// (fetch, decode, execute, memory, write-back) with its own instruction and
// data caches.
//
// Fetch: the PC addresses the instruction cache. A 64-row branch history
// table predicts conditional branches in fetch (the target is computed there
// from the fetched immediate); j/jal are redirected in fetch at no cost.
// Decode: the main and R-type decoders, the register file, and branch and
// jr resolution with forwarding from the memory stage. A misprediction or a
// jr redirects the PC and flushes the one wrongly fetched instruction. There
// are no delay slots. Execute: ALU, the multiply/divide unit with Hi/Lo
// (results visible to the next instruction's mfhi/mflo), link address for
// jal/jalr. Memory: the data cache with byte/half/word loads (sign or zero
// extended) and stores; little-endian byte order within a word. Write-back:
// register file write.
//
// The hazard unit forwards M->E, W->E and M->D, stalls on load-use and on a
// branch/jr that needs a result not yet available, and freezes the whole
// pipeline while either cache reports stall (miss, coherence action).
// hlt (opcode 111100) stops fetching: the instructions ahead of it drain
// and halted rises when hlt reaches write-back.
//
// memwrite/memread/dataadr/writedata show the memory-stage access in the
// cycle it completes (the signals of the document's simulation waveform);
// retire pulses once per instruction leaving write-back.
//
// From the document: five stages, separate I and D caches per core, BHT of
// 2 bits x 64 rows, Hi/Lo with a mult/div unit, branch comparison in decode,
// byte/half load extension, hlt. This design's choices: single clock edge
// (the document's stages capture on alternating edges), the BHT index and
// update rule, one-cycle multiply/divide, no overflow exceptions.
module mips_core
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction cache <-> bus system
  output ic2bus_t     ic_bus_o,
  input  bus2ic_t     ic_bus_i,
  output mem_req_t    ic_mem_o,
  input  mem_rsp_t    ic_mem_i,
  // data cache <-> bus system
  output dc2bus_t     dc_bus_o,
  input  bus2dc_t     dc_bus_i,
  output mem_req_t    dc_mem_o,
  input  mem_rsp_t    dc_mem_i,
  input  snoop_t      snp_i,
  input  logic [31:0] snp_addr,
  output mesi_e       snp_state,
  output logic        wb_done,
  // observation
  output logic        halted,
  output logic        memwrite,
  output logic        memread,
  output logic [31:0] dataadr,
  output logic [31:0] writedata,
  output logic        retire
);
  // ================= hazard / control nets =================
  logic stallF, stallD, flushD, flushE, stallEMW;
  logic lwstall, bstall;   // observed by testbenches (stall statistics)
  logic [1:0] forwardAE, forwardBE;
  logic forwardAD, forwardBD;
  logic istall, dstall, freeze, stop;

  assign freeze = istall || dstall;

  // ================= fetch =================
  logic [31:0] pcF, pcnextF, instrF, pcplus4F, pcbranchF, pcjumpF;
  logic        isbrF, isjF, bhtpredF, predF;
  logic        redirectD;
  logic [31:0] redirect_pcD;

  icache u_icache (
    .clk, .rst, .en(!stop), .pc(pcF), .instr(instrF), .stall(istall),
    .bus_o(ic_bus_o), .bus_i(ic_bus_i), .mem_o(ic_mem_o), .mem_i(ic_mem_i)
  );

  always_comb begin
    isbrF     = instrF[31:26] inside {OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_REGIMM};
    isjF      = instrF[31:26] inside {OP_J, OP_JAL};
    pcplus4F  = pcF + 32'd4;
    pcbranchF = pcplus4F + {{14{instrF[15]}}, instrF[15:0], 2'b00};
    pcjumpF   = {pcplus4F[31:28], instrF[25:0], 2'b00};
    predF     = isbrF && bhtpredF;
    if (redirectD)  pcnextF = redirect_pcD;
    else if (isjF)  pcnextF = pcjumpF;
    else if (predF) pcnextF = pcbranchF;
    else            pcnextF = pcplus4F;
  end

  always_ff @(posedge clk) begin
    if (rst)          pcF <= RESET_PC;
    else if (!stallF) pcF <= pcnextF;
  end

  // ================= F/D =================
  logic [31:0] instrD, pcplus4D;
  logic        predD, validD;

  always_ff @(posedge clk) begin
    if (rst || (flushD && !stallD)) begin
      instrD   <= '0;
      pcplus4D <= '0;
      predD    <= 1'b0;
      validD   <= 1'b0;
    end else if (!stallD) begin
      instrD   <= instrF;
      pcplus4D <= pcplus4F;
      predD    <= predF;
      validD   <= 1'b1;
    end
  end

  // ================= decode =================
  ctrl_t       mctrlD, rctrlD, ctrlD;
  logic [4:0]  rsD, rtD, rdD, writeregD;
  logic [31:0] rd1D, rd2D, cmpAD, cmpBD, immD, pcbranchD;
  logic        takenD, branchD;

  assign rsD = instrD[25:21];
  assign rtD = instrD[20:16];
  assign rdD = instrD[15:11];

  main_control  u_main  (.op(instrD[31:26]), .rt(rtD), .c(mctrlD));
  rtype_control u_rtype (.funct(instrD[5:0]), .base(mctrlD), .c(rctrlD));

  always_comb begin
    if (!validD)                         ctrlD = CTRL_NOP;
    else if (instrD[31:26] == OP_RTYPE)  ctrlD = rctrlD;
    else                                 ctrlD = mctrlD;
  end

  logic        regwriteW;
  logic [4:0]  writeregW;
  logic [31:0] resultW, aluoutM;

  regfile u_rf (
    .clk, .rst, .a1(rsD), .a2(rtD), .a3(writeregW), .we3(regwriteW), .wd3(resultW),
    .rd1(rd1D), .rd2(rd2D)
  );

  always_comb begin
    cmpAD     = forwardAD ? aluoutM : rd1D;
    cmpBD     = forwardBD ? aluoutM : rd2D;
    immD      = ctrlD.zeroext ? {16'b0, instrD[15:0]} : {{16{instrD[15]}}, instrD[15:0]};
    pcbranchD = pcplus4D + {{14{instrD[15]}}, instrD[15:0], 2'b00};
    unique case (ctrlD.branch)
      BR_EQ:   takenD = cmpAD == cmpBD;
      BR_NE:   takenD = cmpAD != cmpBD;
      BR_LEZ:  takenD = $signed(cmpAD) <= 0;
      BR_GTZ:  takenD = $signed(cmpAD) > 0;
      BR_LTZ:  takenD = cmpAD[31];
      BR_GEZ:  takenD = !cmpAD[31];
      default: takenD = 1'b0;
    endcase
    branchD = ctrlD.branch != BR_NONE;
    unique case (ctrlD.regdst)
      DST_RD:  writeregD = rdD;
      DST_R31: writeregD = 5'd31;
      default: writeregD = rtD;
    endcase
    redirectD = (branchD && takenD != predD) || ctrlD.jr;
    if (ctrlD.jr)    redirect_pcD = cmpAD;
    else if (takenD) redirect_pcD = pcbranchD;
    else             redirect_pcD = pcplus4D;
  end

  bht u_bht (
    .clk, .rst, .rd_pc(pcF), .pred_taken(bhtpredF),
    .wr_en(branchD && !stallD), .wr_pc(pcplus4D - 32'd4), .taken(takenD)
  );

  always_ff @(posedge clk) begin
    if (rst)                        stop <= 1'b0;
    else if (ctrlD.hlt && !stallD)  stop <= 1'b1;
  end

  // ================= D/E =================
  ctrl_t       ctrlE;
  logic [31:0] rd1E, rd2E, immE, pcplus4E;
  logic [4:0]  rsE, rtE, writeregE, shamtE;
  logic        validE;

  always_ff @(posedge clk) begin
    if (rst || (flushE && !stallEMW)) begin
      ctrlE <= CTRL_NOP; rd1E <= '0; rd2E <= '0; immE <= '0; pcplus4E <= '0;
      rsE <= '0; rtE <= '0; writeregE <= '0; shamtE <= '0; validE <= 1'b0;
    end else if (!stallEMW) begin
      ctrlE <= ctrlD; rd1E <= rd1D; rd2E <= rd2D; immE <= immD; pcplus4E <= pcplus4D;
      rsE <= rsD; rtE <= rtD; writeregE <= writeregD; shamtE <= instrD[10:6];
      validE <= validD;
    end
  end

  // ================= execute =================
  logic [31:0] srcAE, writedataE, srcBE, aluresE, execresE, hi, lo;
  logic [4:0]  shamtX;

  always_comb begin
    unique case (forwardAE)
      2'b10:   srcAE = aluoutM;
      2'b01:   srcAE = resultW;
      default: srcAE = rd1E;
    endcase
    unique case (forwardBE)
      2'b10:   writedataE = aluoutM;
      2'b01:   writedataE = resultW;
      default: writedataE = rd2E;
    endcase
    srcBE  = ctrlE.alusrc ? immE : writedataE;
    shamtX = ctrlE.shiftvar ? srcAE[4:0] : shamtE;
  end

  alu u_alu (.a(srcAE), .b(srcBE), .shamt(shamtX), .op(ctrlE.aluop), .y(aluresE));

  muldiv_hilo u_md (
    .clk, .rst, .en(!stallEMW && ctrlE.mdop != MD_NONE), .op(ctrlE.mdop),
    .a(srcAE), .b(writedataE), .hi, .lo
  );

  always_comb begin
    unique case (ctrlE.ressrc)
      RES_HI:   execresE = hi;
      RES_LO:   execresE = lo;
      RES_LINK: execresE = pcplus4E;
      default:  execresE = aluresE;
    endcase
  end

  // ================= E/M =================
  ctrl_t       ctrlM;
  logic [31:0] writedataM;
  logic [4:0]  writeregM;
  logic        validM;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrlM <= CTRL_NOP; aluoutM <= '0; writedataM <= '0; writeregM <= '0; validM <= 1'b0;
    end else if (!stallEMW) begin
      ctrlM <= ctrlE; aluoutM <= execresE; writedataM <= writedataE;
      writeregM <= writeregE; validM <= validE;
    end
  end

  // ================= memory =================
  logic [31:0] dc_wdata, dc_rdata, loadM, resultM, shiftedM;
  logic [3:0]  dc_be;
  logic [1:0]  boff;

  assign boff = aluoutM[1:0];

  always_comb begin
    unique case (ctrlM.memsize)
      SZ_BYTE: begin dc_wdata = {4{writedataM[7:0]}};  dc_be = 4'b0001 << boff; end
      SZ_HALF: begin dc_wdata = {2{writedataM[15:0]}}; dc_be = boff[1] ? 4'b1100 : 4'b0011; end
      default: begin dc_wdata = writedataM;            dc_be = 4'b1111; end
    endcase
  end

  dcache u_dcache (
    .clk, .rst, .re(ctrlM.memread), .we(ctrlM.memwrite), .addr(aluoutM),
    .wdata(dc_wdata), .be(dc_be), .rdata(dc_rdata), .stall(dstall),
    .bus_o(dc_bus_o), .bus_i(dc_bus_i), .mem_o(dc_mem_o), .mem_i(dc_mem_i),
    .snp_i, .snp_addr, .snp_state, .wb_done
  );

  always_comb begin
    shiftedM = dc_rdata >> {boff, 3'b000};
    unique case (ctrlM.memsize)
      SZ_BYTE: loadM = ctrlM.memunsigned ? {24'b0, shiftedM[7:0]}  : {{24{shiftedM[7]}}, shiftedM[7:0]};
      SZ_HALF: loadM = ctrlM.memunsigned ? {16'b0, shiftedM[15:0]} : {{16{shiftedM[15]}}, shiftedM[15:0]};
      default: loadM = dc_rdata;
    endcase
    resultM = ctrlM.memread ? loadM : aluoutM;
  end

  // ================= M/W =================
  logic validW, hltW;

  always_ff @(posedge clk) begin
    if (rst) begin
      resultW <= '0; writeregW <= '0; regwriteW <= 1'b0; validW <= 1'b0; hltW <= 1'b0;
    end else if (!stallEMW) begin
      resultW <= resultM; writeregW <= writeregM; regwriteW <= ctrlM.regwrite;
      validW <= validM; hltW <= ctrlM.hlt;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       halted <= 1'b0;
    else if (hltW) halted <= 1'b1;
  end

  // ================= hazard unit =================
  hazard_unit u_hz (
    .freeze, .stop, .redirectD,
    .rsD, .rtD, .uses_rsD(ctrlD.uses_rs), .uses_rtD(ctrlD.uses_rt),
    .needregD(branchD || ctrlD.jr),
    .rsE, .rtE, .writeregE, .regwriteE(ctrlE.regwrite), .memreadE(ctrlE.memread),
    .writeregM, .regwriteM(ctrlM.regwrite), .memreadM(ctrlM.memread),
    .writeregW, .regwriteW,
    .forwardAE, .forwardBE, .forwardAD, .forwardBD,
    .stallF, .stallD, .flushD, .flushE, .stallEMW, .lwstall, .bstall
  );

  // ================= observation =================
  assign memwrite  = ctrlM.memwrite && !freeze;
  assign memread   = ctrlM.memread && !freeze;
  assign dataadr   = aluoutM;
  assign writedata = writedataM;
  assign retire    = validW && !stallEMW;
endmodule
