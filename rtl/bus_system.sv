// bus_system: connects the caches of the cores to main memory and keeps the
// data caches coherent (MESI, snooping).
//
// Instruction side: the instruction caches share the instruction-segment
// port; a round-robin arbiter grants it to one cache, which keeps it until
// it signals done. Data side: the data caches share the data-segment port
// the same way, and in addition, when a cache is granted the bus, the bus
// looks up the state of the requested block in the other cache (snoop):
//   - other copy Modified: raise wb_in to that cache, route its write-back
//     to memory, and only then grant the requester;
//   - otherwise grant at once and, in the same edge, change the other copy
//     to S (requester reads) or I (requester writes).
// The requester learns through shared whether another copy remains, so it
// can fill the line as S rather than E. With two cores the "other" cache is
// the one not granted. The document gives the bus system's role (Figs. 7, 8,
// 10: wb_in, wb_done, Mem_rdy) but not its insides; the arbitration, the
// split into an instruction and a data path and the request/grant/done
// handshake are this design's.
module bus_system
  import mips_pkg::*;
#(
  parameter int unsigned NCORES = 2
) (
  input  logic     clk,
  input  logic     rst,
  // instruction caches
  input  ic2bus_t  ic_i     [NCORES],
  output bus2ic_t  ic_o     [NCORES],
  input  mem_req_t icm_i    [NCORES],
  output mem_rsp_t icm_o    [NCORES],
  // data caches
  input  dc2bus_t  dc_i     [NCORES],
  output bus2dc_t  dc_o     [NCORES],
  input  mem_req_t dcm_i    [NCORES],
  output mem_rsp_t dcm_o    [NCORES],
  output snoop_t   snp_o    [NCORES],
  output logic [31:0] snp_addr,       // broadcast snoop address
  input  mesi_e    snp_state[NCORES],
  input  logic     wb_done  [NCORES],
  // main memory

  output mem_req_t imem_o,
  input  mem_rsp_t imem_i,
  output mem_req_t dmem_o,
  input  mem_rsp_t dmem_i
);
  localparam int unsigned CW = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam mem_req_t MEM_IDLE = '{addr: '0, wsel: '0, rd: 1'b0, wr: 1'b0, rst_dly: 1'b1, wdata: '0};

  // ---------------- instruction path ----------------
  logic          i_busy, i_pick_ok;
  logic [CW-1:0] i_owner, i_last, i_pick;

  always_comb begin
    i_pick_ok = 1'b0;
    i_pick    = '0;
    for (int k = 1; k <= NCORES; k++) begin
      if (!i_pick_ok && ic_i[(int'(i_last) + k) % NCORES].req) begin
        i_pick_ok = 1'b1;
        i_pick    = CW'((int'(i_last) + k) % NCORES);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_busy  <= 1'b0;
      i_owner <= '0;
      i_last  <= CW'(NCORES - 1);
    end else if (!i_busy) begin
      if (i_pick_ok) begin
        i_busy  <= 1'b1;
        i_owner <= i_pick;
      end
    end else if (ic_i[i_owner].done) begin
      i_busy <= 1'b0;
      i_last <= i_owner;
    end
  end

  always_comb begin
    imem_o = i_busy ? icm_i[i_owner] : MEM_IDLE;
    for (int c = 0; c < NCORES; c++) begin
      ic_o[c].gnt = i_busy && i_owner == CW'(c);
      icm_o[c]    = imem_i;
      if (!ic_o[c].gnt) icm_o[c].rdy = 1'b0;
    end
  end

  // ---------------- data path with snooping ----------------
  typedef enum logic [1:0] { B_IDLE, B_WB, B_OWN } bstate_e;
  bstate_e       bstate;
  logic [CW-1:0] d_owner, d_last, d_pick;
  logic          d_pick_ok, any_mod, any_copy, shared_q;
  logic [31:0]   addr_q;
  snoop_e        op_q, pick_op;
  logic [NCORES-1:0] wbing_q;   // caches asked to write back
  logic [NCORES-1:0] wb_done_vec;

  always_comb
    for (int c = 0; c < NCORES; c++) wb_done_vec[c] = wb_done[c];

  always_comb begin
    d_pick_ok = 1'b0;
    d_pick    = '0;
    for (int k = 1; k <= NCORES; k++) begin
      if (!d_pick_ok && dc_i[(int'(d_last) + k) % NCORES].req) begin
        d_pick_ok = 1'b1;
        d_pick    = CW'((int'(d_last) + k) % NCORES);
      end
    end
    pick_op = dc_i[d_pick].req_wr ? SNP_INV : SNP_SHARE;
  end

  // snoop address and the answers of the other caches
  assign snp_addr = (bstate == B_IDLE) ? dc_i[d_pick].addr : addr_q;

  always_comb begin
    any_mod  = 1'b0;
    any_copy = 1'b0;
    for (int c = 0; c < NCORES; c++) begin
      if (CW'(c) != d_pick) begin
        if (snp_state[c] == MESI_M) any_mod = 1'b1;
        if (snp_state[c] != MESI_I) any_copy = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bstate   <= B_IDLE;
      d_owner  <= '0;
      d_last   <= CW'(NCORES - 1);
      addr_q   <= '0;
      op_q     <= SNP_NONE;
      shared_q <= 1'b0;
      wbing_q  <= '0;
    end else begin
      unique case (bstate)
        B_IDLE: if (d_pick_ok) begin
          d_owner  <= d_pick;
          addr_q   <= dc_i[d_pick].addr;
          op_q     <= pick_op;
          shared_q <= any_copy && pick_op == SNP_SHARE;
          if (any_mod) begin
            bstate <= B_WB;
            for (int c = 0; c < NCORES; c++)
              wbing_q[c] <= CW'(c) != d_pick && snp_state[c] == MESI_M;
          end else begin
            bstate <= B_OWN;
          end
        end
        B_WB: begin
          for (int c = 0; c < NCORES; c++)
            if (wbing_q[c] && wb_done[c]) wbing_q[c] <= 1'b0;
          if ((wbing_q & ~wb_done_vec) == '0) bstate <= B_OWN;
        end
        B_OWN: if (dc_i[d_owner].done) begin
          bstate <= B_IDLE;
          d_last <= d_owner;
        end
        default: bstate <= B_IDLE;
      endcase
    end
  end


  always_comb begin
    dmem_o = MEM_IDLE;
    if (bstate == B_OWN) dmem_o = dcm_i[d_owner];
    for (int c = 0; c < NCORES; c++)
      if (bstate == B_WB && wbing_q[c]) dmem_o = dcm_i[c];

    for (int c = 0; c < NCORES; c++) begin
      dc_o[c].gnt    = bstate == B_OWN && d_owner == CW'(c);
      dc_o[c].shared = shared_q;
      dcm_o[c]       = dmem_i;
      snp_o[c].wb_in = bstate == B_WB && wbing_q[c];
      snp_o[c].op    = SNP_NONE;
      if (bstate == B_IDLE && d_pick_ok && !any_mod && CW'(c) != d_pick)
        snp_o[c].op = pick_op;
      if (bstate == B_WB && wbing_q[c])
        snp_o[c].op = op_q;
      if (!(dc_o[c].gnt || snp_o[c].wb_in)) dcm_o[c].rdy = 1'b0;
    end
  end

  // Only one data cache owns the bus; a cache asked to write back is never the owner.
  for (genvar g = 0; g < NCORES; g++) begin : g_chk
    a_wb_not_owner: assert property (@(posedge clk) disable iff (rst)
      snp_o[g].wb_in |-> !dc_o[g].gnt);
    a_owner_requests: assert property (@(posedge clk) disable iff (rst)
      dc_o[g].gnt |-> dc_i[g].req);
  end
endmodule
