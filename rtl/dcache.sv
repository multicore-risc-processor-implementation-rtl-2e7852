// dcache: private data cache of one core, with its MESI controller.
//
// Direct-mapped, write-back, write-allocate: 4 lines of 4 words, a 26-bit tag
// and a 2-bit MESI state per line (tag = addr[31:6], line = addr[5:4], word =
// addr[3:2]). There is no replacement choice to make: a miss evicts the one
// line the address maps to, after writing it back if it is Modified.
//
// Processor side: re/we with a byte address, byte enables be and the store
// data already placed in its byte lanes. rdata is the addressed word. A hit
// is served in the same cycle (stall = 0); otherwise stall = 1 freezes the
// whole pipeline until the FSM has done its work and serves the access.
// Reads hit in S, E and M; writes hit in E and M (E becomes M silently). A
// write to a Shared line needs the bus first so the other copy is
// invalidated.
//
// FSM states follow the controller of the document (idle, read cache, write
// cache, ww0-3 = write the victim block back word by word, rw0-3 = read the
// block from memory word by word, and a second ww0-3 that writes the line
// back when the bus system asks for it with wb_in). A write-back request has
// priority over the core's own access. Each word state waits for Mem_rdy
// from memory; Rst_dly is 0 only in the word states. The read-cache and
// write-cache states serve the access after a fill and hand the bus back
// (done). After a fill the line is E, or S when the bus reports that the
// other cache holds the block; a write makes it M.
//
// Snooping: the bus system looks up the state of the line at snp_addr
// (snp_state) and, when the other core acquires that block, changes it with
// snp_op at the clock edge (SHARE: to S, INV: to I); when the line is M it
// first raises wb_in and the change happens at the end of the write-back
// (wb_done pulse, the document's wb_done_out). A local access to the line
// index being snooped is held back for that cycle so a write cannot slip
// past the state change.
//
// Document's choices followed: states, outputs and their meaning (Tables I
// and II), 26-bit tag + 2 MESI bits, 4x4-word geometry. This design's
// choices: MESI encoding (I=00), a write miss fetches the block before
// writing, stall is active high (the document's table uses 1 = run), the
// request/grant/done handshake with the bus, byte enables, and serving
// hits straight from idle (read cache and write cache are used only after
// bus work).
module dcache
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        re,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  output logic [31:0] rdata,
  output logic        stall,
  // bus side
  output dc2bus_t     bus_o,
  input  bus2dc_t     bus_i,
  output mem_req_t    mem_o,
  input  mem_rsp_t    mem_i,
  // snoop side
  input  snoop_t      snp_i,
  input  logic [31:0] snp_addr,
  output mesi_e       snp_state,
  output logic        wb_done
);
  typedef enum logic [3:0] {
    ST_IDLE, ST_WRITE, ST_READ,
    ST_WW0, ST_WW1, ST_WW2, ST_WW3,
    ST_RW0, ST_RW1, ST_RW2, ST_RW3,
    ST_SWB0, ST_SWB1, ST_SWB2, ST_SWB3
  } state_e;

  state_e state, state_n;

  logic [31:0]      data [LINES][WORDS];
  logic [TAG_W-1:0] tags [LINES];
  mesi_e            mesi [LINES];

  logic [1:0]       idx, wrd, sidx, wsel;
  logic [TAG_W-1:0] tag, stag;
  logic             access, tag_match, hit, local_ok, snp_block, snp_hit;
  mesi_e            lstate;

  // control outputs of the FSM (names of the document's Table II)
  logic cachewr, cache_data_src, memrd, memwr, mem_addr_src, rst_dly, wb_done_out;
  logic serve, bus_req, bus_done, fill_last;

  assign idx  = addr[5:4];
  assign wrd  = addr[3:2];
  assign tag  = addr[31:6];
  assign sidx = snp_addr[5:4];
  assign stag = snp_addr[31:6];

  assign access    = re || we;
  assign lstate    = mesi[idx];
  assign tag_match = tags[idx] == tag;
  assign hit       = tag_match && lstate != MESI_I;
  assign local_ok  = hit && (re || lstate == MESI_E || lstate == MESI_M);
  assign snp_hit   = tags[sidx] == stag && mesi[sidx] != MESI_I;
  assign snp_block = snp_i.op != SNP_NONE && !snp_i.wb_in && sidx == idx;

  assign rdata = data[idx][wrd];

  // ---------------- FSM outputs (Table I style: a function of the state) ----
  logic in_ww, in_rw, in_swb;
  assign in_ww  = state inside {ST_WW0, ST_WW1, ST_WW2, ST_WW3};
  assign in_rw  = state inside {ST_RW0, ST_RW1, ST_RW2, ST_RW3};
  assign in_swb = state inside {ST_SWB0, ST_SWB1, ST_SWB2, ST_SWB3};

  always_comb begin
    memrd          = in_rw;
    memwr          = in_ww || in_swb;
    cache_data_src = in_rw;
    mem_addr_src   = in_ww || in_swb;
    rst_dly        = !(in_ww || in_rw || in_swb);
    bus_done       = state inside {ST_READ, ST_WRITE};
    bus_req        = (state == ST_IDLE) ? (access && !local_ok) : !in_swb;
    unique case (state)
      ST_WW1, ST_RW1, ST_SWB1: wsel = 2'b01;
      ST_WW2, ST_RW2, ST_SWB2: wsel = 2'b10;
      ST_WW3, ST_RW3, ST_SWB3: wsel = 2'b11;
      default:                 wsel = 2'b00;
    endcase
  end

  // ---------------- next state, stall and serve ----------------
  always_comb begin
    state_n     = state;
    stall       = access;
    serve       = 1'b0;
    cachewr     = in_rw;
    wb_done_out = 1'b0;
    fill_last   = 1'b0;

    unique case (state)
      ST_IDLE: begin
        if (snp_i.wb_in) begin
          state_n = ST_SWB0;      // write-back request has priority
        end else if (access) begin
          if (local_ok) begin
            if (!snp_block) begin
              stall   = 1'b0;
              serve   = 1'b1;
              cachewr = we;
            end
          end else if (bus_i.gnt) begin
            if (hit)                   state_n = we ? ST_WRITE : ST_READ;
            else if (lstate == MESI_M) state_n = ST_WW0;
            else                       state_n = ST_RW0;
          end
        end
      end
      ST_READ, ST_WRITE: begin
        stall   = 1'b0;
        serve   = 1'b1;
        cachewr = (state == ST_WRITE);
        state_n = ST_IDLE;
      end
      ST_WW0, ST_WW1, ST_WW2, ST_WW3:
        if (mem_i.rdy) state_n = (state == ST_WW3) ? ST_RW0 : state_e'(state + 4'd1);
      ST_RW0, ST_RW1, ST_RW2, ST_RW3:
        if (mem_i.rdy) begin
          fill_last = (state == ST_RW3);
          state_n   = (state == ST_RW3) ? (we ? ST_WRITE : ST_READ) : state_e'(state + 4'd1);
        end
      ST_SWB0, ST_SWB1, ST_SWB2, ST_SWB3:
        if (mem_i.rdy) begin
          wb_done_out = (state == ST_SWB3);
          state_n     = (state == ST_SWB3) ? ST_IDLE : state_e'(state + 4'd1);
        end
      default: state_n = ST_IDLE;
    endcase
  end

  // ---------------- bus outputs ----------------
  assign snp_state = snp_hit ? mesi[sidx] : MESI_I;
  assign wb_done   = wb_done_out;

  assign bus_o.req    = bus_req;
  assign bus_o.req_wr = we;
  assign bus_o.done   = bus_done;
  assign bus_o.addr   = addr;

  always_comb begin
    mem_o.rd      = memrd;
    mem_o.wr      = memwr;
    mem_o.rst_dly = rst_dly;
    mem_o.wsel    = wsel;
    // amem: processor address, or (tag & I & 0) of the line being written back
    if (in_swb)            mem_o.addr = {tags[sidx], sidx, 4'b0000};
    else if (mem_addr_src) mem_o.addr = {tags[idx], idx, 4'b0000};
    else                   mem_o.addr = {tag, idx, 4'b0000};
    mem_o.wdata = in_swb ? data[sidx][wsel] : data[idx][wsel];
  end

  // ---------------- state and arrays ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      for (int i = 0; i < LINES; i++) mesi[i] <= MESI_I;
    end else begin
      state <= state_n;
      // snoop state change without write-back (other core acquires a block)
      if (snp_i.op != SNP_NONE && !snp_i.wb_in && !in_swb && snp_hit)
        mesi[sidx] <= (snp_i.op == SNP_INV) ? MESI_I : MESI_S;
      // end of a requested write-back
      if (wb_done_out)
        mesi[sidx] <= (snp_i.op == SNP_INV) ? MESI_I : MESI_S;
      // fill completes
      if (fill_last) begin
        tags[idx] <= tag;
        mesi[idx] <= bus_i.shared ? MESI_S : MESI_E;
      end
      // processor write
      if (serve && cachewr) mesi[idx] <= MESI_M;
    end
  end

  always_ff @(posedge clk) begin
    if (cachewr) begin
      if (cache_data_src) begin
        if (mem_i.rdy) data[idx][wsel] <= mem_i.rdata;
      end else if (serve) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) data[idx][wrd][8*b +: 8] <= wdata[8*b +: 8];
      end
    end
  end

  // A Modified line is never served to the bus without a write-back first.
  a_no_share_of_modified: assert property (@(posedge clk) disable iff (rst)
    (snp_i.op != SNP_NONE && !snp_i.wb_in && !in_swb) |-> snp_state != MESI_M);
endmodule
