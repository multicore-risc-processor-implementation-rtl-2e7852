// icache: private instruction cache of one core.
//
// Direct-mapped and read-only: 4 lines of 4 words with a 26-bit tag and a
// valid bit per line (tag = pc[31:6], line = pc[5:4], word = pc[3:2]). A hit
// returns the instruction in the same cycle with stall = 0. On a miss the
// cache asks the bus system for the instruction memory; once granted it
// walks rw0..rw3, copying one word per Mem_rdy, sets the tag and valid bit,
// and serves the fetch in the read-cache state, which also hands the bus
// back (done). Valid bits reset to 0. The states, the one-bit valid flag
// and the outputs follow the document's instruction-cache FSM and truth
// table; the request/grant/done handshake and the active-high stall are
// this design's, and so is serving a hit straight from idle (the
// document's diagram routes a hit through read cache, which with one clock
// edge would cost a second cycle per fetch).
module icache
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,       // a fetch is wanted this cycle
  input  logic [31:0] pc,
  output logic [31:0] instr,
  output logic        stall,
  output ic2bus_t     bus_o,
  input  bus2ic_t     bus_i,
  output mem_req_t    mem_o,
  input  mem_rsp_t    mem_i
);
  typedef enum logic [2:0] { ST_IDLE, ST_READ, ST_RW0, ST_RW1, ST_RW2, ST_RW3 } state_e;
  state_e state, state_n;

  logic [31:0]      data [LINES][WORDS];
  logic [TAG_W-1:0] tags [LINES];
  logic             valid [LINES];

  logic [1:0]       idx, wrd, wsel;
  logic [TAG_W-1:0] tag;
  logic             hit, cachewr, memrd, rst_dly, fill_last;

  assign idx   = pc[5:4];
  assign wrd   = pc[3:2];
  assign tag   = pc[31:6];
  assign hit   = valid[idx] && tags[idx] == tag;
  assign instr = data[idx][wrd];

  // outputs of the FSM: a function of the state (Table III style)
  logic in_rw;
  assign in_rw = state inside {ST_RW0, ST_RW1, ST_RW2, ST_RW3};

  always_comb begin
    memrd   = in_rw;
    cachewr = in_rw;
    rst_dly = !in_rw;
    unique case (state)
      ST_RW1:  wsel = 2'b01;
      ST_RW2:  wsel = 2'b10;
      ST_RW3:  wsel = 2'b11;
      default: wsel = 2'b00;
    endcase
  end

  assign bus_o.req  = (state == ST_IDLE) ? (en && !hit) : 1'b1;
  assign bus_o.done = state == ST_READ;

  assign mem_o.addr    = {tag, idx, 4'b0000};
  assign mem_o.wsel    = wsel;
  assign mem_o.rd      = memrd;
  assign mem_o.wr      = 1'b0;
  assign mem_o.rst_dly = rst_dly;
  assign mem_o.wdata   = '0;

  always_comb begin
    state_n   = state;
    stall     = en;
    fill_last = 1'b0;
    unique case (state)
      ST_IDLE: if (en) begin
        if (hit)            stall = 1'b0;
        else if (bus_i.gnt) state_n = ST_RW0;
      end
      ST_READ: begin
        stall   = 1'b0;
        state_n = ST_IDLE;
      end
      ST_RW0, ST_RW1, ST_RW2, ST_RW3:
        if (mem_i.rdy) begin
          fill_last = (state == ST_RW3);
          state_n   = (state == ST_RW3) ? ST_READ : state_e'(state + 3'd1);
        end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else begin
      state <= state_n;
      if (fill_last) begin
        tags[idx]  <= tag;
        valid[idx] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cachewr && mem_i.rdy) data[idx][wsel] <= mem_i.rdata;
  end
endmodule
