// mips_pkg: shared types and constants of the dual-core MIPS system.
//
// Holds the MIPS opcode and funct encodings (standard MIPS-I values, plus
// the extra hlt opcode 6'b111100 that stops a core), the ALU operation and
// control-signal types used by the decoders and the pipeline, the MESI line
// states of the data cache, and the address split of the caches:
// tag = addr[31:6] (26 bits), line index = addr[5:4], word = addr[3:2],
// byte = addr[1:0]. The split and the 26-bit tag follow the cache figures;
// the MESI encoding (Invalid = 00, so a reset clears every line) is this
// design's choice.
package mips_pkg;

  // ---------------- address split of both caches ----------------
  localparam int unsigned TAG_W   = 26;   // addr[31:6]
  localparam int unsigned LINES   = 4;    // addr[5:4]
  localparam int unsigned WORDS   = 4;    // words per block, addr[3:2]

  // ---------------- opcodes ----------------
  typedef enum logic [5:0] {
    OP_RTYPE  = 6'b000000,
    OP_REGIMM = 6'b000001,
    OP_J      = 6'b000010,
    OP_JAL    = 6'b000011,
    OP_BEQ    = 6'b000100,
    OP_BNE    = 6'b000101,
    OP_BLEZ   = 6'b000110,
    OP_BGTZ   = 6'b000111,
    OP_ADDI   = 6'b001000,
    OP_ADDIU  = 6'b001001,
    OP_SLTI   = 6'b001010,
    OP_SLTIU  = 6'b001011,
    OP_ANDI   = 6'b001100,
    OP_ORI    = 6'b001101,
    OP_XORI   = 6'b001110,
    OP_LUI    = 6'b001111,
    OP_LB     = 6'b100000,
    OP_LH     = 6'b100001,
    OP_LW     = 6'b100011,
    OP_LBU    = 6'b100100,
    OP_LHU    = 6'b100101,
    OP_SB     = 6'b101000,
    OP_SH     = 6'b101001,
    OP_SW     = 6'b101011,
    OP_HLT    = 6'b111100
  } opcode_e;

  // ---------------- funct field of R-type ----------------
  typedef enum logic [5:0] {
    FN_SLL   = 6'b000000,
    FN_SRL   = 6'b000010,
    FN_SRA   = 6'b000011,
    FN_SLLV  = 6'b000100,
    FN_SRLV  = 6'b000110,
    FN_SRAV  = 6'b000111,
    FN_JR    = 6'b001000,
    FN_JALR  = 6'b001001,
    FN_MFHI  = 6'b010000,
    FN_MTHI  = 6'b010001,
    FN_MFLO  = 6'b010010,
    FN_MTLO  = 6'b010011,
    FN_MULT  = 6'b011000,
    FN_MULTU = 6'b011001,
    FN_DIV   = 6'b011010,
    FN_DIVU  = 6'b011011,
    FN_ADD   = 6'b100000,
    FN_ADDU  = 6'b100001,
    FN_SUB   = 6'b100010,
    FN_SUBU  = 6'b100011,
    FN_AND   = 6'b100100,
    FN_OR    = 6'b100101,
    FN_XOR   = 6'b100110,
    FN_NOR   = 6'b100111,
    FN_SLT   = 6'b101010,
    FN_SLTU  = 6'b101011
  } funct_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } branch_e;

  typedef enum logic [2:0] {
    MD_NONE, MD_MULT, MD_MULTU, MD_DIV, MD_DIVU, MD_MTHI, MD_MTLO
  } md_op_e;

  typedef enum logic [1:0] { RES_ALU, RES_HI, RES_LO, RES_LINK } res_src_e;
  typedef enum logic [1:0] { DST_RT, DST_RD, DST_R31 } reg_dst_e;
  typedef enum logic [1:0] { SZ_BYTE, SZ_HALF, SZ_WORD } mem_size_e;

  // Decoded control of one instruction, produced in decode.
  typedef struct packed {
    logic      regwrite;
    reg_dst_e  regdst;
    logic      alusrc;     // 1: immediate is ALU operand B
    logic      zeroext;    // 1: immediate is zero-extended
    alu_op_e   aluop;
    logic      shiftvar;   // 1: shift amount from rs, else shamt
    logic      memread;
    logic      memwrite;
    mem_size_e memsize;
    logic      memunsigned;
    branch_e   branch;
    logic      jump;       // j / jal
    logic      jr;         // jr / jalr
    md_op_e    mdop;
    res_src_e  ressrc;
    logic      uses_rs;
    logic      uses_rt;
    logic      hlt;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    regwrite: 1'b0, regdst: DST_RT, alusrc: 1'b0, zeroext: 1'b0, aluop: ALU_ADD,
    shiftvar: 1'b0, memread: 1'b0, memwrite: 1'b0, memsize: SZ_WORD,
    memunsigned: 1'b0, branch: BR_NONE, jump: 1'b0, jr: 1'b0, mdop: MD_NONE,
    ressrc: RES_ALU, uses_rs: 1'b0, uses_rt: 1'b0, hlt: 1'b0};

  // ---------------- MESI ----------------
  typedef enum logic [1:0] {
    MESI_I = 2'b00,
    MESI_S = 2'b01,
    MESI_E = 2'b10,
    MESI_M = 2'b11
  } mesi_e;

  // Snoop action the bus applies to the other data cache.
  typedef enum logic [1:0] { SNP_NONE, SNP_SHARE, SNP_INV } snoop_e;

  // ---------------- bus bundles ----------------
  // One memory port of main_memory (word-serial block transfers).
  typedef struct packed {
    logic [31:0] addr;     // block address; bits [8:4] select the block
    logic [1:0]  wsel;     // word of the block
    logic        rd;       // memrd
    logic        wr;       // memwr
    logic        rst_dly;  // 1: no memory activity, restart the delay counter
    logic [31:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        rdy;      // Mem_rdy: the addressed word is read or written
  } mem_rsp_t;

  // Data cache -> bus system: request for the bus.
  typedef struct packed {
    logic        req;        // wants the bus (miss or write to a Shared line)
    logic        req_wr;     // the access is a write (needs ownership)
    logic        done;       // last cycle of ownership
    logic [31:0] addr;       // processor address of the access
  } dc2bus_t;

  // Bus system -> data cache: grant.
  typedef struct packed {
    logic        gnt;        // this cache owns the bus
    logic        shared;     // the other cache holds the block being fetched
  } bus2dc_t;

  // Bus system -> data cache: snoop request for the line at the broadcast
  // snoop address.
  typedef struct packed {
    logic        wb_in;      // write back that line
    snoop_e      op;         // state change of that line (applied at the edge,
                             // or at the end of the write-back)
  } snoop_t;

  // Instruction cache -> bus system and back.
  typedef struct packed {
    logic req;
    logic done;
  } ic2bus_t;

  typedef struct packed {
    logic gnt;
  } bus2ic_t;

endpackage
