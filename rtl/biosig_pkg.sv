// biosig_pkg: sizes, request structs and instruction encoding shared by the
// processing units, the data memory, the selection logic and the crossbar.
//
// The sizes follow the platform description: 16-bit data, 24-bit instruction
// words, 4k-word instruction memory per processing unit, sixteen working
// registers, and a data memory of 16 banks of 2k words (64 kBytes).
// The data-memory word address is 15 bits; its top four bits pick the bank
// and the low eleven bits the row inside the bank. That address map and the
// whole instruction encoding below are this design's own choices.
//
// Instruction word (24 bits):
//   [23:20] opcode   [19:16] rd   [15:12] ra   [11:8] rb   [3:0] funct
//   [11:0]  imm12 (sign-extended for ADDI/LD/ST, absolute target for branches)
//   [15:0]  imm16 (LI)
//   SHI: ra shifted by imm12[3:0], kind in imm12[5:4] (0 SLL, 1 SRL, 2 SRA)
//   ST stores register rd; BEQ/BNE/BLT compare register rd with register ra.
package biosig_pkg;

  localparam int unsigned DATA_W     = 16;
  localparam int unsigned INSTR_W    = 24;
  localparam int unsigned IM_DEPTH   = 4096;
  localparam int unsigned IM_AW      = 12;
  localparam int unsigned NREGS      = 16;
  localparam int unsigned N_BANK     = 16;
  localparam int unsigned BANK_DEPTH = 2048;
  localparam int unsigned BANK_AW    = 11;
  localparam int unsigned BSEL_W     = 4;
  localparam int unsigned DM_AW      = BSEL_W + BANK_AW;  // 15-bit word address

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [DM_AW-1:0]   dm_addr_t;

  // Request of one processing unit (or the host) to the data memory:
  // one read and one write per cycle. 1 + 15 + 1 + 15 + 16 = 48 bits.
  typedef struct packed {
    logic     re;
    dm_addr_t raddr;
    logic     we;
    dm_addr_t waddr;
    word_t    wdata;
  } dm_req_t;

  // Request as seen by one bank (bank field already decoded away).
  typedef struct packed {
    logic               re;
    logic [BANK_AW-1:0] raddr;
    logic               we;
    logic [BANK_AW-1:0] waddr;
    word_t              wdata;
  } bank_req_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ALU  = 4'd1,
    OP_ADDI = 4'd2,
    OP_SHI  = 4'd3,
    OP_LI   = 4'd4,
    OP_LD   = 4'd5,
    OP_ST   = 4'd6,
    OP_BEQ  = 4'd7,
    OP_BNE  = 4'd8,
    OP_BLT  = 4'd9,
    OP_JMP  = 4'd10,
    OP_HALT = 4'd11
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD  = 4'd0,
    FN_SUB  = 4'd1,
    FN_AND  = 4'd2,
    FN_OR   = 4'd3,
    FN_XOR  = 4'd4,
    FN_SLL  = 4'd5,
    FN_SRL  = 4'd6,
    FN_SRA  = 4'd7,
    FN_MUL  = 4'd8,   // low 16 bits of the product
    FN_MULH = 4'd9,   // high 16 bits of the signed product
    FN_MIN  = 4'd10,  // signed minimum
    FN_MAX  = 4'd11,  // signed maximum
    FN_SLT  = 4'd12   // 1 when ra < rb (signed)
  } funct_e;

  function automatic logic [BSEL_W-1:0] bank_of(dm_addr_t a);
    return a[DM_AW-1:BANK_AW];
  endfunction

  function automatic logic [BANK_AW-1:0] row_of(dm_addr_t a);
    return a[BANK_AW-1:0];
  endfunction

endpackage
