// nsr_pkg: types and constants shared by the units of the NSR processor.
//
// The NSR is a 16-bit RISC whose units (fetch, decode, execute, register
// file, memory interface) talk only through queues. This package holds the
// instruction opcodes, the bit positions of the one-hot operation word that
// decode sends to execute, and the register-usage word that decode sends to
// the register file. The opcode values and both word layouts follow the
// instruction set and the two encoding tables of the original design; the
// field positions of the extra words that follow an operation word
// (immediate, shift code, condition) are read from how that table draws them.
package nsr_pkg;

  localparam int unsigned XLEN = 16;
  typedef logic [XLEN-1:0] word_t;

  // Major opcode, instruction bits 15:12.
  typedef enum logic [3:0] {
    OP_JMP  = 4'b0000,
    OP_BCND = 4'b0001,
    OP_MVIH = 4'b0010,
    OP_MVIL = 4'b0011,
    OP_SUB  = 4'b0100,
    OP_SCC  = 4'b0101,  // SEQ/SGT/SGE/SNE, condition in bits 11:10
    OP_SHFT = 4'b0110,  // SHLL/SHRL/SHRA, shift code in bits 7:4
    OP_MVPC = 4'b0111,
    OP_AND  = 4'b1000,
    OP_OR   = 4'b1001,
    OP_XOR  = 4'b1010,
    OP_XNOR = 4'b1011,
    OP_ADD  = 4'b1100,
    OP_SJMP = 4'b1101,
    OP_LDA  = 4'b1110,
    OP_STA  = 4'b1111
  } opcode_e;

  // Condition codes of the compare instructions (instruction bits 11:10).
  typedef enum logic [1:0] {
    CC_EQ = 2'b00,
    CC_GT = 2'b01,
    CC_GE = 2'b10,
    CC_NE = 2'b11
  } cond_e;

  // Shift codes (instruction bits 7:4).
  localparam logic [3:0] SH_LL = 4'b0001;
  localparam logic [3:0] SH_RL = 4'b0010;
  localparam logic [3:0] SH_RA = 4'b0100;

  // Bit positions in the one-hot operation word sent from decode to execute.
  localparam int unsigned EXB_STA   = 15;
  localparam int unsigned EXB_LDA   = 14;
  localparam int unsigned EXB_SJMP  = 13;
  localparam int unsigned EXB_ADD   = 12;
  localparam int unsigned EXB_XNOR  = 11;
  localparam int unsigned EXB_XOR   = 10;
  localparam int unsigned EXB_OR    = 9;
  localparam int unsigned EXB_AND   = 8;
  localparam int unsigned EXB_MVPC  = 7;
  localparam int unsigned EXB_SHIFT = 6;
  localparam int unsigned EXB_SETCC = 5;
  localparam int unsigned EXB_SUB   = 4;
  localparam int unsigned EXB_MVIL  = 3;
  localparam int unsigned EXB_MVIH  = 2;
  localparam int unsigned EXB_R1    = 1;  // result goes to the store data queue
  localparam int unsigned EXB_R0    = 0;  // result is discarded

  // Register-usage word sent from decode to the register file (14 bits).
  typedef struct packed {
    logic [3:0] dest;   // 13:10, 0 = no register result expected
    logic [3:0] src_a;  // 9:6
    logic       va;     // 5
    logic [3:0] src_b;  // 4:1
    logic       vb;     // 0
  } usage_t;

  // Address queue entry: store flag and word address.
  typedef struct packed {
    logic  store;
    word_t addr;
  } aq_t;

  // Hard-wired register contents.
  localparam word_t R14_VALUE = 16'h0001;
  localparam word_t R15_VALUE = 16'hFFFF;

endpackage
