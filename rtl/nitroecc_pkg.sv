// nitroecc_pkg: constants and types shared by the NitroECC processor and its
// arithmetic units.
//
// The processor works on 256-bit unsigned words ("stack words") held in a
// memory of 64-bit words, so one stack word occupies four consecutive memory
// words, most significant first. Instructions are 64-bit words; an opcode word
// carries its 8-bit operation code in bits [7:0] and zeros above. The opcode
// values and the secp256k1 field prime are the ones the design specifies; the
// enum and struct packaging is this implementation's own.
package nitroecc_pkg;

  // Width of an arithmetic operand / stack word.
  localparam int unsigned WORD_W = 256;
  // Width of a memory word (instruction memory and stack memory).
  localparam int unsigned MEM_W = 64;
  // Memory words per stack word.
  localparam int unsigned WORDS_PER_ENTRY = WORD_W / MEM_W;

  typedef logic [WORD_W-1:0] u256_t;
  typedef logic [MEM_W-1:0]  mword_t;

  // Field prime of secp256k1: 2^256 - 2^32 - 977.
  localparam u256_t SECP256K1_P =
      256'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFC2F;

  // Operation codes (low byte of an opcode word).
  typedef enum logic [7:0] {
    OP_DATA    = 8'h00,  // copy next four instruction words onto the stack
    OP_HALT    = 8'h01,
    OP_POPAA   = 8'h02,  // top of stack -> adder A
    OP_POPAB   = 8'h03,  // top of stack -> adder B
    OP_POPDA   = 8'h04,  // top of stack -> divider A (dividend)
    OP_POPDB   = 8'h05,  // top of stack -> divider B (divisor)
    OP_POPSA   = 8'h06,  // top of stack -> subtracter A (minuend)
    OP_POPSB   = 8'h07,  // top of stack -> subtracter B (subtrahend)
    OP_POPMA   = 8'h08,  // top of stack -> multiplier A
    OP_POPMB   = 8'h09,  // top of stack -> multiplier B
    OP_DROP    = 8'h0A,  // stack pointer down one stack word
    OP_PUSHAO  = 8'h0B,  // adder output -> stack
    OP_PUSHDQ  = 8'h0C,  // divider quotient -> stack
    OP_PUSHDR  = 8'h0D,  // divider remainder -> stack
    OP_PUSHSO  = 8'h0E,  // subtracter output -> stack
    OP_PUSHMO  = 8'h0F,  // multiplier output -> stack
    OP_FORWARD = 8'h10,  // stack pointer up one stack word
    OP_SWAP    = 8'h11,  // exchange the top two stack words
    OP_MUL     = 8'h12,  // start multiplier and wait for it
    OP_DIV     = 8'h13   // start divider and wait for it
  } opcode_t;

  // Operand register selected by a pop, in opcode order (opcode - 2).
  typedef enum logic [2:0] {
    SEL_AA = 3'd0, SEL_AB = 3'd1, SEL_DA = 3'd2, SEL_DB = 3'd3,
    SEL_SA = 3'd4, SEL_SB = 3'd5, SEL_MA = 3'd6, SEL_MB = 3'd7
  } opsel_t;

endpackage
