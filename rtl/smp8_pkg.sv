// smp8_pkg: types and constants shared by the SMP8 processor.
//
// SMP8 is an 8-bit single-cycle accumulator machine. Every instruction is one
// byte: the upper nibble is the opcode, the lower nibble is an operand that is
// either a data-memory address (LDAC, STAC) or a jump target (JUMP, JMPZ, JPNZ).
// The opcode numbering, the ALU-select encoding and the nine-bit control word
// {nop, load, store, mva, mvr, jump, alu[2:0]} follow the original design.
// The two built-in programs are the design's two demonstration programs; the
// memory images that hold them are this package's choice of representation.
package smp8_pkg;

  localparam int unsigned DATA_W = 8;   // accumulator, R and memory word width
  localparam int unsigned ADDR_W = 4;   // PC and data-memory address width
  localparam int unsigned DEPTH  = 1 << ADDR_W;  // 16 words per memory

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // A 16-word memory image, index 0 first.
  typedef logic [DATA_W-1:0] mem_image_t [DEPTH];

  // Opcodes, instr[7:4].
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDAC = 4'h1,  // AC <- M[a]
    OP_STAC = 4'h2,  // M[a] <- AC
    OP_MVAC = 4'h3,  // R <- AC
    OP_MOVR = 4'h4,  // AC <- R
    OP_JUMP = 4'h5,  // PC <- a
    OP_JMPZ = 4'h6,  // if Z PC <- a
    OP_JPNZ = 4'h7,  // if !Z PC <- a
    OP_ADD  = 4'h8,  // AC <- AC + R
    OP_SUB  = 4'h9,  // AC <- AC - R
    OP_INAC = 4'hA,  // AC <- AC + 1
    OP_CLAC = 4'hB,  // AC <- 0
    OP_AND  = 4'hC,  // AC <- AC & R
    OP_OR   = 4'hD,  // AC <- AC | R
    OP_XOR  = 4'hE,  // AC <- AC ^ R
    OP_NOT  = 4'hF   // AC <- ~AC
  } opcode_e;

  // ALU function select, the low three bits of the control word.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_INC = 3'b010,
    ALU_CLR = 3'b011,
    ALU_AND = 3'b100,
    ALU_OR  = 3'b101,
    ALU_XOR = 3'b110,
    ALU_NOT = 3'b111
  } alu_op_e;

  // The nine-bit control word, most significant field first.
  typedef struct packed {
    logic    nop;    // 1: accumulator is not written this cycle
    logic    load;   // 1: accumulator input comes from data memory
    logic    store;  // 1: data memory writes AC at address instr[3:0]
    logic    mva;    // 1: R is loaded from AC
    logic    mvr;    // 1: accumulator input comes from R
    logic    jump;   // 1: next PC is instr[3:0]
    alu_op_e alu;    // ALU function
  } ctrl_t;

  // Demonstration program 1: load 0x37 from M[0], increment, branch over a
  // JUMP 0 on non-zero, increment, copy AC to R, double AC, store to M[2].
  // Final AC = 0x72.
  localparam mem_image_t TEST1_IMEM = '{
    8'h10, 8'hA0, 8'h74, 8'h50, 8'hA0, 8'h30, 8'h80, 8'h22,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00
  };
  // Data memory for program 1: M[0] = 0x37 (decimal 55), the rest zero.
  localparam mem_image_t TEST1_DMEM = '{
    8'h37, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00
  };
  // Demonstration program 2: clear, increment, copy to R, NOT, XOR with R,
  // JMPZ (not taken), store to M[4]. Final AC = 0xFF.
  localparam mem_image_t TEST2_IMEM = '{
    8'hB0, 8'hA0, 8'h30, 8'hF0, 8'hE0, 8'h6A, 8'h24, 8'h00,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00
  };

endpackage
