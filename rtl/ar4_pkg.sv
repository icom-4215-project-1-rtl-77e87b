// ar4_pkg: types and constants shared by the RISC AR4 processor.
//
// The AR4 is an 8-bit accumulator machine with 16-bit instructions. Every
// instruction starts with a 5-bit opcode in bits 15..11; register-direct
// instructions name register f in bits 10..8, and immediate and direct
// instructions carry an 8-bit operand or address in bits 7..0. The opcode
// values, the ZCNO status layout, the 256-byte memory and the I/O addresses
// 250..255 follow the processor description. Opcodes that the instruction set
// leaves unused are treated as NOP; that is a choice of this design.
package ar4_pkg;

  localparam int unsigned DATA_W = 8;   // internal data bus
  localparam int unsigned ADDR_W = 8;   // 256 memory bytes
  localparam int unsigned INSTR_W = 16; // instruction register
  localparam int unsigned NREGS = 8;    // R0..R7
  localparam int unsigned REG_AW = 3;

  // Memory-mapped devices
  localparam logic [ADDR_W-1:0] KBD_HI_ADDR  = 8'd250; // keyboard, high byte
  localparam logic [ADDR_W-1:0] KBD_LO_ADDR  = 8'd251; // keyboard, low byte
  localparam logic [ADDR_W-1:0] DISP_BASE    = 8'd252; // display chars 252..255

  // Branch targets are taken from this register
  localparam logic [REG_AW-1:0] BRANCH_REG = 3'd7;

  typedef enum logic [4:0] {
    OP_AND   = 5'b00000,
    OP_OR    = 5'b00001,
    OP_XOR   = 5'b00010,
    OP_ADDC  = 5'b00011,
    OP_SUB   = 5'b00100,
    OP_MAC   = 5'b00101,
    OP_NEG   = 5'b00110,
    OP_NOT   = 5'b00111,
    OP_RLC   = 5'b01000,
    OP_RRC   = 5'b01001,
    OP_LDAR  = 5'b01010,  // LDA rf
    OP_STAR  = 5'b01011,  // STA rf
    OP_LDAM  = 5'b01100,  // LDA addr
    OP_STAM  = 5'b01101,  // STA addr
    OP_LDI   = 5'b01110,
    OP_BRZ   = 5'b10000,
    OP_BRC   = 5'b10001,
    OP_BRN   = 5'b10010,
    OP_BRO   = 5'b10011,
    OP_NOP   = 5'b11000,
    OP_STOP  = 5'b11111
  } opcode_e;

  // Operations of the ALU (the MAC has its own unit)
  typedef enum logic [3:0] {
    ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB,
    ALU_NEG, ALU_NOT, ALU_RLC, ALU_RRC
  } alu_op_e;

  // Status register, printed order ZCNO (Z is the most significant bit)
  typedef struct packed {
    logic z;  // zero
    logic c;  // carry
    logic n;  // negative
    logic o;  // overflow
  } flags_t;

  // Source of a new accumulator value
  typedef enum logic [2:0] {
    ASRC_ALU, ASRC_MAC, ASRC_REG, ASRC_MEM, ASRC_IMM
  } acc_src_e;

  // Memory address source chosen by the control unit
  typedef enum logic [1:0] {
    MA_PC,    // PC, high byte of the instruction
    MA_PC1,   // PC+1, low byte of the instruction
    MA_OPND   // bits 7..0 of IR, direct address
  } maddr_e;

  // Control unit states
  typedef enum logic [2:0] {
    S_FETCH0,  // wait for run/step, then put PC on the memory address
    S_FETCH1,  // high byte arrives, put PC+1 on the address
    S_FETCH2,  // low byte arrives, PC += 2
    S_EXEC,    // execute
    S_MEMRD,   // second cycle of LDA addr: data arrives
    S_HALT     // after STOP
  } state_e;

endpackage
