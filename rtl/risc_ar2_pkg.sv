// risc_ar2_pkg -- types and constants shared by the RISC AR2 processor.
//
// The RISC AR2 is an 8-bit accumulator machine with a 16-bit instruction
// word: a 5-bit opcode in bits 15..11, a 3-bit register field (Regf) in
// bits 10..8 and an 8-bit immediate operand or direct address in bits 7..0.
// The opcode values below are the ones of the instruction-set table; the
// register-field position, the ALU operation codes and the control-word
// layout are this design's own choices.
package risc_ar2_pkg;

  localparam int unsigned AR2_DATA_W = 8;  // internal data bus and accumulator
  localparam int unsigned AR2_ADDR_W = 8;  // 256-byte memory
  localparam int unsigned AR2_IR_W   = 16;  // instruction register
  localparam int unsigned AR2_NREGS  = 8;  // R0..R7
  localparam int unsigned AR2_REG_AW = 3;
  localparam int unsigned AR2_MUL_W  = 4;  // multiplier operand width

  // Opcodes, bits 15..11 of the instruction.
  typedef enum logic [4:0] {
    OP_AND   = 5'b00000,
    OP_OR    = 5'b00001,
    OP_XOR   = 5'b00010,
    OP_ADDC  = 5'b00011,
    OP_MUL   = 5'b00100,
    OP_DIV   = 5'b00101,
    OP_NEG   = 5'b00110,
    OP_RLC   = 5'b00111,
    OP_RRC   = 5'b01000,
    OP_DEC   = 5'b01001,
    OP_LDAR  = 5'b01010,  // LDA rf   : A <- rf
    OP_STAR  = 5'b01011,  // STA rf   : rf <- A
    OP_LDAM  = 5'b01100,  // LDA addr : A <- [addr]
    OP_STAM  = 5'b01101,  // STA addr : [addr] <- A
    OP_LDI   = 5'b01110,  // LDI imm  : A <- imm
    OP_BRZ   = 5'b10000,
    OP_BRC   = 5'b10001,
    OP_BRN   = 5'b10010,
    OP_BRO   = 5'b10011,
    OP_NOP   = 5'b11000,
    OP_STOP  = 5'b11111
  } opcode_e;

  // Status register ZCNO.
  typedef struct packed {
    logic z;  // zero
    logic c;  // carry
    logic n;  // negative
    logic o;  // overflow
  } flags_t;

  // ALU operations (this design's encoding).
  typedef enum logic [3:0] {
    ALU_AND   = 4'd0,
    ALU_OR    = 4'd1,
    ALU_XOR   = 4'd2,
    ALU_ADDC  = 4'd3,
    ALU_DIV   = 4'd4,
    ALU_NEG   = 4'd5,
    ALU_RLC   = 4'd6,
    ALU_RRC   = 4'd7,
    ALU_DEC   = 4'd8,
    ALU_PASSB = 4'd9   // result = source bus, used by the load instructions
  } alu_op_e;

  // Source bus (bus 1) drivers.
  typedef enum logic [1:0] {
    SRC_REG = 2'd0,   // register file read port
    SRC_MEM = 2'd1,   // memory read data
    SRC_IMM = 2'd2    // IR[7:0], immediate operand
  } src_sel_e;

  // Result bus (bus 2) drivers.
  typedef enum logic {
    RES_ALU  = 1'b0,
    RES_MULT = 1'b1
  } res_sel_e;

  // Memory address sources.
  typedef enum logic {
    MADDR_PC = 1'b0,
    MADDR_IR = 1'b1
  } maddr_sel_e;

  // Controller states: every instruction takes FETCH_HI, FETCH_LO, EXEC.
  typedef enum logic [1:0] {
    ST_FETCH_HI = 2'd0,
    ST_FETCH_LO = 2'd1,
    ST_EXEC     = 2'd2,
    ST_HALT     = 2'd3
  } state_e;

  // The control lines produced by the control unit.
  typedef struct packed {
    logic       ir_ld_hi;   // IR[15:8] <- memory data
    logic       ir_ld_lo;   // IR[7:0]  <- memory data
    logic       pc_inc;     // PC <- PC + 1
    logic       pc_ld;      // PC <- source bus (R7 for the branches)
    maddr_sel_e maddr_sel;  // memory address from PC or IR[7:0]
    logic       mem_we;     // memory write, data = A
    logic       rf_we;      // register write, data = A
    logic       rf_sel_r7;  // register read port addresses R7, not Regf
    src_sel_e   src_sel;    // source bus driver
    alu_op_e    alu_op;
    res_sel_e   res_sel;    // result bus driver
    logic       acc_ld;     // A <- result bus
    flags_t     sr_we;      // per-flag write enables of SR
    logic       retire;     // last cycle of an instruction
  } ctrl_t;

endpackage
