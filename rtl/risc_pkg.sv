// risc_pkg: shared types and constants of the 16-bit RISC processor.
//
// The processor has 16-bit instructions and 16-bit data words, eight general
// registers R0-R7 plus SP, LR, PC and a four-bit flag register (N, Z, C, V).
// Every instruction is decoded into one value of op_e and the fields of
// dec_t; the ALU operation codes are alu_op_e. The instruction encodings
// follow the published instruction table; the order of the operand fields
// inside each word, the flag-register bit layout and the special-register
// selector order are this design's own choices (see risc_decoder).
package risc_pkg;

  localparam int unsigned XLEN      = 16;   // data and instruction width
  localparam int unsigned NREGS     = 8;    // R0-R7
  localparam int unsigned DEF_WORDS = 512;  // default memory size (9-bit addresses)
  localparam int unsigned ADDR_BITS = 9;    // width of address fields

  typedef logic [XLEN-1:0] word_t;

  // Flags register, read and written by MOV Rd,flags / MOV flags,Rs as
  // bits [3:0] = {N, Z, C, V}.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // Operations seen by the control unit.
  typedef enum logic [5:0] {
    OP_HLT,
    OP_ALU_IMM,     // Rd <- Rd op #imm8 (MOD/ADD/SUB/AND/ORR/XOR/UDV/MUL), CMP #imm8
    OP_MOV_IMM,     // Rd <- #imm8
    OP_SHIFT_IMM,   // Rd <- Rs shift #count (LSR/LSL), or Rd <- Rd shift #count (ASR/ROR)
    OP_ALU_RRR,     // Rd <- Rs op Rb
    OP_ALU_RR,      // Rd <- Rd op Rs (two-register ALU group), CMP/TST/NEG/MVN
    OP_MOV_RR,      // Rd <- Rs, flags untouched
    OP_MLX,         // {Rs,Rd} <- Rd * Rs unsigned
    OP_SP_IMM,      // SP <- SP +/- #imm8
    OP_BRANCH,      // B<cond> / JMS address
    OP_STR_OFF,     // mem[Rn + off] <- Rs
    OP_LDR_OFF,     // Rd <- mem[Rn + off]
    OP_STR_SP,      // mem[SP + off] <- Rs
    OP_LDR_SP,      // Rd <- mem[SP + off]
    OP_ALU_DIR,     // Rd <- Rd +/- mem[addr]
    OP_STR_DIR,     // mem[addr] <- Rs
    OP_LDR_DIR,     // Rd <- mem[addr]
    OP_INP,         // Rd <- io[port]
    OP_OUT,         // io[port] <- Rs
    OP_MOV_FROM_SP, // Rd <- flags/SP/LR/PC
    OP_MOV_TO_SP,   // flags/SP/LR/PC <- Rs
    OP_POP,         // Rd <- pop
    OP_PSH,         // push Rs
    OP_BRA_REG,     // PC <- Rs
    OP_JMS_REG,     // LR <- PC, PC <- Rs
    OP_RET,         // PC <- LR
    OP_PSH_MULTI,   // push {R0-R7,LR} by mask
    OP_POP_MULTI,   // pop {PC,R7-R0} by mask
    OP_UNDEF        // spare encoding
  } op_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_ADC, ALU_SBC, ALU_RSB0,  // RSB0: 0 - b (NEG)
    ALU_AND, ALU_ORR, ALU_XOR, ALU_BIC, ALU_MVN,
    ALU_LSL, ALU_LSR, ALU_ASR, ALU_ROR,
    ALU_MUL, ALU_MLX,
    ALU_UDV, ALU_DIV, ALU_MOD                      // handled by risc_divider
  } alu_op_e;

  // States of the multi-cycle control unit (risc_core).
  typedef enum logic [3:0] {
    S_FETCH, S_DECODE, S_EXEC, S_LOAD, S_DIV, S_MLX2,
    S_MPUSH, S_MPOP_RD, S_MPOP_WB, S_HALT, S_ERROR
  } state_e;

  // Special register selector of MOV Rd,special / MOV special,Rs.
  typedef enum logic [1:0] {
    SPR_FLAGS = 2'd0,
    SPR_SP    = 2'd1,
    SPR_LR    = 2'd2,
    SPR_PC    = 2'd3
  } spr_e;

  typedef struct packed {
    op_e          op;
    alu_op_e      alu;
    logic         is_div;     // operation goes to the divider
    logic         no_write;   // CMP/TST: flags only
    logic [2:0]   rd;         // destination (or source for stores/OUT/PSH)
    logic [2:0]   rs;         // first source
    logic [2:0]   rb;         // second source
    logic         b_imm;      // second ALU operand is imm
    word_t        imm;        // zero-extended immediate, count, offset, port
    logic [ADDR_BITS-1:0] addr;      // direct / branch address
    logic [3:0]   cond;       // branch condition code
    logic [1:0]   spr;        // special register selector
    logic [8:0]   mask;       // multi push/pop mask
  } dec_t;

  // Branch condition codes 0..15.
  localparam logic [3:0] C_BRA = 4'd0,  C_BEQ = 4'd1,  C_BNE = 4'd2,  C_BCS = 4'd3,
                         C_BCC = 4'd4,  C_BMI = 4'd5,  C_BPL = 4'd6,  C_BVS = 4'd7,
                         C_BVC = 4'd8,  C_BHI = 4'd9,  C_BLS = 4'd10, C_BGE = 4'd11,
                         C_BLT = 4'd12, C_BGT = 4'd13, C_BLE = 4'd14, C_JMS = 4'd15;

endpackage
