// cpu_pkg: types and constants shared by the blocks of the 8-bit pipelined
// processor.
//
// Instruction word (16 bits, bit 15 first):
//   [15]    I        1 = memory reference, 0 = register reference
//   [14:12] opcode
//   [11:8]  instruct ALU operation; for MVI the destination register
//   [7:4]   RA       first source / destination register
//   [3:0]   RB       second source register
// For MVI, {RA,RB} is the 8-bit immediate. For memory reference
// instructions the 12 bits [11:0] form the address register AR; its 6 LSBs
// ("ad") are the jump target of JMP.
//
// The opcode and instruct codes are those of the instruction list this
// processor is specified by. Codes the list leaves unused (register opcodes
// 011-111, memory opcodes 011-111, instruct 0101, 1110, 1111) are decoded as
// no-operations; that, and the carry flag behaviour below, is this design's
// own choice.
package cpu_pkg;

  localparam int unsigned DATA_W  = 8;   // data path width
  localparam int unsigned INSTR_W = 16;  // instruction register width
  localparam int unsigned REG_AW  = 4;   // register index width (RA, RB, rstore)
  localparam int unsigned NREGS   = 16;  // general registers R0..R15
  localparam int unsigned AR_W    = 12;  // address register width
  localparam int unsigned PC_W    = 6;   // program counter width

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [REG_AW-1:0]  reg_idx_t;
  typedef logic [AR_W-1:0]    addr_t;
  typedef logic [PC_W-1:0]    pc_t;

  // Register-reference opcodes (I = 0)
  localparam logic [2:0] OP_HLT = 3'b000;
  localparam logic [2:0] OP_MVI = 3'b001;
  localparam logic [2:0] OP_ALU = 3'b010;
  // Memory-reference opcodes (I = 1)
  localparam logic [2:0] OP_STA = 3'b000;
  localparam logic [2:0] OP_LDA = 3'b001;
  localparam logic [2:0] OP_JMP = 3'b010;

  // ALU operations selected by the instruct field
  typedef enum logic [3:0] {
    ALU_MOV = 4'b0000,  // R[RA] = R[RB]
    ALU_ADD = 4'b0001,  // R[RA] = R[RA] + R[RB]
    ALU_ADC = 4'b0010,  // R[RA] = R[RA] + R[RB] + C
    ALU_SBB = 4'b0011,  // R[RA] = R[RA] - R[RB] - C
    ALU_SUB = 4'b0100,  // R[RA] = R[RA] - R[RB]
    ALU_INC = 4'b0110,  // R[RA] = R[RA] + 1
    ALU_DEC = 4'b0111,  // R[RA] = R[RA] - 1
    ALU_CMP = 4'b1000,  // R[RA] = ~R[RA]
    ALU_AND = 4'b1001,  // R[RA] = R[RA] & R[RB]
    ALU_OR  = 4'b1010,  // R[RA] = R[RA] | R[RB]
    ALU_XOR = 4'b1011,  // R[RA] = R[RA] ^ R[RB]
    ALU_SHR = 4'b1100,  // R[RA] = R[RA] >> 1
    ALU_SHL = 4'b1101   // R[RA] = R[RA] << 1
  } alu_op_e;

  // Decoded instruction, carried from DA through FO to EX.
  typedef struct packed {
    logic     valid;     // a real instruction (not a bubble)
    logic     halt;      // HLT
    logic     mvi;       // MVI: write the immediate
    logic     alu;       // register-register ALU instruction with a defined code
    logic     sta;       // STA: mem[AR] = R0
    logic     lda;       // LDA: R0 = mem[AR]
    logic     jmp;       // JMP: PC = ad
    logic [3:0] alu_op;  // instruct field
    reg_idx_t ra;        // source A index
    reg_idx_t rb;        // source B index
    logic     rd_ra;     // reads R[RA]
    logic     rd_rb;     // reads R[RB]
    logic     rd_r0;     // reads R0 (STA)
    logic     rd_mem;    // reads data memory (LDA)
    logic     wr_reg;    // writes a register in EX
    reg_idx_t rdst;      // destination register index (rstore)
    data_t    imm;       // MVI immediate {RA,RB}
    addr_t    ar;        // effective address (AR)
  } ctrl_t;

endpackage
