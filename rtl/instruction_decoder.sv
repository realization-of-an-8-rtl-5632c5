// instruction_decoder: the decode half of the DA stage.
//
// Combinational. It splits the instruction register into the I bit, opcode,
// instruct, RA and RB fields and produces the control bundle `ctrl` that
// travels with the instruction through FO and EX: which instruction it is,
// which registers and memory it reads (used by the hazard unit), which
// register it writes, the MVI immediate and the effective address AR
// (bits [11:0]). The DA stage registers this bundle at the clock edge,
// which is where the effective-address step takes its clock cycle.
//
// Register reference (I=0): 000 HLT, 001 MVI (rstore = instruct field,
// immediate = {RA,RB}), 010 ALU operation selected by instruct (result to
// R[RA]). Memory reference (I=1): 000 STA, 001 LDA, 010 JMP. These codes
// follow the processor's instruction list. Unused codes, and instruct codes
// without an operation, decode as valid no-operations: this design's
// choice.
module instruction_decoder
  import cpu_pkg::*;
(
  input  logic   valid,  // instr holds a real instruction
  input  instr_t instr,
  output ctrl_t  ctrl
);

  logic       i_bit;
  logic [2:0] opcode;
  logic [3:0] instruct;
  reg_idx_t   ra, rb;

  assign i_bit    = instr[15];
  assign opcode   = instr[14:12];
  assign instruct = instr[11:8];
  assign ra       = instr[7:4];
  assign rb       = instr[3:0];

  always_comb begin
    ctrl        = '0;
    ctrl.valid  = valid;
    ctrl.alu_op = instruct;
    ctrl.ra     = ra;
    ctrl.rb     = rb;
    ctrl.imm    = instr[7:0];
    ctrl.ar     = instr[AR_W-1:0];
    if (valid) begin
      if (!i_bit) begin
        case (opcode)
          OP_HLT: ctrl.halt = 1'b1;
          OP_MVI: begin
            ctrl.mvi    = 1'b1;
            ctrl.wr_reg = 1'b1;
            ctrl.rdst   = instruct;
          end
          OP_ALU: begin
            ctrl.rdst = ra;
            case (instruct)
              ALU_MOV: begin
                ctrl.alu = 1'b1; ctrl.wr_reg = 1'b1; ctrl.rd_rb = 1'b1;
              end
              ALU_ADD, ALU_ADC, ALU_SBB, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR: begin
                ctrl.alu = 1'b1; ctrl.wr_reg = 1'b1;
                ctrl.rd_ra = 1'b1; ctrl.rd_rb = 1'b1;
              end
              ALU_INC, ALU_DEC, ALU_CMP, ALU_SHR, ALU_SHL: begin
                ctrl.alu = 1'b1; ctrl.wr_reg = 1'b1; ctrl.rd_ra = 1'b1;
              end
              default: ;  // no operation
            endcase
          end
          default: ;  // no operation
        endcase
      end else begin
        case (opcode)
          OP_STA: begin
            ctrl.sta   = 1'b1;
            ctrl.rd_r0 = 1'b1;
          end
          OP_LDA: begin
            ctrl.lda    = 1'b1;
            ctrl.rd_mem = 1'b1;
            ctrl.wr_reg = 1'b1;
            ctrl.rdst   = '0;
          end
          OP_JMP: ctrl.jmp = 1'b1;
          default: ;  // no operation
        endcase
      end
    end
  end

endmodule
