// alu: the arithmetic/logic unit of the EX stage.
//
// Purely combinational. `op` is the 4-bit instruct field of an ALU
// instruction; `a` is R[RA], `b` is R[RB] and `cin` the carry flag. `y` is
// the result written back to R[RA]. `valid` is low for the unused codes
// (0101, 1110, 1111), which then write nothing.
//
// The list of operations and their codes follows the processor's
// instruction set. The carry flag is this design's own addition, needed to
// give ADC and SBB a meaning: ADD/ADC set it to the carry out, SUB/SBB set
// it to the borrow out (1 when the unsigned result went below zero); every
// other operation leaves it unchanged (`set_c` low). Shifts fill with 0.
module alu
  import cpu_pkg::*;
(
  input  logic [3:0] op,     // instruct field
  input  data_t      a,      // R[RA]
  input  data_t      b,      // R[RB]
  input  logic       cin,    // carry flag in
  output data_t      y,      // result
  output logic       cout,   // new carry flag (meaningful when set_c)
  output logic       set_c,  // operation updates the carry flag
  output logic       valid   // op is a defined operation
);

  logic [DATA_W:0] wide;

  always_comb begin
    wide  = '0;
    y     = '0;
    cout  = 1'b0;
    set_c = 1'b0;
    valid = 1'b1;
    case (op)
      ALU_MOV: y = b;
      ALU_ADD: begin
        wide  = {1'b0, a} + {1'b0, b};
        y     = wide[DATA_W-1:0];
        cout  = wide[DATA_W];
        set_c = 1'b1;
      end
      ALU_ADC: begin
        wide  = {1'b0, a} + {1'b0, b} + {{DATA_W{1'b0}}, cin};
        y     = wide[DATA_W-1:0];
        cout  = wide[DATA_W];
        set_c = 1'b1;
      end
      ALU_SBB: begin
        wide  = {1'b0, a} - {1'b0, b} - {{DATA_W{1'b0}}, cin};
        y     = wide[DATA_W-1:0];
        cout  = wide[DATA_W];
        set_c = 1'b1;
      end
      ALU_SUB: begin
        wide  = {1'b0, a} - {1'b0, b};
        y     = wide[DATA_W-1:0];
        cout  = wide[DATA_W];
        set_c = 1'b1;
      end
      ALU_INC: y = a + 1'b1;
      ALU_DEC: y = a - 1'b1;
      ALU_CMP: y = ~a;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHR: y = a >> 1;
      ALU_SHL: y = a << 1;
      default: valid = 1'b0;
    endcase
  end

endmodule
