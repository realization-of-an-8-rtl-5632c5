// tb_instruction_decoder: decodes every one of the 65536 instruction words
// (and a bubble) and compares each control field with an independent
// reading of the instruction format: I bit, 3-bit opcode, 4-bit instruct,
// RA, RB; 12-bit address; which registers and memory are read and which
// register is written.
module tb_instruction_decoder;
  import cpu_pkg::*;

  logic   valid;
  instr_t instr;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;

  instruction_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_halt, e_mvi, e_alu, e_sta, e_lda, e_jmp, e_ra, e_rb, e_r0, e_mem, e_wr;
    int   e_dst, ins, op;
    valid = 1'b0; instr = 16'h1234; #1;
    checks++;
    if (ctrl.valid || ctrl.wr_reg || ctrl.halt || ctrl.sta || ctrl.jmp || ctrl.rd_ra || ctrl.rd_mem) begin
      failures++; $display("bubble decoded as an instruction");
    end
    valid = 1'b1;
    for (int w = 0; w < 65536; w++) begin
      instr = 16'(w); #1;
      op  = (w >> 12) & 7;
      ins = (w >> 8) & 15;
      {e_halt, e_mvi, e_alu, e_sta, e_lda, e_jmp, e_ra, e_rb, e_r0, e_mem, e_wr} = '0;
      e_dst = 0;
      if (w < 32768) begin
        if (op == 0) e_halt = 1;
        if (op == 1) begin e_mvi = 1; e_wr = 1; e_dst = ins; end
        if (op == 2 && !(ins == 5 || ins == 14 || ins == 15)) begin
          e_alu = 1; e_wr = 1; e_dst = (w >> 4) & 15;
          e_rb = (ins == 0 || ins == 1 || ins == 2 || ins == 3 || ins == 4 || ins == 9 || ins == 10 || ins == 11);
          e_ra = (ins != 0);
        end
      end else begin
        if (op == 0) begin e_sta = 1; e_r0 = 1; end
        if (op == 1) begin e_lda = 1; e_mem = 1; e_wr = 1; e_dst = 0; end
        if (op == 2) e_jmp = 1;
      end
      checks++;
      if (ctrl.valid !== 1'b1 || ctrl.halt !== e_halt || ctrl.mvi !== e_mvi || ctrl.alu !== e_alu ||
          ctrl.sta !== e_sta || ctrl.lda !== e_lda || ctrl.jmp !== e_jmp ||
          ctrl.rd_ra !== e_ra || ctrl.rd_rb !== e_rb || ctrl.rd_r0 !== e_r0 || ctrl.rd_mem !== e_mem ||
          ctrl.wr_reg !== e_wr || (e_wr && int'(ctrl.rdst) != e_dst) ||
          int'(ctrl.ra) != ((w >> 4) & 15) || int'(ctrl.rb) != (w & 15) ||
          int'(ctrl.imm) != (w & 255) || int'(ctrl.ar) != (w & 4095) || int'(ctrl.alu_op) != ins) begin
        failures++;
        if (failures < 10) $display("instr %04h decoded wrongly: %p", w, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
