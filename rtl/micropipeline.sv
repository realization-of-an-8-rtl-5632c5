// micropipeline: an 8-bit processor whose instructions flow through a
// four-segment pipeline, so that up to four instructions are in progress at
// once and a straight-line program of n instructions completes in n + 3
// cycles instead of 4n.
//
// Segments (one clock each):
//   FI  fetch   IR <= program_memory[PC], PC <= PC + 1
//   DA  decode  instruction_decoder turns IR into a control bundle and the
//               effective address AR; JMP and HLT act here on the fetch side
//   FO  operand register_file reads R[RA], R[RB], R0; data_memory reads
//               mem[AR] for LDA
//   EX  execute alu computes; the result (ALU, MVI immediate or LDA data) is
//               stored to the register file, STA stores R0 to mem[AR]
//
// Hazards:
//   - Data: hazard_unit compares what FO reads with what EX writes. On a
//     match FI, DA and FO hold for one cycle and EX gets a bubble
//     (`ev_stall_reg` / `ev_stall_mem` pulse for that cycle).
//   - JMP: taken in DA (PC <= AR[5:0]); the instruction fetched in that same
//     cycle is discarded, costing one cycle (`ev_jump`).
//   - HLT: in DA it stops fetching and discards the instruction behind it;
//     when it reaches EX, `halted` rises and stays high until reset.
//
// Interface: synchronous active-high `rst` clears PC, pipeline, registers
// and carry. While in reset the program is written through prog_we /
// prog_addr / prog_data. `ev_retire` pulses for every instruction in EX.
// The dbg_* ports read a register and a data-memory word combinationally.
//
// The four segments, the register organisation (6-bit PC, 16-bit IR, 12-bit
// AR, 16 x 8-bit registers, 16-word program memory, 4096-word data memory),
// the instruction set and stalling on dependencies follow the processor's
// description. Where JMP and HLT take effect, the one-cycle stall, the
// carry flag and the load/debug ports are this design's own choices.
module micropipeline
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 16,
  parameter int unsigned DMEM_DEPTH = 4096,
  localparam int unsigned IMEM_AW   = $clog2(IMEM_DEPTH),
  localparam int unsigned DMEM_AW   = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // program load
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  instr_t             prog_data,
  // status
  output logic               halted,
  output pc_t                pc,
  output logic               carry,
  // observation
  input  reg_idx_t           dbg_reg_addr,
  output data_t              dbg_reg_data,
  input  logic [DMEM_AW-1:0] dbg_mem_addr,
  output data_t              dbg_mem_data,
  // events, one pulse per cycle in which they happen
  output logic               ev_retire,
  output logic               ev_stall_reg,
  output logic               ev_stall_mem,
  output logic               ev_jump
);

  // ---------------------------------------------------------------- state
  logic   run;              // fetching enabled (cleared by HLT in DA)
  logic   fd_valid;         // FI/DA register
  instr_t fd_ir;
  ctrl_t  df;               // DA/FO register
  ctrl_t  fe;               // FO/EX register
  data_t  fe_a, fe_b, fe_r0, fe_mem;

  // ---------------------------------------------------------------- FI
  instr_t imem_q;

  program_memory #(.DEPTH(IMEM_DEPTH), .WIDTH(INSTR_W)) u_imem (
    .clk     (clk),
    .rd_addr (pc[IMEM_AW-1:0]),
    .rd_data (imem_q),
    .we      (prog_we),
    .wr_addr (prog_addr),
    .wr_data (prog_data)
  );

  // ---------------------------------------------------------------- DA
  ctrl_t da_ctrl;

  instruction_decoder u_dec (
    .valid (fd_valid),
    .instr (fd_ir),
    .ctrl  (da_ctrl)
  );

  // ---------------------------------------------------------------- FO
  logic  stall, reg_hazard, mem_hazard;
  data_t ra_q, rb_q, r0_q, mem_q;

  hazard_unit u_hz (
    .fo         (df),
    .ex         (fe),
    .stall      (stall),
    .reg_hazard (reg_hazard),
    .mem_hazard (mem_hazard)
  );

  // ---------------------------------------------------------------- EX
  data_t alu_y;
  logic  alu_c, alu_set_c, alu_valid;
  logic  rf_we, dm_we;
  data_t rf_wdata;

  alu u_alu (
    .op    (fe.alu_op),
    .a     (fe_a),
    .b     (fe_b),
    .cin   (carry),
    .y     (alu_y),
    .cout  (alu_c),
    .set_c (alu_set_c),
    .valid (alu_valid)
  );

  assign rf_we    = fe.valid && fe.wr_reg;
  assign rf_wdata = fe.mvi ? fe.imm : (fe.lda ? fe_mem : alu_y);
  assign dm_we    = fe.valid && fe.sta;

  register_file #(.N_REGS(NREGS), .WIDTH(DATA_W)) u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra_addr  (df.ra),
    .ra_data  (ra_q),
    .rb_addr  (df.rb),
    .rb_data  (rb_q),
    .r0_data  (r0_q),
    .dbg_addr (dbg_reg_addr),
    .dbg_data (dbg_reg_data),
    .we       (rf_we),
    .wr_addr  (fe.rdst),
    .wr_data  (rf_wdata)
  );

  data_memory #(.DEPTH(DMEM_DEPTH), .WIDTH(DATA_W)) u_dmem (
    .clk      (clk),
    .rd_addr  (df.ar[DMEM_AW-1:0]),
    .rd_data  (mem_q),
    .dbg_addr (dbg_mem_addr),
    .dbg_data (dbg_mem_data),
    .we       (dm_we),
    .wr_addr  (fe.ar[DMEM_AW-1:0]),
    .wr_data  (fe_r0)
  );

  // ---------------------------------------------------------------- control
  logic redirect, stop;
  assign redirect = !stall && da_ctrl.jmp;
  assign stop     = !stall && da_ctrl.halt;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      run      <= 1'b1;
      fd_valid <= 1'b0;
      fd_ir    <= '0;
      df       <= '0;
      fe       <= '0;
      fe_a     <= '0;
      fe_b     <= '0;
      fe_r0    <= '0;
      fe_mem   <= '0;
      carry    <= 1'b0;
      halted   <= 1'b0;
    end else begin
      // EX: flags and halt (register and memory writes are in the sub-blocks)
      if (fe.valid && fe.halt) halted <= 1'b1;
      if (fe.valid && fe.alu && alu_valid && alu_set_c) carry <= alu_c;

      // FO -> EX
      if (stall) begin
        fe.valid <= 1'b0;
      end else begin
        fe     <= df;
        fe_a   <= ra_q;
        fe_b   <= rb_q;
        fe_r0  <= r0_q;
        fe_mem <= mem_q;
      end

      if (!stall) begin
        // DA -> FO
        df <= da_ctrl;
        // FI -> DA
        if (redirect || stop) begin
          fd_valid <= 1'b0;
        end else begin
          fd_valid <= run;
          fd_ir    <= imem_q;
        end
        // PC
        if (redirect)  pc  <= da_ctrl.ar[PC_W-1:0];
        else if (stop) run <= 1'b0;
        else if (run)  pc  <= pc + 1'b1;
      end
    end
  end

  assign ev_retire    = fe.valid;
  assign ev_stall_reg = reg_hazard;
  assign ev_stall_mem = mem_hazard;
  assign ev_jump      = redirect;

  // Once halted, nothing further may execute.
  a_halt_quiet: assert property (@(posedge clk) disable iff (rst) halted |-> !fe.valid);
  // A stall is only ever caused by a real instruction in EX.
  a_stall_cause: assert property (@(posedge clk) disable iff (rst) stall |-> fe.valid);

endmodule
