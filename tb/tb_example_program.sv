// tb_example_program: runs the four-instruction example program
//   0: MVI R1, CF    1: MVI R2, D8    2: ADD R1, R2    3: HLT
// on the processor at its default size and checks its space-time behaviour
// cycle by cycle. Counting the first cycle after reset as cycle 0, the
// instructions occupy the segments as follows (S = stall, - = bubble):
//
//   cycle      0   1   2   3   4   5   6   7
//   MVI R1     FI  DA  FO  EX
//   MVI R2         FI  DA  FO  EX
//   ADD R1,R2          FI  DA  FO  FO  EX
//   HLT                    FI  DA  DA  FO  EX
//
// ADD depends on R2, written by the MVI in EX during cycle 4, so ADD waits
// in FO for one cycle. EX therefore retires in cycles 3, 4, 6 and 7, a
// register stall is reported in cycle 4, and `halted` is first high in
// cycle 8: 8 cycles against 16 for four instructions taken one at a time
// through the same four steps. Results: R1 = CF + D8 = A7 with carry 1,
// R2 = D8.
module tb_example_program;
  import cpu_pkg::*;

  logic        clk = 1'b0;
  logic        rst, prog_we;
  logic [3:0]  prog_addr;
  instr_t      prog_data;
  logic        halted, carry;
  pc_t         pc;
  reg_idx_t    dbg_reg_addr;
  data_t       dbg_reg_data;
  logic [11:0] dbg_mem_addr;
  data_t       dbg_mem_data;
  logic        ev_retire, ev_stall_reg, ev_stall_mem, ev_jump;
  int checks = 0, failures = 0;

  micropipeline dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s = %0h, expected %0h", what, got, exp); end
  endtask

  // expected per-cycle pulses, cycles 0..8
  localparam logic [8:0] RETIRE = 9'b0_1101_1000;  // bit c: retire in cycle c
  localparam logic [8:0] STALL  = 9'b0_0001_0000;
  localparam logic [8:0] HALTED = 9'b1_0000_0000;

  initial begin
    instr_t prog [16];
    foreach (prog[i]) prog[i] = 16'h0000;
    prog[0] = 16'h11CF;  // MVI R1, CF
    prog[1] = 16'h12D8;  // MVI R2, D8
    prog[2] = 16'h2112;  // ADD R1, R2
    prog[3] = 16'h0000;  // HLT
    rst = 1'b1; prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    dbg_reg_addr = '0; dbg_mem_addr = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 4'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    // cycle c is the clock period that ends with the (c+1)-th rising edge
    for (int c = 0; c < 9; c++) begin
      #1;
      check($sformatf("cycle %0d retire", c), int'(ev_retire), int'(RETIRE[c]));
      check($sformatf("cycle %0d stall", c), int'(ev_stall_reg), int'(STALL[c]));
      check($sformatf("cycle %0d halted", c), int'(halted), int'(HALTED[c]));
      check($sformatf("cycle %0d jump/mem stall", c), int'(ev_jump || ev_stall_mem), 0);
      @(negedge clk);
    end
    dbg_reg_addr = 4'd1; #1; check("R1", int'(dbg_reg_data), 'hA7);
    dbg_reg_addr = 4'd2; #1; check("R2", int'(dbg_reg_data), 'hD8);
    check("carry", int'(carry), 1);
    // remains halted
    repeat (5) @(negedge clk);
    check("still halted", int'(halted), 1);
    check("no retire after halt", int'(ev_retire), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
