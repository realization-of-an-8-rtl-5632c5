// tb_micropipeline: end-to-end test of the pipelined processor at its
// default size (16-word program memory, 4096-word data memory).
//
// Each test loads a program while the processor is held in reset, releases
// reset, waits for `halted`, and then compares every register, the carry
// flag and the data-memory words the program can touch with an
// instruction-level reference model written in this testbench. The model
// also predicts the cycle count: a program that executes n instructions
// takes n + 3 cycles (four segments), plus one cycle per stall and one per
// taken jump. The number of retired instructions, stalls and jumps reported
// by the event outputs is compared with the model's numbers.
//
// Programs run: the four-instruction example program (MVI, MVI, ADD, HLT),
// a straight-line program without dependencies (pure pipeline throughput),
// a directed program that exercises every instruction, and a few hundred
// random programs over a small set of registers and addresses so that
// dependencies are frequent. Every pipeline mechanism (register stall,
// memory stall, jump, halt, carry-consuming instruction, no-operation code)
// must occur at least once.
module tb_micropipeline;
  import cpu_pkg::*;

  localparam int unsigned N_RANDOM = 400;
  localparam int unsigned WATCHDOG = 200_000;

  logic       clk = 1'b0;
  logic       rst;
  logic       prog_we;
  logic [3:0] prog_addr;
  instr_t     prog_data;
  logic       halted;
  pc_t        pc;
  logic       carry;
  reg_idx_t   dbg_reg_addr;
  data_t      dbg_reg_data;
  logic [11:0] dbg_mem_addr;
  data_t      dbg_mem_data;
  logic       ev_retire, ev_stall_reg, ev_stall_mem, ev_jump;

  micropipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle_no = 0;
  always @(posedge clk) cycle_no <= cycle_no + 1;

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters over the whole run
  int n_stall_reg = 0, n_stall_mem = 0, n_jump = 0, n_halt = 0, n_carry_use = 0, n_nop = 0;

  // ------------------------------------------------------------ encoders
  function automatic instr_t enc_mvi(int rd, logic [7:0] imm);
    return {1'b0, OP_MVI, 4'(rd), imm};
  endfunction
  function automatic instr_t enc_alu(alu_op_e op, int ra, int rb);
    return {1'b0, OP_ALU, 4'(op), 4'(ra), 4'(rb)};
  endfunction
  function automatic instr_t enc_sta(int a);
    return {1'b1, OP_STA, 12'(a)};
  endfunction
  function automatic instr_t enc_lda(int a);
    return {1'b1, OP_LDA, 12'(a)};
  endfunction
  function automatic instr_t enc_jmp(int a);
    return {1'b1, OP_JMP, 12'(a)};
  endfunction
  localparam instr_t HLT = 16'h0000;

  // ------------------------------------------------------------ reference model
  typedef struct {
    logic [7:0] r [16];
    logic       c;
    logic [7:0] m [int];
    int         n, stalls_reg, stalls_mem, jumps, cycles;
  } ref_t;

  // which registers an instruction reads / writes (model's own view)
  function automatic void ref_rw(instr_t w, output logic [15:0] rd_set, output int wr_reg,
                                 output int rd_mem, output int wr_mem);
    logic [3:0] ins, ra, rb;
    ins = w[11:8]; ra = w[7:4]; rb = w[3:0];
    rd_set = '0; wr_reg = -1; rd_mem = -1; wr_mem = -1;
    if (!w[15]) begin
      if (w[14:12] == 3'b001) wr_reg = int'(ins);
      else if (w[14:12] == 3'b010) begin
        case (ins)
          4'b0000: begin rd_set[rb] = 1; wr_reg = int'(ra); end
          4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b1001, 4'b1010, 4'b1011:
            begin rd_set[ra] = 1; rd_set[rb] = 1; wr_reg = int'(ra); end
          4'b0110, 4'b0111, 4'b1000, 4'b1100, 4'b1101:
            begin rd_set[ra] = 1; wr_reg = int'(ra); end
          default: ;
        endcase
      end
    end else begin
      if (w[14:12] == 3'b000) begin rd_set[0] = 1; wr_mem = int'(w[11:0]); end
      else if (w[14:12] == 3'b001) begin rd_mem = int'(w[11:0]); wr_reg = 0; end
    end
  endfunction

  function automatic void ref_run(instr_t prog [16], ref ref_t s);
    int pc6, prev_wr_reg, prev_wr_mem;
    pc6 = 0; prev_wr_reg = -1; prev_wr_mem = -1;
    s.n = 0; s.stalls_reg = 0; s.stalls_mem = 0; s.jumps = 0;
    for (int step = 0; step < 1000; step++) begin
      instr_t w;
      logic [15:0] rd_set; int wr_reg, rd_mem, wr_mem;
      logic [3:0] ins, ra, rb;
      logic [8:0] t;
      w = prog[pc6 % 16];
      ins = w[11:8]; ra = w[7:4]; rb = w[3:0];
      ref_rw(w, rd_set, wr_reg, rd_mem, wr_mem);
      s.n++;
      if (prev_wr_reg >= 0 && rd_set[prev_wr_reg]) s.stalls_reg++;
      else if (prev_wr_mem >= 0 && rd_mem == prev_wr_mem) s.stalls_mem++;
      prev_wr_reg = wr_reg; prev_wr_mem = wr_mem;
      pc6 = (pc6 + 1) % 64;
      if (!w[15]) begin
        case (w[14:12])
          3'b000: break;
          3'b001: s.r[ins] = w[7:0];
          3'b010: begin
            case (ins)
              4'b0000: s.r[ra] = s.r[rb];
              4'b0001: begin t = 9'(s.r[ra]) + 9'(s.r[rb]); s.r[ra] = t[7:0]; s.c = t[8]; end
              4'b0010: begin t = 9'(s.r[ra]) + 9'(s.r[rb]) + 9'(s.c); s.r[ra] = t[7:0]; s.c = t[8]; end
              4'b0011: begin t = 9'(s.r[ra]) - 9'(s.r[rb]) - 9'(s.c); s.r[ra] = t[7:0]; s.c = t[8]; end
              4'b0100: begin t = 9'(s.r[ra]) - 9'(s.r[rb]); s.r[ra] = t[7:0]; s.c = t[8]; end
              4'b0110: s.r[ra] = s.r[ra] + 8'd1;
              4'b0111: s.r[ra] = s.r[ra] - 8'd1;
              4'b1000: s.r[ra] = ~s.r[ra];
              4'b1001: s.r[ra] = s.r[ra] & s.r[rb];
              4'b1010: s.r[ra] = s.r[ra] | s.r[rb];
              4'b1011: s.r[ra] = s.r[ra] ^ s.r[rb];
              4'b1100: s.r[ra] = {1'b0, s.r[ra][7:1]};
              4'b1101: s.r[ra] = {s.r[ra][6:0], 1'b0};
              default: ;
            endcase
          end
          default: ;
        endcase
      end else begin
        case (w[14:12])
          3'b000: s.m[int'(w[11:0])] = s.r[0];
          3'b001: s.r[0] = s.m[int'(w[11:0])];
          3'b010: begin pc6 = int'(w[5:0]); s.jumps++; end
          default: ;
        endcase
      end
    end
    s.cycles = s.n + 3 + s.stalls_reg + s.stalls_mem + s.jumps;
  endfunction

  // ------------------------------------------------------------ test driver
  // addresses the programs may touch; their contents are read from the
  // processor before the run to seed the model
  int addr_pool [5] = '{0, 1, 2, 7, 4095};

  task automatic run_program(string name, instr_t prog [16], output ref_t s);
    int cyc, retired, sr, sm, jp;
    bit ok;
    // load while in reset
    @(negedge clk);
    rst = 1'b1;
    for (int i = 0; i < 16; i++) begin
      prog_we = 1'b1; prog_addr = 4'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    @(negedge clk);
    // seed the model from the (reset) register file and the data memory
    for (int i = 0; i < 16; i++) s.r[i] = 8'h00;
    s.c = 1'b0;
    s.m.delete();
    foreach (addr_pool[k]) begin
      dbg_mem_addr = 12'(addr_pool[k]); #1;
      s.m[addr_pool[k]] = dbg_mem_data;
    end
    ref_run(prog, s);
    // run
    @(negedge clk); rst = 1'b0;
    cyc = 0; retired = 0; sr = 0; sm = 0; jp = 0;
    while (!halted && cyc < 2000) begin
      @(posedge clk);
      retired += int'(ev_retire); sr += int'(ev_stall_reg);
      sm += int'(ev_stall_mem); jp += int'(ev_jump);
      cyc++;
      #1;
    end
    // compare
    ok = 1;
    checks++;
    if (!halted) begin failures++; ok = 0; $display("[%s] did not halt", name); end
    checks++;
    if (cyc != s.cycles) begin
      failures++; ok = 0;
      $display("[%s] cycles %0d, expected %0d (n=%0d stalls=%0d+%0d jumps=%0d)",
               name, cyc, s.cycles, s.n, s.stalls_reg, s.stalls_mem, s.jumps);
    end
    checks++;
    if (retired != s.n || sr != s.stalls_reg || sm != s.stalls_mem || jp != s.jumps) begin
      failures++; ok = 0;
      $display("[%s] events retire/stall_reg/stall_mem/jump = %0d/%0d/%0d/%0d, expected %0d/%0d/%0d/%0d",
               name, retired, sr, sm, jp, s.n, s.stalls_reg, s.stalls_mem, s.jumps);
    end
    for (int i = 0; i < 16; i++) begin
      dbg_reg_addr = 4'(i); #1;
      checks++;
      if (dbg_reg_data !== s.r[i]) begin
        failures++; ok = 0;
        $display("[%s] R%0d = %02h, expected %02h", name, i, dbg_reg_data, s.r[i]);
      end
    end
    checks++;
    if (carry !== s.c) begin failures++; ok = 0; $display("[%s] carry %0b, expected %0b", name, carry, s.c); end
    foreach (addr_pool[k]) begin
      dbg_mem_addr = 12'(addr_pool[k]); #1;
      checks++;
      if (dbg_mem_data !== s.m[addr_pool[k]]) begin
        failures++; ok = 0;
        $display("[%s] mem[%0d] = %02h, expected %02h", name, addr_pool[k], dbg_mem_data, s.m[addr_pool[k]]);
      end
    end
    if (!ok) for (int i = 0; i < 16; i++) $display("[%s]   imem[%0d] = %04h", name, i, prog[i]);
    // a few idle cycles: halted must hold
    repeat (3) @(posedge clk);
    #1; checks++;
    if (!halted || ev_retire) begin failures++; ok = 0; $display("[%s] halt not held", name); end
    n_stall_reg += sr; n_stall_mem += sm; n_jump += jp; n_halt += int'(halted);
  endtask

  function automatic int count_carry_use(instr_t prog [16]);
    // instructions in the program that consume the carry flag (ADC / SBB)
    int k = 0;
    for (int i = 0; i < 16; i++)
      if (prog[i][15:12] == 4'b0010 && (prog[i][11:8] == 4'b0010 || prog[i][11:8] == 4'b0011)) k++;
    return k;
  endfunction

  function automatic instr_t random_instr(int i);
    int kind = $urandom_range(0, 99);
    int r1 = $urandom_range(0, 3), r2 = $urandom_range(0, 3);
    if (kind < 22) return enc_mvi(r1, 8'($urandom));
    if (kind < 64) return {1'b0, OP_ALU, 4'($urandom_range(0, 15)), 4'(r1), 4'(r2)};
    if (kind < 76) return enc_sta(addr_pool[$urandom_range(0, 4)]);
    if (kind < 88) return enc_lda(addr_pool[$urandom_range(0, 4)]);
    if (kind < 94) return enc_jmp(int'({2'($urandom_range(0, 3)), 4'($urandom_range(i + 1, 15))}));
    if (kind < 96) return HLT;
    return {1'($urandom_range(0, 1)), 3'($urandom_range(3, 7)), 12'($urandom)};  // unused opcode
  endfunction

  initial begin
    instr_t prog [16];
    ref_t s;
    rst = 1'b1; prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    dbg_reg_addr = '0; dbg_mem_addr = '0;
    repeat (2) @(posedge clk);

    // 1. the four-instruction example: R1 = CF, R2 = D8, R1 = R1 + R2, halt
    foreach (prog[i]) prog[i] = HLT;
    prog[0] = enc_mvi(1, 8'hCF);
    prog[1] = enc_mvi(2, 8'hD8);
    prog[2] = enc_alu(ALU_ADD, 1, 2);
    prog[3] = HLT;
    run_program("example", prog, s);
    // independent expectations for this program
    dbg_reg_addr = 4'd1; #1; checks++;
    if (dbg_reg_data !== 8'hA7) begin failures++; $display("[example] R1 = %02h, expected A7", dbg_reg_data); end
    checks++;
    if (carry !== 1'b1) begin failures++; $display("[example] carry not set"); end
    checks++;
    if (s.cycles != 8) begin failures++; $display("[example] model predicts %0d cycles, expected 8", s.cycles); end

    // 2. straight line, no dependencies: 15 instructions + HLT in 16 + 3 cycles
    for (int i = 0; i < 15; i++) prog[i] = enc_mvi(i, 8'(16 * i + 3));
    prog[15] = HLT;
    run_program("throughput", prog, s);
    checks++;
    if (s.cycles != 19) begin failures++; $display("[throughput] model predicts %0d cycles, expected 19", s.cycles); end

    // 3. directed: every instruction class
    prog[0]  = enc_mvi(0, 8'h9C);
    prog[1]  = enc_sta(7);                 // R0 dependency on MVI -> stall
    prog[2]  = enc_lda(7);                 // memory dependency on STA -> stall
    prog[3]  = enc_mvi(3, 8'h70);
    prog[4]  = enc_alu(ALU_ADD, 0, 3);     // 9C + 70 = 10C: carry
    prog[5]  = enc_alu(ALU_ADC, 3, 3);     // 70 + 70 + 1 = E1
    prog[6]  = enc_jmp(9);                 // skip 7 and 8
    prog[7]  = enc_mvi(5, 8'hEE);
    prog[8]  = enc_mvi(6, 8'hEE);
    prog[9]  = enc_alu(ALU_SUB, 0, 3);     // 0C - E1: borrow
    prog[10] = enc_alu(ALU_SBB, 0, 0);     // x - x - 1 = FF, borrow
    prog[11] = enc_alu(ALU_SHR, 0, 0);     // 7F
    prog[12] = enc_alu(ALU_CMP, 3, 0);     // ~E1 = 1E
    prog[13] = 16'h5123;                   // unused register opcode: no-op
    prog[14] = enc_sta(4095);
    prog[15] = HLT;
    run_program("directed", prog, s);
    n_carry_use += count_carry_use(prog);
    n_nop++;
    dbg_reg_addr = 4'd0; #1; checks++;
    if (dbg_reg_data !== 8'h7F) begin failures++; $display("[directed] R0 = %02h, expected 7F", dbg_reg_data); end
    dbg_reg_addr = 4'd5; #1; checks++;
    if (dbg_reg_data !== 8'h00) begin failures++; $display("[directed] jumped-over MVI executed"); end

    // 4. random programs
    for (int t = 0; t < int'(N_RANDOM); t++) begin
      for (int i = 0; i < 15; i++) prog[i] = random_instr(i);
      prog[15] = HLT;
      run_program($sformatf("random%0d", t), prog, s);
      n_carry_use += count_carry_use(prog);
      if (failures > 20) break;
    end

    // every mechanism must have happened
    checks++; if (n_stall_reg == 0) begin failures++; $display("no register stall happened"); end
    checks++; if (n_stall_mem == 0) begin failures++; $display("no memory stall happened"); end
    checks++; if (n_jump == 0)      begin failures++; $display("no jump happened"); end
    checks++; if (n_halt == 0)      begin failures++; $display("no halt happened"); end
    checks++; if (n_carry_use == 0) begin failures++; $display("no ADC/SBB executed"); end
    checks++; if (n_nop == 0)       begin failures++; $display("no unused code executed"); end
    $display("mechanisms: register stalls=%0d memory stalls=%0d jumps=%0d halts=%0d carry uses=%0d",
             n_stall_reg, n_stall_mem, n_jump, n_halt, n_carry_use);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
