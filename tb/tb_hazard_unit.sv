// tb_hazard_unit: random pairs of (FO, EX) control bundles, plus directed
// cases, compared with the stall rule: stall when a valid EX instruction
// writes a register that a valid FO instruction reads (R[RA], R[RB] or R0),
// or when EX stores to the address a FO load reads.
module tb_hazard_unit;
  import cpu_pkg::*;

  ctrl_t fo, ex;
  logic  stall, reg_hazard, mem_hazard;
  int checks = 0, failures = 0;
  int n_reg = 0, n_mem = 0;

  hazard_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic er, em;
    #1;
    er = 0; em = 0;
    if (fo.valid && ex.valid && ex.wr_reg) begin
      if (fo.rd_ra && fo.ra == ex.rdst) er = 1;
      if (fo.rd_rb && fo.rb == ex.rdst) er = 1;
      if (fo.rd_r0 && ex.rdst == 4'd0) er = 1;
    end
    if (fo.valid && ex.valid && ex.sta && fo.rd_mem && fo.ar == ex.ar) em = 1;
    n_reg += int'(er); n_mem += int'(em);
    checks++;
    if (reg_hazard !== er || mem_hazard !== em || stall !== (er | em)) begin
      failures++;
      if (failures < 10) $display("fo=%p ex=%p: stall=%b reg=%b mem=%b", fo, ex, stall, reg_hazard, mem_hazard);
    end
  endtask

  initial begin
    // directed: ADD R1,R2 in FO behind MVI R2 in EX
    fo = '0; ex = '0;
    fo.valid = 1; fo.alu = 1; fo.rd_ra = 1; fo.rd_rb = 1; fo.ra = 1; fo.rb = 2;
    ex.valid = 1; ex.mvi = 1; ex.wr_reg = 1; ex.rdst = 2;
    check();
    checks++; if (stall !== 1'b1) begin failures++; $display("directed RAW not detected"); end
    ex.rdst = 3; check();
    checks++; if (stall !== 1'b0) begin failures++; $display("false stall"); end
    // random, with small index and address ranges so matches are common
    for (int n = 0; n < 20000; n++) begin
      fo = ctrl_t'({$urandom, $urandom}); ex = ctrl_t'({$urandom, $urandom});
      fo.ra = 4'($urandom_range(0, 3)); fo.rb = 4'($urandom_range(0, 3));
      ex.rdst = 4'($urandom_range(0, 3));
      fo.ar = 12'($urandom_range(0, 3)); ex.ar = 12'($urandom_range(0, 3));
      check();
    end
    checks++;
    if (n_reg == 0 || n_mem == 0) begin failures++; $display("hazard kinds not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
