// hazard_unit: detects when the instruction in the FO stage would fetch an
// operand that the instruction in the EX stage has not yet stored.
//
// Combinational. The EX stage writes its result at the end of its cycle,
// so an operand read in FO during that same cycle would be stale. The unit
// raises `stall` when
//   - EX writes register d and FO reads R[RA], R[RB] or R0 with index d, or
//   - EX is STA to address AR and FO is LDA from the same AR.
// The pipeline then holds FI, DA and FO for one cycle and sends a bubble to
// EX; in the next cycle the write has happened and FO reads the new value.
// An instruction two or more places behind a writer never needs a stall.
//
// Stalling on a dependency on the instruction just ahead, rather than
// forwarding the result, follows the processor's description; a one-cycle
// stall and the memory-address comparison are this design's choices.
module hazard_unit
  import cpu_pkg::*;
(
  input  ctrl_t fo,         // instruction in FO
  input  ctrl_t ex,         // instruction in EX
  output logic  stall,      // hold FI/DA/FO, bubble into EX
  output logic  reg_hazard, // the stall is caused by a register
  output logic  mem_hazard  // the stall is caused by a data-memory address
);

  always_comb begin
    reg_hazard = fo.valid && ex.valid && ex.wr_reg &&
                 ((fo.rd_ra && fo.ra == ex.rdst) ||
                  (fo.rd_rb && fo.rb == ex.rdst) ||
                  (fo.rd_r0 && ex.rdst == '0));
    mem_hazard = fo.valid && ex.valid && ex.sta && fo.rd_mem && fo.ar == ex.ar;
    stall      = reg_hazard || mem_hazard;
  end

endmodule
