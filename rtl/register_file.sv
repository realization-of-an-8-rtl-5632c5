// register_file: the general registers R0..R15 of the processor, 8 bits
// each. R0 doubles as the accumulator of STA and LDA.
//
// Three combinational read ports serve the FO stage (R[RA], R[RB] and R0),
// a fourth is a debug port for observing the registers from outside. One
// write port is used by the EX stage and takes effect at the rising clock
// edge, so an instruction reading in FO the cycle after a write sees the
// new value. Synchronous active-high reset clears every register.
//
// Sixteen 8-bit registers with 4-bit indices follow the processor's
// description; the port count, the debug port and the reset value are this
// design's choices.
module register_file
  import cpu_pkg::*;
#(
  parameter int unsigned N_REGS = NREGS,
  parameter int unsigned WIDTH  = DATA_W,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra_addr,
  output logic [WIDTH-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data,
  output logic [WIDTH-1:0] r0_data,
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] regs [N_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign ra_data  = regs[ra_addr];
  assign rb_data  = regs[rb_addr];
  assign r0_data  = regs[0];
  assign dbg_data = regs[dbg_addr];

endmodule
