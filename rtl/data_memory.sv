// data_memory: the 4096 x 8-bit data store reached by STA and LDA.
//
// One combinational read port, used by the FO stage to fetch the operand of
// LDA, one synchronous write port, used by the EX stage for STA, and a
// second combinational read port for observing the memory from outside.
// The write takes effect at the rising clock edge. The contents are not
// reset.
//
// The depth (4096 words, a 12-bit address register) and the 8-bit word
// follow the processor's description; separate read and write ports are
// this design's choice, made so that FO and EX can use the memory in the
// same cycle.
module data_memory
  import cpu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = DATA_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_data  = mem[rd_addr];
  assign dbg_data = mem[dbg_addr];

endmodule
