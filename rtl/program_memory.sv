// program_memory: the 16 x 16-bit instruction store of the processor.
//
// The FI stage reads the word at the program counter combinationally; the
// low address bits of the 6-bit PC select one of the 16 words, so the
// program wraps around every 16 words. A synchronous write port loads a
// program (typically while the processor is held in reset). Contents are
// not reset.
//
// The size (16 words of 16 bits) follows the processor's description; the
// load port is this design's choice, replacing a program fixed in the
// source text.
module program_memory
  import cpu_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = INSTR_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
