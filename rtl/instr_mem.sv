// instr_mem: program memory of the parser.
//
// Holds the parse program, one instr_t per word. The APC presents, in every
// cycle, the address of the instruction to execute in the upcoming cycle; the
// memory reads it synchronously, so 'instr' is valid one clock after 'raddr'.
// A single write port loads the program (from the configuration bus). Depth
// is this design's choice (256 words); the synchronous read matches the APC
// timing described for the architecture.
module instr_mem
  import parser_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output instr_t                   instr
);
  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    instr <= mem[raddr];
  end
endmodule
