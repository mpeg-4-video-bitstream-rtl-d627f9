// inst_mem: the parsing-instruction memory.
//
// Holds the parsing program, one 128-bit instruction per word.  The read
// is combinational (address in, instruction out in the same cycle), so an
// instruction is available in the cycle its address is generated and the
// processor needs no fetch pipeline.  One synchronous write port loads the
// program from the host; the contents are not reset.
//
// A rewritable instruction memory is part of the published architecture
// (the parser is reprogrammed by rewriting it); the depth and the
// combinational read are this design's choices.
module inst_mem
  import parser_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [INST_W-1:0]        wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [INST_W-1:0]        rdata
);

  logic [INST_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
