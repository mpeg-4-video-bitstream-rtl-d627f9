// data_mem: the data memory of decoded symbols.
//
// Every decoded field (FLD, VLD) and every CMP result is stored at the
// address its instruction names ("data name"); branches, loops and later
// field lengths read it back.  Two combinational read ports: one for the
// processor, one for the host, which reads decoded results out.  One
// synchronous write port.  The contents are not reset.
//
// A data memory read without latency follows the published architecture;
// the depth, the width and the second (host) read port are this design's
// choices.
module data_mem
  import parser_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DATA_W-1:0]        wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DATA_W-1:0]        rdata,
  input  logic [$clog2(DEPTH)-1:0] host_raddr,
  output logic [DATA_W-1:0]        host_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata      = mem[raddr];
  assign host_rdata = mem[host_raddr];

endmodule
