// mmu: the memory management unit.
//
// Groups the parsing-instruction memory, the data memory and the address
// generator that addresses both.  Towards the core it delivers the
// instruction at the program counter and the data word at the address the
// AG selects, and it writes the functional unit's results.  Towards the
// host it offers program loading, data-memory initialisation and read-out
// while the processor is not running, and an output stream: every word the
// processor writes to the data memory (every decoded symbol and CMP
// result) also appears, with its data name, on out_valid/out_name/out_data
// in the cycle it is written, for the motion, texture and shape decoders
// that follow the parser.
//
// Host writes to the data memory are accepted only while the processor is
// not running, so the single write port needs no arbitration.
//
// The grouping (instruction memory, data memory and AG in one unit, decoded
// data leaving the parser under the AG's control) follows the published
// block diagram; the host port and the output stream format are this
// design's own.
module mmu
  import parser_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_DEPTH  = 256,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // host
  input  logic                             start,
  input  logic [$clog2(IMEM_DEPTH):0]      prog_len,
  input  logic                             imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0]    imem_waddr,
  input  logic [INST_W-1:0]                imem_wdata,
  input  logic                             dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0]    dmem_addr,
  input  logic [DATA_W-1:0]                dmem_wdata,
  output logic [DATA_W-1:0]                dmem_rdata,
  // core
  output logic [INST_W-1:0]                iword,
  input  inst_t                            inst,
  input  uop_t                             u,
  input  logic                             taken,
  input  logic                             stall,
  input  logic                             fu_err,
  input  logic                             wr_en,
  input  logic [DATA_W-1:0]                wdata,
  output logic [DATA_W-1:0]                rdata,
  // status
  output logic                             run,
  output logic                             done,
  output logic                             error,
  output logic [$clog2(IMEM_DEPTH)-1:0]    pc,
  output logic [$clog2(STACK_DEPTH+1)-1:0] depth,
  // decoded-data output stream
  output logic                             out_valid,
  output logic [$clog2(DMEM_DEPTH)-1:0]    out_name,
  output logic [DATA_W-1:0]                out_data
);

  localparam int unsigned DA_W = $clog2(DMEM_DEPTH);

  logic [DA_W-1:0]   dm_raddr, dm_waddr, wa;
  logic              we;
  logic [DATA_W-1:0] wd;

  addr_gen #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH),
    .STACK_DEPTH(STACK_DEPTH)
  ) u_ag (
    .clk, .rst_n, .start, .prog_len, .inst, .u, .rdata, .taken, .stall,
    .fu_err, .pc, .run, .done, .error, .depth, .dm_raddr, .dm_waddr
  );

  inst_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .we    (imem_we && !run),
    .waddr (imem_waddr),
    .wdata (imem_wdata),
    .raddr (pc),
    .rdata (iword)
  );

  always_comb begin
    if (run) begin
      we = wr_en;
      wa = dm_waddr;
      wd = wdata;
    end else begin
      we = dmem_we;
      wa = dmem_addr;
      wd = dmem_wdata;
    end
  end

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .we         (we),
    .waddr      (wa),
    .wdata      (wd),
    .raddr      (dm_raddr),
    .rdata      (rdata),
    .host_raddr (dmem_addr),
    .host_rdata (dmem_rdata)
  );

  assign out_valid = run && wr_en;
  assign out_name  = dm_waddr;
  assign out_data  = wdata;

endmodule
