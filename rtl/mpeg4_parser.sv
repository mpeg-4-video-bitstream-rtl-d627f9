// mpeg4_parser: programmable MPEG-4 video bitstream parsing processor.
//
// The processor runs a parsing program (the bitstream syntax written as
// FLD, VLD, FOR, BRP, BRN, FNC and CMP instructions) over an incoming
// bitstream and stores every decoded field in a data memory, from which it
// is also streamed out.  It is built from four units:
//   bit_sequencer    bitstream buffer: show, byte-aligned show and flush
//   functional_unit  field extraction, VLC table lookup, comparisons and
//                    arithmetic (contains vlc_table)
//   inst_dec         instruction decoder and cycle sequencer
//   mmu              instruction memory, data memory and address generator
// There is no pipeline: an instruction is read, decoded and executed in
// the cycle its address is generated, and takes 1 to 4 cycles (see
// inst_dec).  A cycle that needs more bitstream bits than the sequencer
// holds stalls.
//
// Use: with the processor stopped, load the program (imem_*), the VLC
// tables (vlc_*) and any initial data words (dmem_*); pulse start with
// prog_len set to the length of the top-level program.  Feed the bitstream
// on bs_data/bs_valid/bs_ready (first bit in bit 31).  out_valid/out_name/
// out_data carry each decoded word as it is written.  done rises when the
// program has run to its end; error when it hit an undefined instruction,
// a VLC miss, a control-stack overflow or a jump outside the program
// memory.  The data memory can be read through dmem_addr/dmem_rdata.
//
// The partition into sequencer, FU, INSTDEC and MMU (with AG), the seven
// instruction kinds and their cycle counts follow the published
// architecture; memory sizes, word widths, the instruction encoding and
// the host interface are this design's own.
module mpeg4_parser
  import parser_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_DEPTH  = 256,
  parameter int unsigned STACK_DEPTH = 8,
  parameter int unsigned VLC_ENTRIES = 512
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // control
  input  logic                             start,
  input  logic [$clog2(IMEM_DEPTH):0]      prog_len,
  input  logic                             imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0]    imem_waddr,
  input  logic [INST_W-1:0]                imem_wdata,
  input  logic                             vlc_clear,
  input  logic                             vlc_we,
  input  logic [$clog2(VLC_ENTRIES)-1:0]   vlc_waddr,
  input  vlc_entry_t                       vlc_wentry,
  input  logic                             dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0]    dmem_addr,
  input  logic [DATA_W-1:0]                dmem_wdata,
  output logic [DATA_W-1:0]                dmem_rdata,
  // bitstream
  input  logic [31:0]                      bs_data,
  input  logic                             bs_valid,
  output logic                             bs_ready,
  // decoded data
  output logic                             out_valid,
  output logic [$clog2(DMEM_DEPTH)-1:0]    out_name,
  output logic [DATA_W-1:0]                out_data,
  // status
  output logic                             busy,
  output logic                             done,
  output logic                             error,
  output logic                             stall,
  output logic [$clog2(IMEM_DEPTH)-1:0]    pc,
  output logic [$clog2(STACK_DEPTH+1)-1:0] depth
);

  logic [INST_W-1:0] iword;
  inst_t             inst;
  uop_t              u;
  logic              run, taken, fu_err, wr_en;
  logic [DATA_W-1:0] rdata, wdata;
  logic [31:0]       show, show_al;
  logic [2:0]        skip;
  logic [6:0]        avail;
  logic              flush_en;
  logic [5:0]        flush_n;

  bit_sequencer #(.IN_W(32), .BUF_W(64)) u_seq (
    .clk, .rst_n,
    .in_data  (bs_data),
    .in_valid (bs_valid),
    .in_ready (bs_ready),
    .show, .show_al, .skip, .avail, .flush_en, .flush_n
  );

  inst_dec u_dec (
    .clk, .rst_n, .iword, .run, .stall, .inst, .u
  );

  functional_unit #(.VLC_ENTRIES(VLC_ENTRIES)) u_fu (
    .clk, .rst_n, .inst, .u, .run, .rdata,
    .show, .show_al, .skip, .avail, .flush_en, .flush_n,
    .vlc_clear, .vlc_we, .vlc_waddr, .vlc_wentry,
    .stall, .taken, .wr_en, .wdata,
    .vld_err (fu_err)
  );

  mmu #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH),
    .STACK_DEPTH(STACK_DEPTH)
  ) u_mmu (
    .clk, .rst_n, .start, .prog_len,
    .imem_we, .imem_waddr, .imem_wdata,
    .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .iword, .inst, .u, .taken, .stall, .fu_err, .wr_en, .wdata, .rdata,
    .run, .done, .error, .pc, .depth,
    .out_valid, .out_name, .out_data
  );

  assign busy = run;

endmodule
