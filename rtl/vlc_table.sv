// vlc_table: reloadable variable-length-code table with a one-cycle lookup.
//
// Each entry holds a table number, a codeword length (1..16), the codeword
// left-aligned in 16 bits and the symbol it stands for.  A lookup presents
// the next 16 bits of the bitstream and a table number; every valid entry of
// that table compares its first `len` bits with the bitstream at once, and
// the lowest-numbered matching entry gives the symbol and the number of
// bits to consume.  Because the codes of one table are prefix-free, at most
// one entry of a well-formed table matches.
//
// Interface: we/waddr/wentry load one entry per clock (clear_all drops
// every entry); the lookup (tbl, bits -> hit, len, sym) is combinational.
// Loading while the processor runs changes the table from the next cycle.
//
// A VLC decode in one clock by table lookup, with the tables held in a
// rewritable memory so the parser can be reconfigured, follows the
// published architecture.  The parallel-match organisation, the entry
// format and the table size are this design's own choices.
module vlc_table
  import parser_pkg::*;
#(
  parameter int unsigned ENTRIES = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear_all,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  vlc_entry_t                 wentry,
  input  logic [VLC_TBL_W-1:0]       tbl,
  input  logic [VLC_CODE_W-1:0]      bits,
  output logic                       hit,
  output logic [VLC_LEN_W-1:0]       len,
  output logic [VLC_SYM_W-1:0]       sym
);

  vlc_entry_t         ent_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] match, first;

  always_ff @(posedge clk) begin
    if (!rst_n || clear_all) valid_q <= '0;
    else if (we)             valid_q[waddr] <= (wentry.len != '0);
  end

  // one register per entry: every entry is compared in every cycle
  for (genvar i = 0; i < ENTRIES; i++) begin : g_ent
    logic [VLC_CODE_W-1:0] mask;
    always_ff @(posedge clk) begin
      if (we && waddr == i) ent_q[i] <= wentry;
    end
    assign mask     = ~({VLC_CODE_W{1'b1}} >> ent_q[i].len);
    assign match[i] = valid_q[i] && ent_q[i].tbl == tbl &&
                      ((bits ^ ent_q[i].code) & mask) == '0;
  end

  // lowest-numbered match wins
  assign first = match & (~match + ENTRIES'(1));

  always_comb begin
    logic [VLC_LEN_W+VLC_SYM_W-1:0] pick;
    pick = '0;
    for (int i = 0; i < ENTRIES; i++)
      pick |= {(VLC_LEN_W+VLC_SYM_W){first[i]}} & {ent_q[i].len, ent_q[i].sym};
    hit = |match;
    {len, sym} = pick;
  end

endmodule
