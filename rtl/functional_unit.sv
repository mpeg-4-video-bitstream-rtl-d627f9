// functional_unit: the datapath of the parsing processor (FU).
//
// It does the work of every instruction that touches bits or data:
//   FLD  takes the next `nbits` bits (or as many as the word in operand
//        register A says) from the sequencer, right-aligned, and consumes
//        them unless the instruction is a "next" look-ahead; with the
//        byte-align flag it first skips to the next byte boundary (with a
//        length of 0 this is a plain ByteAlign);
//   VLD  looks the next 16 bits up in the VLC table (vlc_table) and
//        consumes the matched codeword;
//   BRP  compares operand register A (a previously decoded word) with an
//        immediate or with a word read this cycle;
//   BRN  compares the next bits, optionally from the next byte boundary,
//        with an immediate or a word read this cycle;
//   CMP  adds, subtracts or shifts operand A by an immediate or operand B.
// Two conditions of one branch are combined with AND or OR: the result of
// condition 0 is held in a register and merged with condition 1 in the
// cycle that evaluates it.
//
// Interface: the decoded instruction (inst) and the per-cycle control (u)
// come from the instruction decoder; rdata is the data-memory word read
// this cycle (combinational read).  The unit stalls the instruction while
// the sequencer holds fewer bits than the current cycle needs (FLD: its
// length, VLD: 16, BRN: its bit count plus the bits to the byte boundary
// when aligned; an aligned FLD likewise).  taken is the branch decision, valid in the last cycle of
// BRP/BRN.  wr_en/wdata write the result to the data memory.  vld_err
// flags a VLD whose bits match no entry; nothing is then consumed or
// written.  All registers load only in cycles that are not stalled.
//
// The operations follow the published description; lengths above 32 taken
// from data memory are clamped to 32, comparisons are unsigned and shifts
// use the low 5 bits of the operand, and FLD's byte-align flag (the
// source gives that parameter to BRN only) is an addition: these are this
// design's choices.
module functional_unit
  import parser_pkg::*;
#(
  parameter int unsigned VLC_ENTRIES = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  inst_t                         inst,
  input  uop_t                          u,
  input  logic                          run,
  input  logic [DATA_W-1:0]             rdata,
  // sequencer
  input  logic [SHOW_W-1:0]             show,
  input  logic [SHOW_W-1:0]             show_al,
  input  logic [2:0]                    skip,
  input  logic [6:0]                    avail,
  output logic                          flush_en,
  output logic [5:0]                    flush_n,
  // VLC table loading
  input  logic                          vlc_clear,
  input  logic                          vlc_we,
  input  logic [$clog2(VLC_ENTRIES)-1:0] vlc_waddr,
  input  vlc_entry_t                    vlc_wentry,
  // results
  output logic                          stall,
  output logic                          taken,
  output logic                          wr_en,
  output logic [DATA_W-1:0]             wdata,
  output logic                          vld_err
);

  logic [DATA_W-1:0] a_q, b_q;
  logic              c0_q;

  // ---- VLC lookup ----
  logic                  vlc_hit;
  logic [VLC_LEN_W-1:0]  vlc_len;
  logic [VLC_SYM_W-1:0]  vlc_sym;

  vlc_table #(.ENTRIES(VLC_ENTRIES)) u_vlc (
    .clk, .rst_n,
    .clear_all (vlc_clear),
    .we        (vlc_we),
    .waddr     (vlc_waddr),
    .wentry    (vlc_wentry),
    .tbl       (inst.tbl),
    .bits      (show[SHOW_W-1 -: VLC_CODE_W]),
    .hit       (vlc_hit),
    .len       (vlc_len),
    .sym       (vlc_sym)
  );

  function automatic logic [DATA_W-1:0] right_align(logic [SHOW_W-1:0] w, logic [5:0] n);
    logic [2*SHOW_W-1:0] t;
    t = {{SHOW_W{1'b0}}, w} << n;
    return t[2*SHOW_W-1 -: DATA_W];
  endfunction

  logic [5:0]        fld_len;
  logic [6:0]        need;
  logic [SHOW_W-1:0] nb_src;
  logic [DATA_W-1:0] lhs, rhs, alu_b, alu_y;
  logic              res;

  always_comb begin
    // FLD length: immediate, or the word latched in A (clamped to 32)
    if (u.fld_len_a) fld_len = (a_q > DATA_W'(SHOW_W)) ? 6'(SHOW_W) : a_q[5:0];
    else             fld_len = (inst.nbits > 6'(SHOW_W)) ? 6'(SHOW_W) : inst.nbits;

    // bits the current cycle needs from the sequencer
    need = '0;
    if (u.fld)      need = 7'(fld_len) + (inst.balign ? 7'(skip) : 7'd0);
    if (u.vld)      need = 7'(VLC_CODE_W);
    if (u.cmp_show) need = 7'(inst.nbits) + (inst.balign ? 7'(skip) : 7'd0);
    stall = run && (avail < need);

    // comparison
    nb_src = inst.balign ? show_al : show;
    lhs    = u.cmp_show ? right_align(nb_src, inst.nbits) : a_q;
    rhs    = u.cmp_rdata ? rdata : (u.cmp_idx ? inst.val1 : inst.val0);
    res    = rel_eval(u.cmp_idx ? inst.rel1 : inst.rel0, lhs, rhs);
    if (!u.cmp_idx) taken = res;
    else            taken = inst.comb_or ? (c0_q | res) : (c0_q & res);

    // CMP arithmetic
    alu_b = inst.imm ? inst.val0 : b_q;
    unique case (inst.alu)
      ALU_ADD: alu_y = a_q + alu_b;
      ALU_SUB: alu_y = a_q - alu_b;
      ALU_SHL: alu_y = a_q << alu_b[4:0];
      default: alu_y = a_q >> alu_b[4:0];
    endcase

    // result and consumption
    vld_err  = run && u.vld && !stall && !vlc_hit;
    wr_en    = run && u.wr && !stall && !vld_err;
    flush_en = 1'b0;
    flush_n  = '0;
    wdata    = alu_y;
    if (u.fld) begin
      wdata    = right_align(inst.balign ? show_al : show, fld_len);
      flush_en = run && !stall && !inst.loop;
      flush_n  = fld_len + (inst.balign ? 6'(skip) : 6'd0);
    end else if (u.vld) begin
      wdata    = DATA_W'(vlc_sym);
      flush_en = run && !stall && vlc_hit;
      flush_n  = 6'(vlc_len);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      c0_q <= 1'b0;
    end else if (run && !stall) begin
      if (u.lat_a) a_q <= rdata;
      if (u.lat_b) b_q <= rdata;
      if (u.cmp_en && !u.cmp_idx) c0_q <= res;
    end
  end

endmodule
