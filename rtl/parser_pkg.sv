// parser_pkg: shared types and constants of the MPEG-4 bitstream parsing
// processor.
//
// The processor executes "parsing instructions", seven kinds of them (FLD,
// VLD, FOR, BRP, BRN, FNC, CMP), each carrying the parameters of its group
// in the instruction set.  The set of instructions and the meaning of their
// parameters follow the published instruction set; the binary layout of the
// 128-bit instruction word, the field widths and the encodings of the
// comparison and arithmetic operations are this design's own choices.
//
// Instruction word (inst_t, MSB first):
//   op      [127:125] instruction kind
//   imm     [124]     Immediate/data: 1 = value fields are immediates,
//                     0 = they name a data-memory word
//   loop    [123]     BRP/BRN: 1 = "while", 0 = "if";  FLD: 1 = "next"
//                     (look at the bits without consuming them)
//   balign  [122]     BRN: compare the next byte-aligned bits;
//                     FLD: skip to the next byte boundary first
//   two     [121]     Cond number: 0 = one condition, 1 = two conditions
//   rel0    [120:118] Equality of condition 0
//   rel1    [117:115] Equality of condition 1
//   comb_or [114]     how the two conditions combine: 0 = AND, 1 = OR
//   alu     [113:112] CMP operation
//   tbl     [111:108] VLD: which VLC table to use
//   nbits   [107:102] FLD data length / BRN next bit number (0..32)
//   len     [101:94]  branch length / loop length / function length
//   nxt     [93:86]   BRP/BRN "Next": length of the else part that follows
//                     the branch body (0 = no else part)
//   name0   [85:78]   first data name (data-memory address)
//   name1   [77:70]   second data name
//   val0    [69:38]   first compared value / FOR times / FNC address /
//                     CMP operand
//   val1    [37:6]    second compared value
//   rsvd    [5:0]     unused, write 0
package parser_pkg;

  localparam int unsigned DATA_W     = 32;  // data-memory word, longest field
  localparam int unsigned NAME_W     = 8;   // data-memory address
  localparam int unsigned SHOW_W     = 32;  // widest ShowBits window
  localparam int unsigned NB_W       = 6;   // bit count 0..32
  localparam int unsigned LEN_W      = 8;   // body lengths
  localparam int unsigned VLC_CODE_W = 16;  // longest VLC codeword
  localparam int unsigned VLC_LEN_W  = 5;   // codeword length 1..16
  localparam int unsigned VLC_SYM_W  = 16;  // decoded VLC symbol
  localparam int unsigned VLC_TBL_W  = 4;   // up to 16 VLC tables
  localparam int unsigned INST_W     = 128;

  typedef enum logic [2:0] {
    OP_FLD = 3'd0,   // fixed-length decode
    OP_VLD = 3'd1,   // variable-length decode (table lookup)
    OP_FOR = 3'd2,   // counted loop over the next `len` instructions
    OP_BRP = 3'd3,   // branch on previously decoded data
    OP_BRN = 3'd4,   // branch on the next bits of the bitstream
    OP_FNC = 3'd5,   // function call
    OP_CMP = 3'd6,   // arithmetic on decoded data
    OP_ILL = 3'd7    // not an instruction: stops the processor with an error
  } op_e;

  typedef enum logic [2:0] {
    REL_EQ = 3'd0, REL_NE = 3'd1, REL_LT = 3'd2,
    REL_GT = 3'd3, REL_LE = 3'd4, REL_GE = 3'd5
  } rel_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0, ALU_SUB = 2'd1, ALU_SHL = 2'd2, ALU_SHR = 2'd3
  } alu_e;

  typedef struct packed {
    op_e                  op;
    logic                 imm;
    logic                 loop;
    logic                 balign;
    logic                 two;
    rel_e                 rel0;
    rel_e                 rel1;
    logic                 comb_or;
    alu_e                 alu;
    logic [VLC_TBL_W-1:0] tbl;
    logic [NB_W-1:0]      nbits;
    logic [LEN_W-1:0]     len;
    logic [LEN_W-1:0]     nxt;
    logic [NAME_W-1:0]    name0;
    logic [NAME_W-1:0]    name1;
    logic [DATA_W-1:0]    val0;
    logic [DATA_W-1:0]    val1;
    logic [5:0]           rsvd;
  } inst_t;

  // Which field addresses the data memory in the current cycle.
  typedef enum logic [1:0] {
    RD_NAME0 = 2'd0, RD_NAME1 = 2'd1, RD_VAL0 = 2'd2, RD_VAL1 = 2'd3
  } rdsel_e;

  // Per-cycle control produced by the instruction decoder.
  typedef struct packed {
    logic   rd_en;      // read the data memory this cycle
    rdsel_e rd_sel;     // ... at this field
    logic   lat_a;      // latch the read word into operand register A
    logic   lat_b;      // latch the read word into operand register B
    logic   cmp_en;     // evaluate a condition this cycle
    logic   cmp_idx;    // ... condition 0 or 1
    logic   cmp_show;   // left side is the next bitstream bits (BRN), else A
    logic   cmp_rdata;  // right side is the word read this cycle, else immediate
    logic   fld;        // fixed-length extraction
    logic   fld_len_a;  // ... with the length taken from register A
    logic   vld;        // VLC table lookup
    logic   alu;        // CMP arithmetic on A and (B or immediate)
    logic   wr;         // write the result to data memory at name0
    logic   illegal;    // undefined opcode
    logic   last;       // final cycle of the instruction
  } uop_t;

  // Address-generator control stack frame kinds.
  typedef enum logic [1:0] {
    FR_FOR = 2'd0, FR_WHILE = 2'd1, FR_FUNC = 2'd2, FR_IF = 2'd3
  } frame_e;

  // VLC table entry: the codeword is stored left-aligned in `code`.
  typedef struct packed {
    logic [VLC_TBL_W-1:0]  tbl;
    logic [VLC_LEN_W-1:0]  len;
    logic [VLC_CODE_W-1:0] code;
    logic [VLC_SYM_W-1:0]  sym;
  } vlc_entry_t;

  function automatic logic rel_eval(rel_e r, logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    unique case (r)
      REL_EQ:  return a == b;
      REL_NE:  return a != b;
      REL_LT:  return a <  b;
      REL_GT:  return a >  b;
      REL_LE:  return a <= b;
      REL_GE:  return a >= b;
      default: return 1'b0;
    endcase
  endfunction

endpackage
