// addr_gen: the address generator (AG) of the memory management unit.
//
// It owns the program counter and generates the data-memory addresses.
// Sequential instructions go to pc+1.  The structured instructions name
// only the length of the code they govern, never its end, so the AG keeps
// a control stack of open regions and recognises, when the next address
// reaches the end of a region, what to do there:
//   FOR   "repeat the next len instructions N times": a FOR frame with the
//         remaining count; at its end jump back to the body or, after the
//         last pass, fall out of the loop;
//   BRP/BRN "while": a WHILE frame; at the end of the body jump back to the
//         branch instruction, which re-evaluates its condition;
//   BRP/BRN "if" with an else part of `nxt` instructions: a taken branch
//         opens an IF frame whose end skips the else part; a branch not
//         taken jumps over the body (len instructions) straight into the
//         else part, which needs no frame;
//   FNC   "call len instructions at address": a FUNC frame whose end
//         returns to the instruction after the call.
// Several regions can end at the same address; all of them are closed in
// the same cycle (the stack is unwound combinationally), so no instruction
// marks the end of a branch or loop and closing costs no cycle.  A FOR
// whose count or length is zero, and a branch with an empty body, just
// skip their body.  The whole program is the region [0, prog_len): the
// processor is done when the next address reaches prog_len with no region
// open.
//
// Interface: start (while not running) begins at address 0.  The decoded
// instruction and its per-cycle control come from the instruction decoder;
// rdata is the data word read this cycle (loop count or function address
// in the data form); taken is the functional unit's branch decision.  pc
// is the instruction address; dm_raddr/dm_waddr address the data memory.
// error is set, and the processor stops, on an undefined instruction, a
// VLC miss, a control-stack overflow or a jump outside the instruction
// memory.  depth is the number of open regions.
//
// The AG's role (next instruction address for FOR, FNC and branches, data
// addresses, detection of the end of a branch or loop without an extra
// instruction) is the published one; the control stack, its depth, the
// "Next" field as the length of an else part and the error handling are
// this design's own.
module addr_gen
  import parser_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_DEPTH  = 256,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [$clog2(IMEM_DEPTH):0]      prog_len,
  input  inst_t                            inst,
  input  uop_t                             u,
  input  logic [DATA_W-1:0]                rdata,
  input  logic                             taken,
  input  logic                             stall,
  input  logic                             fu_err,
  output logic [$clog2(IMEM_DEPTH)-1:0]    pc,
  output logic                             run,
  output logic                             done,
  output logic                             error,
  output logic [$clog2(STACK_DEPTH+1)-1:0] depth,
  output logic [$clog2(DMEM_DEPTH)-1:0]    dm_raddr,
  output logic [$clog2(DMEM_DEPTH)-1:0]    dm_waddr
);

  localparam int unsigned IA_W = $clog2(IMEM_DEPTH);
  localparam int unsigned AW   = IA_W + 2;          // room for end addresses
  localparam int unsigned DA_W = $clog2(DMEM_DEPTH);
  localparam int unsigned SP_W = $clog2(STACK_DEPTH + 1);
  localparam int unsigned IX_W = $clog2(STACK_DEPTH);

  typedef struct packed {
    frame_e            kind;
    logic [AW-1:0]     end_a;   // first address after the region
    logic [AW-1:0]     tgt;     // where to go when the region ends
    logic [DATA_W-1:0] cnt;     // FOR: passes left, this one included
  } frame_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE, S_ERR} state_e;

  state_e        state_q, state_d;
  logic [AW-1:0] pc_q, pc_d;
  logic [SP_W-1:0] sp_q, sp_d;
  frame_t        st_q [STACK_DEPTH];
  frame_t        st_d [STACK_DEPTH];

  assign run   = (state_q == S_RUN);
  assign done  = (state_q == S_DONE);
  assign error = (state_q == S_ERR);
  assign pc    = pc_q[IA_W-1:0];
  assign depth = sp_q;

  // data-memory addresses
  always_comb begin
    unique case (u.rd_sel)
      RD_NAME0: dm_raddr = DA_W'(inst.name0);
      RD_NAME1: dm_raddr = DA_W'(inst.name1);
      RD_VAL0:  dm_raddr = DA_W'(inst.val0);
      default:  dm_raddr = DA_W'(inst.val1);
    endcase
  end
  assign dm_waddr = DA_W'(inst.name0);

  // next address and control stack
  always_comb begin
    logic          fire, push, stop, bad;
    frame_t        fr;
    logic [AW-1:0] pc1, body_end, cand, npc, fn_addr;
    logic [DATA_W-1:0] times;
    logic [SP_W-1:0] sp_v;
    logic [IX_W-1:0] ti;
    frame_t          st_v [STACK_DEPTH];

    state_d = state_q;
    pc_d    = pc_q;
    sp_d    = sp_q;
    st_d    = st_q;

    fire     = run && u.last && !stall;
    pc1      = pc_q + AW'(1);
    body_end = pc1 + AW'(inst.len);
    times    = inst.imm ? inst.val0 : rdata;
    fn_addr  = inst.imm ? AW'(inst.val0) : AW'(rdata);
    push     = 1'b0;
    fr       = '{kind: FR_FOR, end_a: body_end, tgt: pc1, cnt: times};
    cand     = pc1;
    bad      = 1'b0;

    unique case (inst.op)
      OP_FOR: begin
        if (times == '0 || inst.len == '0) cand = body_end;
        else                               push = 1'b1;
      end
      OP_FNC: begin
        if (inst.len != '0) begin
          push = 1'b1;
          fr   = '{kind: FR_FUNC, end_a: fn_addr + AW'(inst.len), tgt: pc1, cnt: '0};
          cand = fn_addr;
        end
      end
      OP_BRP, OP_BRN: begin
        if (!taken) begin
          cand = body_end;
        end else if (inst.loop) begin
          if (inst.len == '0) begin
            cand = body_end;
          end else begin
            push = 1'b1;
            fr   = '{kind: FR_WHILE, end_a: body_end, tgt: pc_q, cnt: '0};
          end
        end else if (inst.nxt != '0) begin
          if (inst.len == '0) begin
            cand = body_end + AW'(inst.nxt);
          end else begin
            push = 1'b1;
            fr   = '{kind: FR_IF, end_a: body_end, tgt: body_end + AW'(inst.nxt), cnt: '0};
          end
        end
      end
      default: ;
    endcase

    // push, then close every region that ends at the candidate address
    sp_v = sp_q;
    st_v = st_q;
    if (push && sp_v != SP_W'(STACK_DEPTH)) begin
      st_v[IX_W'(sp_v)] = fr;
      sp_v       = sp_v + SP_W'(1);
    end else if (push) begin
      bad = 1'b1;                       // control-stack overflow
    end
    npc  = cand;
    stop = 1'b0;
    for (int i = 0; i < STACK_DEPTH; i++) begin
      ti = IX_W'(sp_v - SP_W'(1));
      if (!stop && sp_v != '0 && st_v[ti].end_a == npc) begin
        unique case (st_v[ti].kind)
          FR_FOR: begin
            if (st_v[ti].cnt > DATA_W'(1)) begin
              st_v[ti].cnt = st_v[ti].cnt - DATA_W'(1);
              npc  = st_v[ti].tgt;
              stop = 1'b1;
            end else begin
              sp_v = sp_v - SP_W'(1);
            end
          end
          FR_WHILE: begin
            npc  = st_v[ti].tgt;
            sp_v = sp_v - SP_W'(1);
            stop = 1'b1;
          end
          default: begin                // FR_FUNC, FR_IF
            npc  = st_v[ti].tgt;
            sp_v = sp_v - SP_W'(1);
          end
        endcase
      end else begin
        stop = 1'b1;
      end
    end

    if (!run) begin
      if (start) begin
        pc_d    = '0;
        sp_d    = '0;
        state_d = (prog_len == '0) ? S_DONE : S_RUN;
      end
    end else if (fu_err || (fire && (u.illegal || bad))) begin
      state_d = S_ERR;
    end else if (fire) begin
      pc_d = npc;
      sp_d = sp_v;
      st_d = st_v;
      if (sp_v == '0 && npc >= AW'(prog_len)) state_d = S_DONE;
      else if (npc >= AW'(IMEM_DEPTH))        state_d = S_ERR;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      sp_q    <= '0;
    end else begin
      state_q <= state_d;
      pc_q    <= pc_d;
      sp_q    <= sp_d;
    end
  end

  always_ff @(posedge clk) begin
    st_q <= st_d;
  end

endmodule
