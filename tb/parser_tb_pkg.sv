// parser_tb_pkg: testbench helpers for the parsing processor.
//
// Instruction constructors (one function per instruction form) and a
// reference interpreter.  The interpreter executes a parsing program the
// way the syntax reads: loops, while-branches and function calls are
// recursive calls on the instruction range they govern, so it shares no
// mechanism with the hardware's control stack.  It also counts the clock
// cycles each instruction should take and how often each mechanism ran.
package parser_tb_pkg;
  import parser_pkg::*;

  // ---------------- instruction constructors ----------------
  function automatic inst_t base(op_e op);
    inst_t i;
    i = '0;
    i.op = op;
    i.imm = 1'b1;
    return i;
  endfunction

  function automatic inst_t i_fld(int name, int nbits, bit look = 0);
    inst_t i = base(OP_FLD);
    i.name0 = 8'(name); i.nbits = 6'(nbits); i.loop = look;
    return i;
  endfunction

  // FLD that first skips to the next byte boundary (nbits 0: ByteAlign)
  function automatic inst_t i_fld_al(int name, int nbits);
    inst_t i = i_fld(name, nbits);
    i.balign = 1'b1;
    return i;
  endfunction

  function automatic inst_t i_fld_d(int name, int len_name);
    inst_t i = base(OP_FLD);
    i.imm = 1'b0; i.name0 = 8'(name); i.name1 = 8'(len_name);
    return i;
  endfunction

  function automatic inst_t i_vld(int name, int tbl);
    inst_t i = base(OP_VLD);
    i.name0 = 8'(name); i.tbl = 4'(tbl);
    return i;
  endfunction

  function automatic inst_t i_for(int len, int times, bit from_data = 0);
    inst_t i = base(OP_FOR);
    i.len = 8'(len); i.imm = !from_data;
    if (from_data) i.name0 = 8'(times); else i.val0 = 32'(times);
    return i;
  endfunction

  function automatic inst_t i_fnc(int addr, int len, bit from_data = 0);
    inst_t i = base(OP_FNC);
    i.len = 8'(len); i.imm = !from_data;
    if (from_data) i.name0 = 8'(addr); else i.val0 = 32'(addr);
    return i;
  endfunction

  function automatic inst_t i_cmp(int name, alu_e op, int operand, bit from_data = 0);
    inst_t i = base(OP_CMP);
    i.name0 = 8'(name); i.alu = op; i.imm = !from_data;
    if (from_data) i.name1 = 8'(operand); else i.val0 = 32'(operand);
    return i;
  endfunction

  // BRP: compare data[n0] rel0 v0 (and data[n1] rel1 v1); v0/v1 are
  // immediates, or data names when from_data is set.
  function automatic inst_t i_brp(bit is_while, int len, int nxt,
                                  int n0, rel_e r0, int v0,
                                  bit two = 0, bit comb_or = 0,
                                  int n1 = 0, rel_e r1 = REL_EQ, int v1 = 0,
                                  bit from_data = 0);
    inst_t i = base(OP_BRP);
    i.loop = is_while; i.len = 8'(len); i.nxt = 8'(nxt);
    i.name0 = 8'(n0); i.rel0 = r0; i.val0 = 32'(v0);
    i.two = two; i.comb_or = comb_or;
    i.name1 = 8'(n1); i.rel1 = r1; i.val1 = 32'(v1);
    i.imm = !from_data;
    return i;
  endfunction

  // BRN: compare the next nbits bits (from the next byte boundary when
  // balign) with v0 (and v1).
  function automatic inst_t i_brn(bit is_while, int len, int nxt, int nbits,
                                  rel_e r0, int v0,
                                  bit two = 0, bit comb_or = 0,
                                  rel_e r1 = REL_EQ, int v1 = 0,
                                  bit balign = 0, bit from_data = 0);
    inst_t i = base(OP_BRN);
    i.loop = is_while; i.len = 8'(len); i.nxt = 8'(nxt); i.nbits = 6'(nbits);
    i.rel0 = r0; i.val0 = 32'(v0); i.two = two; i.comb_or = comb_or;
    i.rel1 = r1; i.val1 = 32'(v1); i.balign = balign; i.imm = !from_data;
    return i;
  endfunction

  function automatic bit rel_ref(rel_e r, longint unsigned a, longint unsigned b);
    case (r)
      REL_EQ: return a == b;
      REL_NE: return a != b;
      REL_LT: return a < b;
      REL_GT: return a > b;
      REL_LE: return a <= b;
      REL_GE: return a >= b;
      default: return 0;
    endcase
  endfunction

  // ---------------- reference interpreter ----------------
  class ref_model;
    inst_t             prog [256];
    bit [31:0]         data [256];
    bit [31:0]         words [$];     // bitstream, MSB first
    longint            bp;            // bit position
    vlc_entry_t        vlc [$];
    int                cycles;
    int                wr_name [$];
    bit [31:0]         wr_data [$];
    bit                err;
    int                n_op [8];
    int                n_fld_data, n_look, n_two, n_while_iter, n_else,
                       n_if_taken, n_balign, n_for_data, n_fnc_data,
                       n_brp_data, n_brn_data, n_fld_align;

    function new();
      bp = 0; cycles = 0; err = 0;
      foreach (n_op[k]) n_op[k] = 0;
      n_fld_data = 0; n_look = 0; n_two = 0; n_while_iter = 0; n_else = 0;
      n_if_taken = 0; n_balign = 0; n_for_data = 0; n_fnc_data = 0;
      n_brp_data = 0; n_brn_data = 0; n_fld_align = 0;
    endfunction

    function bit bit_at(longint p);
      return words[p / 32][31 - (p % 32)];
    endfunction

    function bit [31:0] peek(longint p, int n);
      bit [31:0] v = 0;
      for (int k = 0; k < n; k++) v = {v[30:0], bit_at(p + k)};
      return v;
    endfunction

    function void write(int name, bit [31:0] v);
      data[name] = v;
      wr_name.push_back(name);
      wr_data.push_back(v);
    endfunction

    // evaluate the condition(s) of a branch, counting its cycles
    function bit cond(inst_t i);
      bit c0, c1;
      bit [31:0] nb;
      if (i.op == OP_BRP) begin
        cycles += i.imm ? (i.two ? 3 : 2) : (i.two ? 4 : 2);
        if (!i.imm) n_brp_data++;
        c0 = rel_ref(i.rel0, data[i.name0], i.imm ? i.val0 : data[i.val0[7:0]]);
        c1 = rel_ref(i.rel1, data[i.name1], i.imm ? i.val1 : data[i.val1[7:0]]);
      end else begin
        longint p = bp;
        cycles += i.two ? 2 : 1;
        if (!i.imm) n_brn_data++;
        if (i.balign) begin p = (bp + 7) / 8 * 8; n_balign++; end
        nb = peek(p, i.nbits);
        c0 = rel_ref(i.rel0, nb, i.imm ? i.val0 : data[i.val0[7:0]]);
        c1 = rel_ref(i.rel1, nb, i.imm ? i.val1 : data[i.val1[7:0]]);
      end
      if (!i.two) return c0;
      n_two++;
      return i.comb_or ? (c0 | c1) : (c0 & c1);
    endfunction

    // run instructions [s, e); returns 0 on error
    function automatic bit exec_range(int s, int e, int depth);
      int pc = s;
      while (pc < e) begin
        inst_t i = prog[pc];
        int body_end = pc + 1 + i.len;
        n_op[i.op]++;
        case (i.op)
          OP_FLD: begin
            int n;
            if (i.imm) begin n = i.nbits; cycles += 1; end
            else begin
              n = (data[i.name1] > 32) ? 32 : int'(data[i.name1]);
              cycles += 2; n_fld_data++;
            end
            begin
              longint p = bp;
              if (i.balign) begin p = (bp + 7) / 8 * 8; n_fld_align++; end
              write(i.name0, peek(p, n));
              if (!i.loop) bp = p + n; else n_look++;
            end
            pc++;
          end
          OP_VLD: begin
            bit hit = 0;
            bit [15:0] nx = 16'(peek(bp, 16));
            cycles += 1;
            foreach (vlc[k]) begin
              bit [15:0] mask = ~(16'hFFFF >> vlc[k].len);
              if (!hit && vlc[k].tbl == i.tbl && ((nx ^ vlc[k].code) & mask) == 0) begin
                hit = 1;
                write(i.name0, 32'(vlc[k].sym));
                bp += vlc[k].len;
              end
            end
            if (!hit) begin err = 1; return 0; end
            pc++;
          end
          OP_FOR: begin
            bit [31:0] t = i.imm ? i.val0 : data[i.name0];
            cycles += 1;
            if (!i.imm) n_for_data++;
            if (i.len != 0)
              for (longint k = 0; k < t; k++)
                if (!exec_range(pc + 1, body_end, depth + 1)) return 0;
            pc = body_end;
          end
          OP_FNC: begin
            int a = i.imm ? int'(i.val0) : int'(data[i.name0]);
            cycles += 1;
            if (!i.imm) n_fnc_data++;
            if (i.len != 0) begin
              if (depth >= 8) begin err = 1; return 0; end
              if (!exec_range(a, a + i.len, depth + 1)) return 0;
            end
            pc++;
          end
          OP_BRP, OP_BRN: begin
            if (i.loop) begin
              while (cond(i) && i.len != 0) begin
                n_while_iter++;
                if (!exec_range(pc + 1, body_end, depth + 1)) return 0;
              end
              pc = body_end;
            end else if (cond(i)) begin
              n_if_taken++;
              if (i.len != 0 && !exec_range(pc + 1, body_end, depth + 1)) return 0;
              pc = body_end + i.nxt;
            end else begin
              if (i.nxt != 0) n_else++;
              pc = body_end;
            end
          end
          OP_CMP: begin
            bit [31:0] a = data[i.name0];
            bit [31:0] b = i.imm ? i.val0 : data[i.name1];
            cycles += i.imm ? 2 : 3;
            case (i.alu)
              ALU_ADD: a = a + b;
              ALU_SUB: a = a - b;
              ALU_SHL: a = a << b[4:0];
              default: a = a >> b[4:0];
            endcase
            write(i.name0, a);
            pc++;
          end
          default: begin err = 1; return 0; end
        endcase
      end
      return 1;
    endfunction
  endclass

endpackage
