// tb_functional_unit: test of the FU datapath with directly driven control.
//
// The sequencer outputs (show, show_al, skip, avail) and the data word are
// driven by the testbench.  Random trials of each operation are compared
// with software results: FLD (immediate and data length, look-ahead,
// byte-aligned,
// stall when too few bits), VLD (hit, miss, stall), one- and two-condition
// comparisons on register A, on the next bits and on the byte-aligned
// next bits against immediates and data words, and the four CMP
// operations on registers A and B.
module tb_functional_unit;
  import parser_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  inst_t             inst;
  uop_t              u;
  logic              run;
  logic [31:0]       rdata, show, show_al;
  logic [2:0]        skip;
  logic [6:0]        avail;
  logic              flush_en;
  logic [5:0]        flush_n;
  logic              vlc_clear, vlc_we;
  logic [8:0]        vlc_waddr;
  vlc_entry_t        vlc_wentry;
  logic              stall, taken, wr_en, vld_err;
  logic [31:0]       wdata;

  always #5 clk = ~clk;

  functional_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit relf(rel_e r, bit [31:0] a, bit [31:0] b);
    case (r)
      REL_EQ: return a == b;  REL_NE: return a != b;
      REL_LT: return a < b;   REL_GT: return a > b;
      REL_LE: return a <= b;  default: return a >= b;
    endcase
  endfunction

  function automatic bit [31:0] topbits(bit [31:0] w, int n);
    return (n == 0) ? 0 : (w >> (32 - n));
  endfunction

  // latch a word into A (or B) through one control cycle
  task automatic latch(bit into_b, bit [31:0] v);
    @(negedge clk);
    u = '0; u.lat_a = !into_b; u.lat_b = into_b; rdata = v;
    @(negedge clk);
    u = '0;
  endtask

  initial begin
    rst_n = 0; run = 1; inst = '0; u = '0; rdata = 0; show = 0; show_al = 0;
    skip = 0; avail = 0; vlc_clear = 0; vlc_we = 0; vlc_waddr = 0; vlc_wentry = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // VLC table 2: 1 -> 40, 01 -> 41, 001 -> 42 (000 misses)
    for (int k = 0; k < 3; k++) begin
      vlc_we = 1; vlc_waddr = 9'(k);
      vlc_wentry = '{tbl: 4'd2, len: 5'(k + 1), code: 16'(16'h8000 >> k), sym: 16'(40 + k)};
      @(negedge clk);
    end
    vlc_we = 0;

    for (int t = 0; t < 3000; t++) begin
      int n, a_len, expn;
      bit [31:0] w, va, vb, v0, v1;
      rel_e r0, r1;
      bit c0, c1, co;
      w = $urandom(); avail = 7'($urandom_range(64)); show = w;

      // FLD, immediate length
      n = $urandom_range(32);
      inst = '0; inst.op = OP_FLD; inst.imm = 1; inst.nbits = 6'(n); inst.loop = $urandom_range(1);
      inst.balign = $urandom_range(1); show_al = $urandom(); skip = 3'($urandom_range(7));
      u = '0; u.fld = 1; u.wr = 1; u.last = 1;
      #1;
      expn = n + (inst.balign ? int'(skip) : 0);
      check(stall == (avail < expn), "FLD stall");
      check(wdata == topbits(inst.balign ? show_al : w, n), $sformatf("FLD %0d bits", n));
      check(wr_en == !stall, "FLD write");
      check(flush_en == (!stall && !inst.loop) && (!flush_en || flush_n == 6'(expn)), "FLD flush");

      // FLD, length from A (clamped to 32)
      a_len = $urandom_range(40);
      latch(0, 32'(a_len));
      avail = 64; show = w;
      inst.loop = 0; inst.imm = 0; inst.balign = 0;
      u = '0; u.fld = 1; u.fld_len_a = 1; u.wr = 1; u.last = 1;
      #1;
      expn = (a_len > 32) ? 32 : a_len;
      check(wdata == topbits(w, expn) && flush_en && flush_n == 6'(expn), "FLD data length");

      // VLD
      avail = 7'($urandom_range(10, 64));
      show = w;
      inst = '0; inst.op = OP_VLD; inst.tbl = 2;
      u = '0; u.vld = 1; u.wr = 1; u.last = 1;
      #1;
      if (avail < 16) check(stall && !wr_en && !flush_en, "VLD stall");
      else if (w[31:29] == 3'b000) check(vld_err && !wr_en && !flush_en, "VLD miss");
      else begin
        int l;
        l = w[31] ? 1 : (w[30] ? 2 : 3);
        check(!vld_err && wr_en && wdata == 32'(39 + l) && flush_en && flush_n == 6'(l), $sformatf("VLD hit %h: err%0d wr%0d %0d fl%0d %0d", w, vld_err, wr_en, wdata, flush_en, flush_n));
      end

      // BRP-style: A against immediates, one or two conditions
      va = ($urandom_range(3) == 0) ? 32'd5 : $urandom_range(10);
      vb = $urandom_range(10);
      v0 = $urandom_range(10); v1 = $urandom_range(10);
      r0 = rel_e'($urandom_range(5)); r1 = rel_e'($urandom_range(5));
      co = $urandom_range(1);
      inst = '0; inst.op = OP_BRP; inst.imm = 1; inst.two = 1;
      inst.rel0 = r0; inst.rel1 = r1; inst.val0 = v0; inst.val1 = v1; inst.comb_or = co;
      latch(0, va);
      u = '0; u.cmp_en = 1; u.cmp_idx = 0; u.lat_a = 1; rdata = vb;
      #1;
      c0 = relf(r0, va, v0);
      check(taken == c0, "condition 0");
      @(negedge clk);
      u = '0; u.cmp_en = 1; u.cmp_idx = 1; u.last = 1;
      #1;
      c1 = relf(r1, vb, v1);
      check(taken == (co ? (c0 | c1) : (c0 & c1)), "two conditions combined");

      // BRP data form: A against the word read this cycle
      latch(0, va);
      u = '0; u.cmp_en = 1; u.cmp_rdata = 1; u.last = 1; rdata = vb;
      #1;
      check(taken == relf(r0, va, vb), "compare with data word");

      // BRN: next bits, plain or byte aligned, immediate or data
      n = $urandom_range(1, 8);
      inst = '0; inst.op = OP_BRN; inst.nbits = 6'(n); inst.rel0 = r0;
      inst.balign = $urandom_range(1); inst.imm = $urandom_range(1);
      show = w; show_al = $urandom(); skip = 3'($urandom_range(7));
      avail = 7'($urandom_range(20));
      v0 = topbits(inst.balign ? show_al : show, n) ^ 32'($urandom_range(1));
      inst.val0 = v0; rdata = v0;
      u = '0; u.cmp_en = 1; u.cmp_show = 1; u.cmp_rdata = !inst.imm; u.last = 1;
      #1;
      check(stall == (avail < n + (inst.balign ? skip : 0)), "BRN stall");
      check(taken == relf(r0, topbits(inst.balign ? show_al : show, n), v0), "BRN compare");

      // CMP
      va = $urandom(); vb = $urandom();
      inst = '0; inst.op = OP_CMP; inst.alu = alu_e'($urandom_range(3));
      inst.imm = $urandom_range(1); inst.val0 = $urandom();
      latch(0, va);
      latch(1, vb);
      u = '0; u.alu = 1; u.wr = 1; u.last = 1;
      #1;
      begin
        bit [31:0] b, y;
        b = inst.imm ? inst.val0 : vb;
        case (inst.alu)
          ALU_ADD: y = va + b;
          ALU_SUB: y = va - b;
          ALU_SHL: y = va << b[4:0];
          default: y = va >> b[4:0];
        endcase
        check(wr_en && wdata == y, $sformatf("CMP %0d imm%0d a=%h b=%h got %h exp %h", inst.alu, inst.imm, va, b, wdata, y));
      end
      @(negedge clk);
      u = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
