// tb_workload_mix: throughput workload for the parsing processor at its
// default sizes.
//
// The program is a synthetic macroblock loop whose executed instruction
// mix follows the published profile of MPEG-4 parsing: about 34 % FLD,
// 11 % VLD, 22 % BRP, 28 % BRN, 3 % FNC and 0.8 % FOR.  An outer loop of
// 8 "rows" runs an inner loop of 4 "macroblocks"; each macroblock body
// executes 35 instructions (if/else pairs make the executed count fixed
// whatever the bitstream holds, and one function call of two
// instructions is part of it).  The body is run over random bitstreams,
// once with a gap-free input and once with an input word offered in only
// one cycle of twenty, slower than the program consumes bits.
//
// Checked: the decoded outputs, the final data memory and the exact cycle
// count against the reference interpreter; the executed mix against the
// profile (within 1 percentage point per instruction type); and the
// cycles per instruction with no input stalls, which must lie between the
// best and worst case that the per-instruction cycle counts (FLD 1/2,
// VLD 1, FOR 1, BRP 2/3, BRN 1/2, FNC 1) give for that mix.  The clock
// needed for a 38.4 Mbit/s stream with this program's bits per cycle is
// printed for information.
module tb_workload_mix;
  import parser_pkg::*;
  import parser_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              start;
  logic [8:0]        prog_len;
  logic              imem_we;
  logic [7:0]        imem_waddr;
  logic [INST_W-1:0] imem_wdata;
  logic              vlc_clear, vlc_we;
  logic [8:0]        vlc_waddr;
  vlc_entry_t        vlc_wentry;
  logic              dmem_we;
  logic [7:0]        dmem_addr;
  logic [31:0]       dmem_wdata, dmem_rdata;
  logic [31:0]       bs_data;
  logic              bs_valid, bs_ready;
  logic              out_valid;
  logic [7:0]        out_name;
  logic [31:0]       out_data;
  logic              busy, done, error, stall;
  logic [7:0]        pc;
  logic [3:0]        depth;

  mpeg4_parser dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  inst_t      prog [256];
  bit [31:0]  words [$];
  vlc_entry_t vlc [$];
  bit [31:0]  dinit [256];
  int         burst_pct;
  int         wi;

  always @(posedge clk) begin
    if (!rst_n) wi <= 0;
    else if (bs_valid && bs_ready) wi <= wi + 1;
  end
  always_comb bs_data = (wi < words.size()) ? words[wi] : 32'h0;
  always @(negedge clk) bs_valid <= ($urandom_range(99) >= burst_pct);

  int        out_idx, cyc, n_stall;
  int        exp_name [$];
  bit [31:0] exp_data [$];
  always @(posedge clk) begin
    if (rst_n && busy) begin
      cyc++;
      if (stall) n_stall++;
    end
    if (rst_n && out_valid) begin
      if (out_idx < exp_name.size())
        check(out_name == 8'(exp_name[out_idx]) && out_data == exp_data[out_idx],
              $sformatf("output %0d: got %0d=%h expected %0d=%h", out_idx,
                        out_name, out_data, exp_name[out_idx], exp_data[out_idx]));
      else
        check(0, "more outputs than expected");
      out_idx++;
    end
  end

  // VLC tables: table 0 is the unary code (symbol = leading zeros, up to
  // 16 bits), table 1 a seven-entry prefix code of 2 to 4 bits.
  function automatic vlc_entry_t ve(int tbl, int len, int code, int sym);
    vlc_entry_t e;
    e.tbl  = 4'(tbl);
    e.len  = 5'(len);
    e.code = 16'(code << (16 - len));
    e.sym  = 16'(sym);
    return e;
  endfunction

  task automatic build_vlc();
    vlc.delete();
    for (int k = 0; k < 16; k++) vlc.push_back(ve(0, (k < 15) ? k + 1 : 16, (k < 15) ? 1 : 0, k));
    vlc.push_back(ve(1, 2, 0, 0));
    vlc.push_back(ve(1, 2, 1, 1));
    vlc.push_back(ve(1, 3, 4, 2));
    vlc.push_back(ve(1, 3, 5, 3));
    vlc.push_back(ve(1, 3, 6, 4));
    vlc.push_back(ve(1, 4, 14, 5));
    vlc.push_back(ve(1, 4, 15, 6));
  endtask

  localparam int ROWS = 8, MBS = 4, FUNC_AT = 100;

  // Macroblock body: 38 instructions, 35 executed (11 FLD, 4 VLD, 8 BRP,
  // 9 BRN, 1 FNC, and the called FLD + BRN).
  int body_len;
  task automatic build_prog();
    inst_t b [$];
    foreach (prog[k]) prog[k] = '0;
    b.push_back(i_fld(1, 8));
    b.push_back(i_fld(2, 4));
    b.push_back(i_brn(0, 1, 1, 1, REL_EQ, 1));                 // if/else
    b.push_back(i_fld(3, 5));
    b.push_back(i_fld(3, 3));
    b.push_back(i_brp(0, 1, 1, 2, REL_GE, 8, 1, 0, 1, REL_NE, 0));
    b.push_back(i_vld(4, 0));
    b.push_back(i_vld(4, 1));
    b.push_back(i_brn(0, 0, 0, 4, REL_LT, 9));
    b.push_back(i_fld(5, 6));
    b.push_back(i_brp(0, 0, 0, 5, REL_EQ, 3));
    b.push_back(i_vld(6, 1));
    b.push_back(i_brn(0, 1, 1, 2, REL_NE, 0, 1, 1, REL_EQ, 3));
    b.push_back(i_fld(7, 2));
    b.push_back(i_fld(7, 4));
    b.push_back(i_brp(0, 0, 0, 6, REL_GT, 2));
    b.push_back(i_fnc(FUNC_AT, 2));
    b.push_back(i_brn(0, 0, 0, 3, REL_LE, 5));
    b.push_back(i_fld(8, 1));
    b.push_back(i_brp(0, 0, 0, 8, REL_EQ, 1, 1, 0, 7, REL_LT, 2));
    b.push_back(i_vld(9, 0));
    b.push_back(i_brn(0, 0, 0, 8, REL_GE, 128, 0, 0, REL_EQ, 0, 1));  // aligned
    b.push_back(i_fld_al(10, 8));
    b.push_back(i_brp(0, 1, 1, 9, REL_LT, 4));
    b.push_back(i_vld(11, 1));
    b.push_back(i_vld(11, 0));
    b.push_back(i_brn(0, 0, 0, 5, REL_GT, 11));
    b.push_back(i_fld(12, 3));
    b.push_back(i_brp(0, 0, 0, 12, REL_NE, 7));
    b.push_back(i_brn(0, 1, 1, 1, REL_EQ, 0));
    b.push_back(i_fld(13, 2));
    b.push_back(i_fld(13, 6));
    b.push_back(i_fld(14, 4));
    b.push_back(i_brp(0, 0, 0, 14, REL_EQ, 0, 1, 1, 13, REL_GE, 3));
    b.push_back(i_brn(0, 0, 0, 6, REL_LT, 40));
    b.push_back(i_fld(15, 7));
    b.push_back(i_brp(0, 0, 0, 15, REL_GE, 64));
    b.push_back(i_brn(0, 0, 0, 9, REL_EQ, 1));
    body_len = b.size();
    prog[0] = i_for(body_len + 1, ROWS);
    prog[1] = i_for(body_len, MBS);
    foreach (b[k]) prog[2 + k] = b[k];
    prog[FUNC_AT]     = i_fld(16, 4);
    prog[FUNC_AT + 1] = i_brn(0, 0, 0, 2, REL_EQ, 2);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    start = 1'b0; imem_we = 1'b0; vlc_clear = 1'b0; vlc_we = 1'b0; dmem_we = 1'b0;
    imem_waddr = '0; imem_wdata = '0; vlc_waddr = '0; vlc_wentry = '0;
    dmem_addr = '0; dmem_wdata = '0; prog_len = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic load_all();
    @(negedge clk);
    foreach (prog[k]) begin
      imem_we = 1'b1; imem_waddr = 8'(k); imem_wdata = prog[k];
      @(negedge clk);
    end
    imem_we = 1'b0;
    foreach (vlc[k]) begin
      vlc_we = 1'b1; vlc_waddr = 9'(k); vlc_wentry = vlc[k];
      @(negedge clk);
    end
    vlc_we = 1'b0;
    foreach (dinit[k]) begin
      dmem_we = 1'b1; dmem_addr = 8'(k); dmem_wdata = dinit[k];
      @(negedge clk);
    end
    dmem_we = 1'b0;
  endtask

  // Table 1 average share of each instruction type, in hundredths of a
  // percent, and the per-type cycle counts (best, worst).
  function automatic int profile(op_e op);
    case (op)
      OP_FLD: return 3431;
      OP_VLD: return 1084;
      OP_BRP: return 2248;
      OP_BRN: return 2830;
      OP_FNC: return 331;
      OP_FOR: return 77;
      default: return 0;
    endcase
  endfunction

  function automatic int cyc_best(op_e op);
    return (op == OP_BRP) ? 2 : 1;
  endfunction

  function automatic int cyc_worst(op_e op);
    case (op)
      OP_FLD, OP_BRN: return 2;
      OP_BRP: return 3;
      default: return 1;
    endcase
  endfunction

  task automatic run_case(string name);
    ref_model m = new();
    bit ok;
    int n_inst;
    real cpi, lo, hi, bits_per_cycle;
    foreach (prog[k]) m.prog[k] = prog[k];
    foreach (dinit[k]) m.data[k] = dinit[k];
    foreach (words[k]) m.words.push_back(words[k]);
    foreach (vlc[k]) m.vlc.push_back(vlc[k]);
    ok = m.exec_range(0, body_len + 2, 0);
    exp_name = m.wr_name;
    exp_data = m.wr_data;

    do_reset();
    load_all();
    out_idx = 0; cyc = 0; n_stall = 0;
    prog_len = 9'(body_len + 2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && !error) @(negedge clk);

    check(ok, {name, ": model ran"});
    check(done && !error, {name, ": done"});
    check(out_idx == exp_name.size(),
          $sformatf("%s: %0d outputs, expected %0d", name, out_idx, exp_name.size()));
    for (int k = 0; k < 32; k++) begin
      dmem_addr = 8'(k);
      #1 check(dmem_rdata == m.data[k],
               $sformatf("%s: data[%0d]=%h expected %h", name, k, dmem_rdata, m.data[k]));
    end
    check(cyc == m.cycles + n_stall,
          $sformatf("%s: %0d cycles, expected %0d + %0d stall", name, cyc, m.cycles, n_stall));

    // executed mix against the profile
    n_inst = 0;
    foreach (m.n_op[k]) n_inst += m.n_op[k];
    check(m.n_op[OP_CMP] == 0 && m.n_op[OP_ILL] == 0, {name, ": only profiled types"});
    lo = 0.0; hi = 0.0;
    for (int k = 0; k < 7; k++) begin
      op_e  op = op_e'(k);
      int   share = m.n_op[k] * 10000 / n_inst;
      if (op == OP_CMP) continue;
      check(share >= profile(op) - 100 && share <= profile(op) + 100,
            $sformatf("%s: %s share %0d.%02d%% against %0d.%02d%%", name, op.name(),
                      share / 100, share % 100, profile(op) / 100, profile(op) % 100));
      lo += real'(m.n_op[k] * cyc_best(op));
      hi += real'(m.n_op[k] * cyc_worst(op));
    end
    cpi = real'(cyc - n_stall) / real'(n_inst);
    check(real'(cyc - n_stall) >= lo && real'(cyc - n_stall) <= hi,
          $sformatf("%s: %0d busy cycles outside [%0.0f, %0.0f]", name, cyc - n_stall, lo, hi));
    bits_per_cycle = real'(m.bp) / real'(cyc);
    $display("%s: %0d instructions, %0d cycles (%0d stall), CPI %0.3f (bounds %0.3f..%0.3f), %0d bits, clock for 38.4 Mbit/s: %0.1f MHz",
             name, n_inst, cyc, n_stall, cpi, lo / n_inst, hi / n_inst, m.bp,
             38.4 / bits_per_cycle);
  endtask

  initial begin
    build_vlc();
    build_prog();
    for (int t = 0; t < 2; t++) begin
      foreach (dinit[k]) dinit[k] = $urandom();
      burst_pct = (t == 0) ? 0 : 95;
      words.delete();
      for (int k = 0; k < 256; k++) words.push_back($urandom());
      run_case((t == 0) ? "gap-free" : "bursty");
      if (t == 1) check(n_stall > 0, "bursty input stalls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
