// tb_mpeg4_parser: end-to-end test of the parsing processor at its default
// sizes.
//
// A header-and-macroblock style parsing program that uses every
// instruction form (fixed-length fields with immediate and data lengths,
// look-ahead, VLC decode from two tables, counted loops with immediate and
// data counts, if/else, while on decoded data and on the next bits, byte-
// aligned look-ahead and byte-aligned fields, two-condition branches, nested function calls with
// immediate and data addresses, all four CMP operations) is run over
// random bitstreams, with the input word stream both gap-free and bursty.
// Every decoded word on the output stream, the final data memory (its
// last word is a look-ahead, so it also pins the final bit position) and the cycle count (the instruction cycle counts
// plus the stall cycles) are checked against a reference interpreter.
// Three further programs must stop with an error: unbounded recursion
// (control-stack overflow), an undefined opcode and a VLC miss.  Each
// mechanism is counted and must have occurred at least once.
module tb_mpeg4_parser;
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
  int n_stall = 0, n_multi_close = 0, n_overflow = 0, n_illegal = 0, n_vlcmiss = 0;
  int tot_op [8];
  int tot_fld_data = 0, tot_look = 0, tot_two = 0, tot_while = 0, tot_else = 0,
      tot_if = 0, tot_balign = 0, tot_for_data = 0, tot_fnc_data = 0,
      tot_brp_data = 0, tot_brn_data = 0, tot_stall = 0, tot_fld_align = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus state ----------------
  inst_t      prog [256];
  bit [31:0]  words [$];
  vlc_entry_t vlc [$];
  bit [31:0]  dinit [256];
  int         burst_pct;
  int         wi;

  // bitstream feeder
  always @(posedge clk) begin
    if (!rst_n) begin
      wi <= 0;
    end else if (bs_valid && bs_ready) begin
      wi <= wi + 1;
    end
  end
  always_comb begin
    bs_data = (wi < words.size()) ? words[wi] : 32'h0;
  end
  always @(negedge clk) bs_valid <= ($urandom_range(99) >= burst_pct);

  // monitors
  int           out_idx;
  int           exp_name [$];
  bit [31:0]    exp_data [$];
  int           cyc;
  logic [3:0]   depth_prev;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      cyc++;
      if (stall) n_stall++;
      if (depth + 4'd1 < depth_prev) n_multi_close++;
    end
    depth_prev <= depth;
    if (rst_n && out_valid) begin
      if (out_idx < exp_name.size()) begin
        check(out_name == 8'(exp_name[out_idx]) && out_data == exp_data[out_idx],
              $sformatf("output %0d: got %0d=%h expected %0d=%h", out_idx,
                        out_name, out_data, exp_name[out_idx], exp_data[out_idx]));
      end else begin
        check(0, "more outputs than expected");
      end
      out_idx++;
    end
  end

  // VLC tables.  Table 0: the complete unary code 1, 01, ..., 0..01 (15
  // bits), 0..0 (16 bits) -> symbol = number of leading zeros.  Table 1:
  // 00, 01, 100, 101, 110, 1110, 1111 -> symbols 0..6.
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

  // The main parsing program (top level 0..30, functions at 40 and 44).
  task automatic build_main();
    foreach (prog[k]) prog[k] = '0;
    prog[0]  = i_fld(1, 8);
    prog[1]  = i_fld(2, 4, 1);                       // look-ahead
    prog[2]  = i_fld(3, 3);
    prog[3]  = i_cmp(3, ALU_ADD, 2);
    prog[4]  = i_fld_d(4, 3);                        // length from data 3
    prog[5]  = i_cmp(10, ALU_SUB, 10, 1);            // d10 = 0
    prog[6]  = i_for(5, 3);                          // 3 x [7..11]
    prog[7]  = i_vld(5, 0);
    prog[8]  = i_vld(6, 1);
    prog[9]  = i_brp(0, 1, 1, 5, REL_LT, 3, 1, 0, 6, REL_NE, 2);
    prog[10] = i_cmp(11, ALU_ADD, 5, 1);             // then
    prog[11] = i_cmp(12, ALU_ADD, 1);                // else
    prog[12] = i_cmp(10, ALU_ADD, 1);
    prog[13] = i_brp(1, 4, 0, 10, REL_LT, 6);        // while d10 < 6: [14..17]
    prog[14] = i_fnc(40, 3);
    prog[15] = i_cmp(10, ALU_ADD, 1);
    prog[16] = i_brn(0, 1, 0, 2, REL_EQ, 25, 0, 0, REL_EQ, 0, 0, 1);  // == data 25
    prog[17] = i_fld(13, 2);
    prog[18] = i_for(1, 3, 1);                       // d3 x [19]
    prog[19] = i_fld(14, 1);
    prog[20] = i_brn(1, 1, 0, 3, REL_GE, 6, 1, 1, REL_EQ, 0);
    prog[21] = i_fld(15, 3);
    prog[22] = i_brn(0, 1, 1, 8, REL_GE, 128, 0, 0, REL_EQ, 0, 1, 0);  // aligned byte >= 128
    prog[23] = i_fld(16, 5);
    prog[24] = i_fld_al(16, 7);                      // byte-aligned field
    prog[25] = i_brp(0, 2, 0, 4, REL_GE, 3, 1, 1, 1, REL_NE, 2, 1);
    prog[26] = i_cmp(17, ALU_SHL, 1);
    prog[27] = i_cmp(17, ALU_SHR, 18, 1);
    prog[28] = i_fnc(19, 2, 1);                      // address from data 19
    prog[29] = i_fld_al(20, 32);
    prog[30] = i_fld(21, 16, 1);
    prog[40] = i_vld(22, 0);
    prog[41] = i_for(1, 2);
    prog[42] = i_fld(23, 5);
    prog[44] = i_cmp(24, ALU_SUB, 3);
    prog[45] = i_fnc(40, 3);
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

  // Run `prog` for `len` instructions over `words`; compare with the model.
  task automatic run_case(int len, bit expect_err, string name);
    ref_model m = new();
    bit ok;
    foreach (prog[k]) m.prog[k] = prog[k];
    foreach (dinit[k]) m.data[k] = dinit[k];
    foreach (words[k]) m.words.push_back(words[k]);
    foreach (vlc[k]) m.vlc.push_back(vlc[k]);
    ok = m.exec_range(0, len, 0);
    exp_name = m.wr_name;
    exp_data = m.wr_data;

    do_reset();
    load_all();
    out_idx = 0;
    cyc = 0;
    n_stall = 0;
    prog_len = 9'(len);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && !error) @(negedge clk);

    check(ok == !expect_err, {name, ": model outcome"});
    check(error == expect_err && done == !expect_err, {name, ": done/error"});
    if (!expect_err) begin
      check(out_idx == exp_name.size(),
            $sformatf("%s: %0d outputs, expected %0d", name, out_idx, exp_name.size()));
      for (int k = 0; k < 32; k++) begin
        dmem_addr = 8'(k);
        #1 check(dmem_rdata == m.data[k],
                 $sformatf("%s: data[%0d]=%h expected %h", name, k, dmem_rdata, m.data[k]));
      end
      check(cyc == m.cycles + n_stall,
            $sformatf("%s: %0d cycles, expected %0d + %0d stall", name, cyc, m.cycles, n_stall));
      foreach (m.n_op[k]) tot_op[k] += m.n_op[k];
      tot_fld_data += m.n_fld_data; tot_look += m.n_look; tot_two += m.n_two;
      tot_while += m.n_while_iter; tot_else += m.n_else; tot_if += m.n_if_taken;
      tot_balign += m.n_balign; tot_for_data += m.n_for_data;
      tot_fnc_data += m.n_fnc_data; tot_brp_data += m.n_brp_data;
      tot_brn_data += m.n_brn_data;
      tot_stall += n_stall;
      tot_fld_align += m.n_fld_align;
    end
  endtask

  task automatic random_stream(int n);
    words.delete();
    for (int k = 0; k < n; k++) words.push_back($urandom());
  endtask

  initial begin
    foreach (tot_op[k]) tot_op[k] = 0;
    build_vlc();

    // main program over random streams
    for (int t = 0; t < 12; t++) begin
      build_main();
      foreach (dinit[k]) dinit[k] = $urandom();
      dinit[11] = 0; dinit[12] = 0;
      dinit[18] = $urandom_range(3);
      dinit[19] = 44;
      dinit[25] = 3;
      dinit[2]  = $urandom_range(255);
      burst_pct = (t % 3 == 0) ? 0 : 60;
      random_stream(256);
      run_case(31, 0, $sformatf("main%0d", t));
    end

    // control-stack overflow: unbounded recursion
    foreach (prog[k]) prog[k] = '0;
    prog[0] = i_fnc(0, 1);
    random_stream(8);
    run_case(1, 1, "overflow");
    if (error) n_overflow++;

    // undefined opcode
    foreach (prog[k]) prog[k] = '0;
    prog[0] = i_fld(1, 4);
    prog[1] = base(OP_ILL);
    run_case(2, 1, "illegal");
    if (error) n_illegal++;

    // VLC miss: table 2 has no entries
    foreach (prog[k]) prog[k] = '0;
    prog[0] = i_vld(1, 2);
    run_case(1, 1, "vlc miss");
    if (error) n_vlcmiss++;

    // every mechanism must have happened
    check(tot_op[OP_FLD] > 0, "FLD ran");
    check(tot_op[OP_VLD] > 0, "VLD ran");
    check(tot_op[OP_FOR] > 0, "FOR ran");
    check(tot_op[OP_BRP] > 0, "BRP ran");
    check(tot_op[OP_BRN] > 0, "BRN ran");
    check(tot_op[OP_FNC] > 0, "FNC ran");
    check(tot_op[OP_CMP] > 0, "CMP ran");
    check(tot_fld_data > 0, "FLD with data length");
    check(tot_look > 0, "FLD look-ahead");
    check(tot_two > 0, "two-condition branch");
    check(tot_while > 0, "while iteration");
    check(tot_if > 0, "if taken");
    check(tot_else > 0, "else part");
    check(tot_balign > 0, "byte-aligned look-ahead");
    check(tot_for_data > 0, "FOR with data count");
    check(tot_fnc_data > 0, "FNC with data address");
    check(tot_brp_data > 0, "BRP with data operands");
    check(tot_brn_data > 0, "BRN with data operands");
    check(tot_fld_align > 0, "byte-aligned FLD");
    check(tot_stall > 0, "stall on an empty sequencer");
    check(n_multi_close > 0, "several regions closed in one cycle");
    check(n_overflow > 0, "stack overflow");
    check(n_illegal > 0, "undefined opcode");
    check(n_vlcmiss > 0, "VLC miss");
    $display("mechanisms: FLD=%0d VLD=%0d FOR=%0d BRP=%0d BRN=%0d FNC=%0d CMP=%0d",
             tot_op[0], tot_op[1], tot_op[2], tot_op[3], tot_op[4], tot_op[5], tot_op[6]);
    $display("  fld_data=%0d look=%0d two=%0d while=%0d if=%0d else=%0d balign=%0d for_data=%0d fnc_data=%0d brp_data=%0d",
             tot_fld_data, tot_look, tot_two, tot_while, tot_if, tot_else, tot_balign,
             tot_for_data, tot_fnc_data, tot_brp_data);
    $display("  stalls=%0d multi_close=%0d overflow=%0d illegal=%0d vlcmiss=%0d",
             tot_stall, n_multi_close, n_overflow, n_illegal, n_vlcmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
