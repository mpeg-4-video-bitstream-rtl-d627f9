// tb_inst_dec: test of the instruction decoder's cycle sequencing.
//
// For every instruction form the decoder is run until it signals the last
// cycle, and the number of cycles is checked against the intended counts
// (FLD 1/2, VLD 1, FOR 1, FNC 1, BRP 2/3 with immediates and 2/4 with data
// words, BRN 1/2, CMP 2/3).  The per-cycle controls that matter (which
// field addresses the data memory, which register latches, which condition
// is compared, extraction, lookup, arithmetic, write) are checked cycle by
// cycle, a stalled cycle must be repeated, and the step counter must
// restart after the last cycle and when run drops.  The undefined opcode
// must be flagged.
module tb_inst_dec;
  import parser_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, run, stall;
  logic [INST_W-1:0] iword;
  inst_t             inst;
  uop_t              u;

  always #5 clk = ~clk;

  inst_dec dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected control of cycle `s` as a compact string
  function automatic string sig(uop_t x);
    string r = "";
    if (x.rd_en)     r = {r, "R", 8'("0") + 8'(x.rd_sel)};
    if (x.lat_a)     r = {r, "A"};
    if (x.lat_b)     r = {r, "B"};
    if (x.cmp_en)    r = {r, "C", 8'("0") + 8'(x.cmp_idx)};
    if (x.cmp_show)  r = {r, "S"};
    if (x.cmp_rdata) r = {r, "D"};
    if (x.fld)       r = {r, x.fld_len_a ? "Fa" : "F"};
    if (x.vld)       r = {r, "V"};
    if (x.alu)       r = {r, "U"};
    if (x.wr)        r = {r, "W"};
    if (x.last)      r = {r, "L"};
    return r;
  endfunction

  // run one instruction; exp lists the expected control per cycle
  task automatic run_inst(inst_t i, string exp [$], string name);
    int n = 0;
    bit stalled = 0;
    bit lst;
    iword = i;
    run = 1;
    forever begin
      stall = 0;
      if (!stalled && n == 0 && $urandom_range(1)) stall = 1;
      #1;
      lst = u.last;
      if (n < exp.size()) check(sig(u) == exp[n], $sformatf("%s cycle %0d: %s expected %s", name, n, sig(u), exp[n]));
      @(negedge clk);
      if (stall) begin stalled = 1; continue; end     // same cycle again
      n++;
      if (lst || n > 8) break;
    end
    check(n == exp.size(), $sformatf("%s: %0d cycles, expected %0d", name, n, exp.size()));
    #1 check(sig(u) == exp[0], $sformatf("%s: restarts at step 0", name));
  endtask

  initial begin
    inst_t i;
    rst_n = 0; run = 0; stall = 0; iword = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int rep = 0; rep < 20; rep++) begin
      i = '0; i.op = OP_FLD; i.imm = 1;              run_inst(i, '{"FWL"}, "FLD imm");
      i.imm = 0;                                     run_inst(i, '{"R1A", "FaWL"}, "FLD data");
      i = '0; i.op = OP_VLD;                         run_inst(i, '{"VWL"}, "VLD");
      i = '0; i.op = OP_FOR; i.imm = 1;              run_inst(i, '{"L"}, "FOR imm");
      i.imm = 0;                                     run_inst(i, '{"R0L"}, "FOR data");
      i = '0; i.op = OP_FNC; i.imm = 1;              run_inst(i, '{"L"}, "FNC");
      i = '0; i.op = OP_BRP; i.imm = 1;              run_inst(i, '{"R0A", "C0L"}, "BRP 1 imm");
      i.two = 1;                                     run_inst(i, '{"R0A", "R1AC0", "C1L"}, "BRP 2 imm");
      i.imm = 0; i.two = 0;                          run_inst(i, '{"R0A", "R2C0DL"}, "BRP 1 data");
      i.two = 1;                                     run_inst(i, '{"R0A", "R2C0D", "R1A", "R3C1DL"}, "BRP 2 data");
      i = '0; i.op = OP_BRN; i.imm = 1;              run_inst(i, '{"C0SL"}, "BRN 1");
      i.two = 1;                                     run_inst(i, '{"C0S", "C1SL"}, "BRN 2");
      i.imm = 0;                                     run_inst(i, '{"R2C0SD", "R3C1SDL"}, "BRN 2 data");
      i = '0; i.op = OP_CMP; i.imm = 1;              run_inst(i, '{"R0A", "UWL"}, "CMP imm");
      i.imm = 0;                                     run_inst(i, '{"R0A", "R1B", "UWL"}, "CMP data");
    end
    // undefined opcode
    i = '0; i.op = OP_ILL; iword = i; #1;
    check(u.illegal && u.last, "undefined opcode flagged");
    // run low resets the step
    i = '0; i.op = OP_CMP; i.imm = 0; iword = i; run = 1; stall = 0;
    @(negedge clk);
    run = 0;
    @(negedge clk);
    run = 1; #1;
    check(sig(u) == "R0A", "run low restarts the instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
