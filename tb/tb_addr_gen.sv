// tb_addr_gen: test of the address generator's control flow.
//
// A program of nested counted loops (immediate and data counts, an empty
// loop), if/else, a while loop, and nested function calls whose regions end
// together is executed with every instruction taking one cycle, random
// stall cycles and random branch outcomes.  The sequence of instruction
// addresses is compared with a trace produced by a recursive walk of the
// same program.  Also checks the data-memory addresses, done at the end of
// the program, and that unbounded recursion (control-stack overflow), an
// undefined instruction and a call beyond the instruction memory stop
// with error.
module tb_addr_gen;
  import parser_pkg::*;
  import parser_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, start, taken, stall, fu_err;
  logic [8:0]  prog_len;
  inst_t       inst;
  uop_t        u;
  logic [31:0] rdata;
  logic [7:0]  pc, dm_raddr, dm_waddr;
  logic        run, done, error;
  logic [3:0]  depth;

  always #5 clk = ~clk;

  addr_gen dut (.*);

  int checks = 0, failures = 0;
  inst_t prog [256];
  bit    outcome [$];
  int    trace [$];
  int    oi;      // branch outcomes used by the hardware
  int    mi;      // ... by the recursive walk

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit next_outcome();
    bit o = (mi < outcome.size()) ? outcome[mi] : 1'b0;
    mi++;
    return o;
  endfunction

  function automatic void walk(int s, int e);
    int pc = s;
    while (pc < e) begin
      inst_t i = prog[pc];
      int be = pc + 1 + i.len;
      trace.push_back(pc);
      case (i.op)
        OP_FOR: begin
          int t = i.imm ? int'(i.val0) : 2;
          if (i.len != 0) repeat (t) walk(pc + 1, be);
          pc = be;
        end
        OP_FNC: begin
          if (i.len != 0) walk(int'(i.val0), int'(i.val0) + i.len);
          pc++;
        end
        OP_BRP, OP_BRN: begin
          bit o = next_outcome();
          if (i.loop) begin
            while (o) begin
              walk(pc + 1, be);
              trace.push_back(pc);
              o = next_outcome();
            end
            pc = be;
          end else if (o) begin
            walk(pc + 1, be);
            pc = be + i.nxt;
          end else pc = be;
        end
        default: pc++;
      endcase
    end
  endfunction

  // drive the instruction at pc; the data form of FOR reads 2
  assign inst  = prog[pc];
  assign rdata = 32'd2;
  always_comb begin
    u = '0;
    u.last    = 1'b1;
    u.illegal = (inst.op == OP_ILL);
    u.rd_sel  = rdsel_e'(pc[1:0]);
  end
  assign taken  = (oi < outcome.size()) ? outcome[oi] : 1'b0;
  assign fu_err = 1'b0;

  int got [$];
  always @(posedge clk) begin
    if (!rst_n) oi <= 0;
    else if (run && !stall) begin
      got.push_back(int'(pc));
      if (inst.op == OP_BRP || inst.op == OP_BRN) oi <= oi + 1;
    end
  end
  always @(negedge clk) stall <= ($urandom_range(3) == 0);

  task automatic start_run(int len);
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; got.delete();
    prog_len = 9'(len);
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    rst_n = 0; start = 0; prog_len = 0;
    foreach (prog[k]) prog[k] = i_fld(k, 1);
    prog[0]  = i_for(4, 3);
    prog[1]  = i_brp(0, 1, 1, 0, REL_EQ, 0);
    prog[4]  = i_fnc(20, 2);
    prog[5]  = i_brn(1, 2, 0, 1, REL_EQ, 0);
    prog[6]  = i_for(1, 5, 1);
    prog[8]  = i_fnc(30, 1);
    prog[21] = i_for(0, 2);
    prog[30] = i_fnc(20, 2);

    for (int t = 0; t < 40; t++) begin
      outcome.delete();
      for (int k = 0; k < 60; k++) outcome.push_back($urandom_range(1));
      mi = 0; trace.delete();
      walk(0, 10);
      start_run(10);
      while (!done && !error) begin
        // data addresses follow the selected field
        check(dm_waddr == inst.name0, "write address");
        case (u.rd_sel)
          RD_NAME0: check(dm_raddr == inst.name0, "read name0");
          RD_NAME1: check(dm_raddr == inst.name1, "read name1");
          RD_VAL0:  check(dm_raddr == inst.val0[7:0], "read val0");
          default:  check(dm_raddr == inst.val1[7:0], "read val1");
        endcase
        @(negedge clk);
      end
      check(done && !error, "program completes");
      check(got == trace, $sformatf("trace %0d: %0d addresses, expected %0d", t, got.size(), trace.size()));
      check(depth == 0, "all regions closed");
    end

    // unbounded recursion overflows the control stack
    prog[0] = i_fnc(0, 1);
    start_run(1);
    while (!done && !error) @(negedge clk);
    check(error, "stack overflow stops with error");
    // undefined instruction
    prog[0] = base(OP_ILL);
    start_run(1);
    while (!done && !error) @(negedge clk);
    check(error, "undefined instruction stops with error");
    // call running past the end of the instruction memory
    prog[0] = i_fnc(250, 10);
    start_run(1);
    while (!done && !error) @(negedge clk);
    check(error, "jump beyond the memory stops with error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
