// tb_mmu: test of the memory management unit.
//
// The host loads a small program and initial data words, starts it, and
// the testbench plays the decoder and functional unit: every instruction
// takes one cycle, reads the word named by name1 and writes name1's word
// plus the instruction address to name0.  Checks: the instruction at the
// program counter reaches the core, the AG sequences a counted loop, the
// output stream carries each write, host writes are ignored while running,
// imem writes are ignored while running, and at the end the data memory
// read through the host port holds the expected words.
module tb_mmu;
  import parser_pkg::*;
  import parser_tb_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, start;
  logic [8:0]        prog_len;
  logic              imem_we;
  logic [7:0]        imem_waddr;
  logic [INST_W-1:0] imem_wdata, iword;
  logic              dmem_we;
  logic [7:0]        dmem_addr;
  logic [31:0]       dmem_wdata, dmem_rdata;
  inst_t             inst;
  uop_t              u;
  logic              taken, stall, fu_err, wr_en;
  logic [31:0]       wdata, rdata;
  logic              run, done, error;
  logic [7:0]        pc;
  logic [3:0]        depth;
  logic              out_valid;
  logic [7:0]        out_name;
  logic [31:0]       out_data;

  always #5 clk = ~clk;

  mmu dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the core: one-cycle instructions data[name0] = data[name1] + pc
  assign inst   = inst_t'(iword);
  assign taken  = 1'b0;
  assign stall  = 1'b0;
  assign fu_err = 1'b0;
  always_comb begin
    u = '0;
    u.last   = 1'b1;
    u.rd_en  = 1'b1;
    u.rd_sel = RD_NAME1;
    u.wr     = (inst.op != OP_FOR);
  end
  assign wr_en = run && u.wr;
  assign wdata = rdata + 32'(pc);

  inst_t     prog [8];
  bit [31:0] model [256];
  int        exp_name [$];
  bit [31:0] exp_data [$];
  int        oi;

  always @(posedge clk) if (out_valid) begin
    check(oi < exp_name.size() && out_name == 8'(exp_name[oi]) && out_data == exp_data[oi],
          $sformatf("output %0d", oi));
    oi++;
  end

  function automatic inst_t mov(int dst, int src);
    inst_t i = i_fld(dst, 0);
    i.name1 = 8'(src);
    return i;
  endfunction

  initial begin
    rst_n = 0; start = 0; prog_len = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    dmem_we = 0; dmem_addr = 0; dmem_wdata = 0; oi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      // program: d1 = d0 + 0; FOR 3 x { d2 = d2 + 2; d3 = d1 + 3 }; d4 = d2 + 4
      prog[0] = mov(1, 0);
      prog[1] = i_for(2, 3);
      prog[2] = mov(2, 2);
      prog[3] = mov(3, 1);
      prog[4] = mov(4, 2);
      foreach (prog[k]) begin
        imem_we = 1; imem_waddr = 8'(k); imem_wdata = prog[k];
        @(negedge clk);
      end
      imem_we = 0;
      for (int k = 0; k < 8; k++) begin
        model[k] = $urandom();
        dmem_we = 1; dmem_addr = 8'(k); dmem_wdata = model[k];
        @(negedge clk);
      end
      dmem_we = 0;
      // expected writes
      exp_name.delete(); exp_data.delete(); oi = 0;
      model[1] = model[0];                     exp_name.push_back(1); exp_data.push_back(model[1]);
      repeat (3) begin
        model[2] = model[2] + 2;               exp_name.push_back(2); exp_data.push_back(model[2]);
        model[3] = model[1] + 3;               exp_name.push_back(3); exp_data.push_back(model[3]);
      end
      model[4] = model[2] + 4;                 exp_name.push_back(4); exp_data.push_back(model[4]);
      prog_len = 5;
      start = 1;
      @(negedge clk);
      start = 0;
      // host writes while running must be ignored
      dmem_we = 1; dmem_addr = 8'd7; dmem_wdata = ~model[7];
      imem_we = 1; imem_waddr = 8'd4; imem_wdata = '0;
      @(negedge clk);
      dmem_we = 0; imem_we = 0;
      while (!done && !error) @(negedge clk);
      check(done && !error, "done");
      check(oi == exp_name.size(), "output count");
      for (int k = 0; k < 8; k++) begin
        dmem_addr = 8'(k);
        #1 check(dmem_rdata == model[k], $sformatf("data[%0d]", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
