// tb_inst_mem: random write/read test of the instruction memory.
//
// Writes random 128-bit words to random addresses and checks that the
// combinational read port returns the last word written to each address,
// in the same cycle the address is presented; a write is visible from the
// next cycle.
module tb_inst_mem;
  logic         clk = 1'b0;
  logic         we;
  logic [7:0]   waddr, raddr;
  logic [127:0] wdata, rdata;

  always #5 clk = ~clk;

  inst_mem dut (.*);

  int checks = 0, failures = 0;
  bit [127:0] model [256];
  bit         known [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    foreach (known[k]) known[k] = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we    = $urandom_range(1);
      waddr = 8'($urandom());
      wdata = {$urandom(), $urandom(), $urandom(), $urandom()};
      raddr = (t % 2) ? waddr : 8'($urandom());
      #1;
      if (known[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %0d", raddr);
        end
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
