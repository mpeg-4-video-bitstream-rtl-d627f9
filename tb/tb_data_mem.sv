// tb_data_mem: random write/read test of the data memory.
//
// Writes random 32-bit words to random addresses and checks that the
// combinational read port returns the last word written to each address,
// in the same cycle the address is presented; a write is visible from the
// next cycle.  The host read port is checked the same way.
module tb_data_mem;
  logic         clk = 1'b0;
  logic         we;
  logic [7:0]   waddr, raddr;
  logic [31:0]  wdata, rdata, host_rdata;
  logic [7:0]   host_raddr;

  always #5 clk = ~clk;

  data_mem dut (.*);

  int checks = 0, failures = 0;
  bit [31:0]  model [256];
  bit         known [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; host_raddr = 0;
    foreach (known[k]) known[k] = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we    = $urandom_range(1);
      waddr = 8'($urandom());
      wdata = $urandom();
      host_raddr = 8'($urandom());
      raddr = (t % 2) ? waddr : 8'($urandom());
      #1;
      if (known[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %0d", raddr);
        end
      end
      if (known[host_raddr]) begin
        checks++;
        if (host_rdata !== model[host_raddr]) begin
          failures++;
          if (failures < 10) $display("FAIL: host addr %0d", host_raddr);
        end
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
