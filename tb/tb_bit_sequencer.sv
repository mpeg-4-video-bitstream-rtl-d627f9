// tb_bit_sequencer: random test of the bitstream buffer.
//
// Random words are offered with random gaps and random flushes (never more
// than the buffer holds) are applied.  A bit queue models the stream: every
// cycle the show window, the byte-aligned window, the bits to the next
// byte boundary and the fill count are compared with it.  Also checks
// that a gap-free input keeps at least 32 bits available after the first
// fill.
module tb_bit_sequencer;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] in_data;
  logic        in_valid, in_ready;
  logic [31:0] show, show_al;
  logic [2:0]  skip;
  logic [6:0]  avail;
  logic        flush_en;
  logic [5:0]  flush_n;

  always #5 clk = ~clk;

  bit_sequencer dut (.*);

  int checks = 0, failures = 0;
  bit q [$];          // bits buffered in the model
  longint consumed;
  int low_after_fill;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [31:0] window(int off);
    bit [31:0] w = 0;
    for (int k = 0; k < 32; k++) w = {w[30:0], (off + k < q.size()) ? q[off + k] : 1'b0};
    return w;
  endfunction

  initial begin
    int sk;
    bit rdy;
    rst_n = 0; in_valid = 0; in_data = 0; flush_en = 0; flush_n = 0;
    consumed = 0; low_after_fill = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit gapfree = (cyc >= 10000);
      in_valid = gapfree ? 1'b1 : ($urandom_range(3) != 0);
      in_data  = $urandom();
      flush_en = $urandom_range(1);
      flush_n  = 6'($urandom_range((avail > 32) ? 32 : avail));
      #1;
      // compare before the edge
      sk = int'((8 - (consumed % 8)) % 8);
      rdy = in_ready;
      check(rdy == (q.size() - (flush_en ? flush_n : 0) <= 32), "in_ready");
      check(avail == 7'(q.size()), $sformatf("avail %0d vs %0d", avail, q.size()));
      check(show == window(0), "show");
      check(skip == 3'(sk), "skip");
      check(show_al == window(sk), "show_al");
      if (gapfree && cyc > 10002 && avail < 32) low_after_fill++;
      @(posedge clk);
      // model update with the values sampled at the edge
      if (flush_en) begin
        for (int k = 0; k < flush_n; k++) void'(q.pop_front());
        consumed += flush_n;
      end
      if (in_valid && rdy) for (int k = 31; k >= 0; k--) q.push_back(in_data[k]);
      @(negedge clk);
    end
    check(low_after_fill == 0, "gap-free input keeps 32 bits available");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
