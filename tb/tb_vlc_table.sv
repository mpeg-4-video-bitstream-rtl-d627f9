// tb_vlc_table: test of the VLC lookup table.
//
// Loads two tables (a 16-entry unary code and a 7-entry code with 2..4 bit
// words) at scattered entry positions, then looks up random 16-bit
// windows in both and compares hit, length and symbol with a software
// search.  Also checks that a table number with no entries misses, that
// the lowest-numbered of two overlapping entries wins, that an entry
// loaded with length 0 is dropped, and that clear_all empties the table.
module tb_vlc_table;
  import parser_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, clear_all, we;
  logic [8:0]  waddr;
  vlc_entry_t  wentry;
  logic [3:0]  tbl;
  logic [15:0] bits;
  logic        hit;
  logic [4:0]  len;
  logic [15:0] sym;

  always #5 clk = ~clk;

  vlc_table dut (.*);

  int checks = 0, failures = 0;
  vlc_entry_t ref_e [512];
  bit         ref_v [512];

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

  task automatic load(int a, int t, int l, int code, int s);
    vlc_entry_t e;
    e.tbl = 4'(t); e.len = 5'(l); e.code = 16'(code << (16 - l)); e.sym = 16'(s);
    @(negedge clk);
    we = 1; waddr = 9'(a); wentry = e;
    @(negedge clk);
    we = 0;
    ref_e[a] = e; ref_v[a] = (l != 0);
  endtask

  task automatic lookup_check(int t, bit [15:0] b);
    bit eh = 0; bit [4:0] el = 0; bit [15:0] es = 0;
    for (int k = 0; k < 512; k++) begin
      bit [15:0] m = ~(16'hFFFF >> ref_e[k].len);
      if (!eh && ref_v[k] && ref_e[k].tbl == 4'(t) && ((b ^ ref_e[k].code) & m) == 0) begin
        eh = 1; el = ref_e[k].len; es = ref_e[k].sym;
      end
    end
    tbl = 4'(t); bits = b;
    #1;
    check(hit == eh && (!eh || (len == el && sym == es)),
          $sformatf("tbl %0d bits %h: got %0d/%0d/%h expected %0d/%0d/%h", t, b, hit, len, sym, eh, el, es));
  endtask

  initial begin
    rst_n = 0; clear_all = 0; we = 0; waddr = 0; wentry = '0; tbl = 0; bits = 0;
    foreach (ref_v[k]) ref_v[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // table 3: unary code, entries 100..115
    for (int k = 0; k < 16; k++) load(100 + k, 3, (k < 15) ? k + 1 : 16, (k < 15) ? 1 : 0, 500 + k);
    // table 5: 00 01 100 101 110 1110 1111 at entries 7, 20, 33, ...
    load(7, 5, 2, 0, 10);  load(20, 5, 2, 1, 11); load(33, 5, 3, 4, 12);
    load(46, 5, 3, 5, 13); load(59, 5, 3, 6, 14); load(72, 5, 4, 14, 15);
    load(85, 5, 4, 15, 16);
    for (int n = 0; n < 2000; n++) begin
      lookup_check(3, 16'($urandom()) >> $urandom_range(15));
      lookup_check(5, 16'($urandom()));
    end
    lookup_check(6, 16'h1234);                    // empty table: miss
    check(!hit, "empty table misses");
    // overlapping entry at a lower index wins
    load(2, 5, 1, 1, 77);
    lookup_check(5, 16'hC000);
    check(hit && sym == 77 && len == 1, "lowest index wins");
    // length 0 drops the entry again
    load(2, 5, 0, 0, 0);
    lookup_check(5, 16'hC000);
    check(sym == 14, "dropped entry");
    // clear everything
    @(negedge clk) clear_all = 1;
    @(negedge clk) clear_all = 0;
    foreach (ref_v[k]) ref_v[k] = 0;
    lookup_check(3, 16'h8000);
    check(!hit, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
