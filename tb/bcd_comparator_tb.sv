// bcd_comparator_tb -- checks the three-way BCD comparator on all pairs of
// three-digit BCD numbers built from 0..999 in steps (and every pair below
// 100), against the order of the underlying integers.
module bcd_comparator_tb;
  import bcd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] a, b;
  logic low, even, high;
  cmp_t cmp;
  bcd_comparator #(.W(12)) dut (.bin_bcd(a), .ref_bcd(b), .low, .even, .high, .cmp);

  function automatic logic [11:0] to_bcd(input int v);
    return {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  task automatic try_pair(input int x, input int y);
    a = to_bcd(x); b = to_bcd(y);
    #1;
    checks++;
    if (low != (x < y) || even != (x == y) || high != (x > y) ||
        cmp != ((x < y) ? CMP_LOW : (x == y) ? CMP_EVEN : CMP_HIGH)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d vs %0d: low=%b even=%b high=%b", x, y, low, even, high);
    end
  endtask

  initial begin
    for (int x = 0; x < 100; x++)
      for (int y = 0; y < 100; y++) try_pair(x, y);
    for (int x = 0; x < 1000; x += 7)
      for (int y = 0; y < 1000; y += 11) try_pair(x, y);
    for (int x = 0; x < 1000; x++) try_pair(x, x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
