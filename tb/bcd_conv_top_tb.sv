// bcd_conv_top_tb -- end-to-end test of the converter family at its default
// sizes (no parameter overrides).
//
// Random numbers go through the four static converters (15, 24, 24 and 30
// bits) and are compared with a BCD value formed here by division by ten.
// Each hybrid converter is compared with the static lattice it executes:
// 12-bit numbers through the E6 one (30 clocks each) and the double E6 one
// (16 clocks), 24-bit numbers through
// the E9 one (118 clocks) and 30-bit numbers through the E13 one (175
// clocks). The BCD output of the E6 lattice for 8-bit numbers is fed to the
// feed-back converter, which must return the original number in at most 9
// clocks (round trip); numbers above 255 must raise ovf. The worked examples
// 180, 22365, 2967 and 75 are included.
// Every mechanism is counted and must occur at least once: hybrid left
// shift, right shift and decode-load; double form decodes on each E6; E9 and E13 hybrid full and low decode;
// feed-back HIGH step, LOW restore, early end on EVEN, run to the last ring
// stage, overflow.
module bcd_conv_top_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [14:0] s4_bin;  logic [19:0] s4_bcd;
  logic [23:0] s6_bin;  logic [31:0] s6_bcd;
  logic [23:0] s9_bin;  logic [31:0] s9_bcd;
  logic [29:0] s13_bin; logic [39:0] s13_bcd;
  logic hy_start, hy_busy, hy_done;
  logic [11:0] hy_bin;  logic [15:0] hy_bcd;
  logic h9_start, h9_busy, h9_done;
  logic [23:0] h9_bin;  logic [31:0] h9_bcd;
  logic hd_start, hd_busy, hd_done;
  logic [11:0] hd_bin;  logic [15:0] hd_bcd;
  logic h13_start, h13_busy, h13_done;
  logic [29:0] h13_bin;  logic [39:0] h13_bcd;
  logic fb_start, fb_busy, fb_done, fb_ovf;
  logic [11:0] fb_bcd;  logic [7:0] fb_bin;

  bcd_conv_top dut (.*);

  // Mechanism counters.
  int n9_full, n9_low, n13_full, n13_low, nd_first, nd_second;
  int n_shl, n_shr, n_dec, n_high, n_low, n_even_end, n_full_end, n_ovf;
  always @(posedge clk) begin
    if (dut.u_hy.busy) begin
      if (dut.u_hy.ins.op == dut.u_hy.OP_SHL)    n_shl++;
      if (dut.u_hy.ins.op == dut.u_hy.OP_SHR)    n_shr++;
      if (dut.u_hy.ins.op == dut.u_hy.OP_DECODE) n_dec++;
    end
    if (dut.u_hd.busy && dut.u_hd.ins.op == dut.u_hd.OP_DECODE) begin
      if (dut.u_hd.ins.sel == 2'd0) nd_first++;
      if (dut.u_hd.ins.sel == 2'd1) nd_second++;
    end
    if (dut.u_h9.busy) begin
      if (dut.u_h9.ins.op == dut.u_h9.OP_DECODE) n9_full++;
      if (dut.u_h9.ins.op == dut.u_h9.OP_LOW)    n9_low++;
    end
    if (dut.u_h13.busy) begin
      if (dut.u_h13.ins.op == dut.u_h13.OP_DECODE) n13_full++;
      if (dut.u_h13.ins.op == dut.u_h13.OP_LOW)    n13_low++;
    end
    if (dut.u_fb.busy) begin
      if (dut.u_fb.high && !dut.u_fb.ring[0]) n_high++;
      if (dut.u_fb.low  && !dut.u_fb.ring[0]) n_low++;
      if (dut.u_fb.even && !dut.u_fb.ring[dut.u_fb.K]) n_even_end++;
      if (dut.u_fb.ring[dut.u_fb.K]) n_full_end++;
      if (dut.u_fb.ring[0] && dut.u_fb.low) n_ovf++;
    end
  end

  function automatic logic [39:0] to_bcd(input longint unsigned v);
    logic [39:0] r = '0;
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("mechanism %-26s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int cyc;
    hy_start = 0; fb_start = 0; hy_bin = '0; fb_bcd = '0;
    h9_start = 0; h9_bin = '0; h13_start = 0; h13_bin = '0;
    hd_start = 0; hd_bin = '0;
    s4_bin = '0; s6_bin = '0; s9_bin = '0; s13_bin = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Static converters.
    for (int t = 0; t < 5000; t++) begin
      automatic longint unsigned v = {$urandom, $urandom};
      if (t == 0) v = '1;
      s4_bin = 15'(v); s6_bin = 24'(v); s9_bin = 24'(v >> 3); s13_bin = 30'(v >> 7);
      #1;
      expect_eq("E4 tree",   longint'(s4_bcd),  longint'(to_bcd(longint'(s4_bin))));
      expect_eq("E6 lattice", longint'(s6_bcd),  longint'(to_bcd(longint'(s6_bin))));
      expect_eq("E9 lattice", longint'(s9_bcd),  longint'(to_bcd(longint'(s9_bin))));
      expect_eq("E13 lattice", longint'(s13_bcd), longint'(to_bcd(longint'(s13_bin))));
    end

    // Worked examples: 180 (eight bits, every static lattice) and 22365
    // (fifteen bits, E4 tree).
    s4_bin = 15'd180; s6_bin = 24'd180; s9_bin = 24'd180; s13_bin = 30'd180;
    #1;
    expect_eq("180 E4",  longint'(s4_bcd),  longint'(20'h00180));
    expect_eq("180 E6",  longint'(s6_bcd),  longint'(32'h180));
    expect_eq("180 E9",  longint'(s9_bcd),  longint'(32'h180));
    expect_eq("180 E13", longint'(s13_bcd), longint'(40'h180));
    s4_bin = 15'd22365;
    #1 expect_eq("22365 E4", longint'(s4_bcd), longint'(20'h22365));

    // Hybrid converter against the static E6 lattice.
    for (int t = 0; t < 400; t++) begin
      automatic logic [11:0] v = (t == 0) ? 12'd2967 : 12'($urandom);
      @(negedge clk);
      hy_bin = v; hy_start = 1; s6_bin = 24'(v);
      @(negedge clk); hy_start = 0;
      cyc = 0;
      while (!hy_done) begin @(negedge clk); cyc++; end
      expect_eq("hybrid vs static", longint'(hy_bcd), longint'(s6_bcd[15:0]));
      expect_eq("hybrid clocks", cyc, 30);
    end

    // Double E6 hybrid converter against the static E6 lattice.
    for (int t = 0; t < 400; t++) begin
      automatic logic [11:0] v = (t == 0) ? 12'd2967 : 12'($urandom);
      @(negedge clk);
      hd_bin = v; hd_start = 1; s6_bin = 24'(v);
      @(negedge clk); hd_start = 0;
      cyc = 0;
      while (!hd_done) begin @(negedge clk); cyc++; end
      expect_eq("double vs static", longint'(hd_bcd), longint'(s6_bcd[15:0]));
      expect_eq("double clocks", cyc, 16);
    end

    // E9 hybrid converter against the static E9 lattice.
    for (int t = 0; t < 100; t++) begin
      automatic logic [23:0] v = (t == 0) ? '1 : 24'($urandom);
      @(negedge clk);
      h9_bin = v; h9_start = 1; s9_bin = v;
      @(negedge clk); h9_start = 0;
      cyc = 0;
      while (!h9_done) begin @(negedge clk); cyc++; end
      expect_eq("E9 hybrid vs static", longint'(h9_bcd), longint'(s9_bcd));
      expect_eq("E9 hybrid clocks", cyc, 118);
    end

    // E13 hybrid converter against the static E13 lattice.
    for (int t = 0; t < 100; t++) begin
      automatic logic [29:0] v = (t == 0) ? '1 : 30'($urandom);
      @(negedge clk);
      h13_bin = v; h13_start = 1; s13_bin = v;
      @(negedge clk); h13_start = 0;
      cyc = 0;
      while (!h13_done) begin @(negedge clk); cyc++; end
      expect_eq("E13 hybrid vs static", longint'(h13_bcd), longint'(s13_bcd));
      expect_eq("E13 hybrid clocks", cyc, 175);
    end

    // Round trip: binary -> BCD (E6 lattice) -> binary (feed-back converter).
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      s6_bin = 24'(v);
      #1 fb_bcd = s6_bcd[11:0]; fb_start = 1;
      @(negedge clk); fb_start = 0;
      cyc = 0;
      while (!fb_done) begin @(negedge clk); cyc++; end
      expect_eq("round trip", fb_bin, v);
      expect_eq("no overflow", fb_ovf, 0);
      checks++;
      if (cyc > 9) begin failures++; $display("FAIL feed-back clocks %0d", cyc); end
    end
    // Worked example: 75 converts in 7 clocks.
    @(negedge clk);
    fb_bcd = 12'h075; fb_start = 1;
    @(negedge clk); fb_start = 0;
    cyc = 0;
    while (!fb_done) begin @(negedge clk); cyc++; end
    expect_eq("75 result", fb_bin, 75);
    expect_eq("75 clocks", cyc, 7);

    for (int v = 256; v < 1000; v += 101) begin
      @(negedge clk);
      fb_bcd = to_bcd(longint'(v))[11:0]; fb_start = 1;
      @(negedge clk); fb_start = 0;
      while (!fb_done) @(negedge clk);
      expect_eq("overflow flag", fb_ovf, 1);
    end

    require("hybrid shift left",       n_shl);
    require("hybrid shift right",      n_shr);
    require("hybrid decode-load",      n_dec);
    require("double, first E6 decode", nd_first);
    require("double, second E6 decode", nd_second);
    require("E9 hybrid full decode",   n9_full);
    require("E9 hybrid low decode",    n9_low);
    require("E13 hybrid full decode",  n13_full);
    require("E13 hybrid low decode",   n13_low);
    require("feed-back HIGH step",     n_high);
    require("feed-back LOW restore",   n_low);
    require("feed-back end on EVEN",   n_even_end);
    require("feed-back last stage",    n_full_end);
    require("feed-back overflow",      n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
