// hybrid_conv_tb -- self-checking test of the single-E6 hybrid converter.
//
// Default size (12 bits): every input 0..4095 is converted and compared with
// a BCD value formed here by division by ten; each conversion must take
// exactly 30 clocks (6 decode steps, 12 left and 12 right shifts, counted here
// from the decoder's operation). The worked example 2967 is also checked after
// its first decode-and-load (register 001000110010111). A 24-bit instance
// runs random numbers; its clock count is compared with the schedule formula
// evaluated independently here.
// E9 variant (DEC = 9): every 12-bit input, each in 26 clocks (2 full and
// 2 low decodes, 11 left and 11 right shifts); a 30-bit instance runs random
// numbers and must take the same number of clocks for every input.
// E13 variant (DEC = 13): every 12-bit input, each in 19 clocks (1 full and
// 2 low decodes, 8 left and 8 right shifts); a 30-bit instance runs random
// numbers in 175 clocks each (the schedule worked out by hand from the
// diagonal order of the E13 lattice).
// Double and triple E6 forms (NDEC = 2, 3) at 12 bits: every input, in 16
// and 10 clocks (6 decodes plus 10 and 4 shifts), and every E6 must be used.
// E4 form (DEC = 4) at 12 bits: every input in 54 clocks (18 decodes, 36
// shifts).
// A 24-bit double form with its window above the first (OFF2 = -6) runs
// random numbers in 148 clocks (28 decodes, 120 shifts).
module hybrid_conv_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [11:0] bin;
  logic [15:0] bcd;
  hybrid_conv dut (.clk, .rst_n, .start, .bin, .busy, .done, .bcd);

  logic        start24, busy24, done24;
  logic [23:0] bin24;
  logic [31:0] bcd24;
  hybrid_conv #(.N(24)) dut24 (.clk, .rst_n, .start(start24), .bin(bin24),
                               .busy(busy24), .done(done24), .bcd(bcd24));

  logic        start9, busy9, done9;
  logic [11:0] bin9;
  logic [15:0] bcd9;
  hybrid_conv #(.DEC(9)) dut9 (.clk, .rst_n, .start(start9), .bin(bin9),
                               .busy(busy9), .done(done9), .bcd(bcd9));

  logic        start30, busy30, done30;
  logic [29:0] bin30;
  logic [39:0] bcd30;
  hybrid_conv #(.N(30), .DEC(9)) dut30 (.clk, .rst_n, .start(start30), .bin(bin30),
                                        .busy(busy30), .done(done30), .bcd(bcd30));

  logic        start13, busy13, done13;
  logic [11:0] bin13;
  logic [15:0] bcd13;
  hybrid_conv #(.DEC(13)) dut13 (.clk, .rst_n, .start(start13), .bin(bin13),
                                 .busy(busy13), .done(done13), .bcd(bcd13));

  logic        start1330, busy1330, done1330;
  logic [29:0] bin1330;
  logic [39:0] bcd1330;
  hybrid_conv #(.N(30), .DEC(13)) dut1330 (.clk, .rst_n, .start(start1330),
                                           .bin(bin1330), .busy(busy1330),
                                           .done(done1330), .bcd(bcd1330));

  logic        start2, busy2, done2, start3, busy3, done3;
  logic [11:0] bin2, bin3;
  logic [15:0] bcd2, bcd3;
  hybrid_conv #(.NDEC(2)) dut2 (.clk, .rst_n, .start(start2), .bin(bin2),
                                .busy(busy2), .done(done2), .bcd(bcd2));
  hybrid_conv #(.NDEC(3)) dut3 (.clk, .rst_n, .start(start3), .bin(bin3),
                                .busy(busy3), .done(done3), .bcd(bcd3));
  logic        start2b, busy2b, done2b;
  logic [23:0] bin2b;
  logic [31:0] bcd2b;
  hybrid_conv #(.N(24), .NDEC(2), .OFF2(-6)) dut2b (.clk, .rst_n, .start(start2b),
                                                   .bin(bin2b), .busy(busy2b),
                                                   .done(done2b), .bcd(bcd2b));
  logic        start4, busy4, done4;
  logic [11:0] bin4;
  logic [15:0] bcd4;
  hybrid_conv #(.DEC(4)) dut4 (.clk, .rst_n, .start(start4), .bin(bin4),
                               .busy(busy4), .done(done4), .bcd(bcd4));
  int n4_dec;
  always @(posedge clk) if (dut4.busy && dut4.ins.op == dut4.OP_DECODE) n4_dec++;

  int n2_sel [3], n3_sel [3], n2_dec, n3_dec;
  always @(posedge clk) begin
    if (dut2.busy && dut2.ins.op == dut2.OP_DECODE) begin n2_sel[dut2.ins.sel]++; n2_dec++; end
    if (dut3.busy && dut3.ins.op == dut3.OP_DECODE) begin n3_sel[dut3.ins.sel]++; n3_dec++; end
  end

  int n13_shl, n13_shr, n13_dec, n13_low;
  always @(posedge clk) if (dut13.busy) begin
    if (dut13.ins.op == dut13.OP_SHL)    n13_shl++;
    if (dut13.ins.op == dut13.OP_SHR)    n13_shr++;
    if (dut13.ins.op == dut13.OP_DECODE) n13_dec++;
    if (dut13.ins.op == dut13.OP_LOW)    n13_low++;
  end

  int n9_shl, n9_shr, n9_dec, n9_low;
  always @(posedge clk) if (dut9.busy) begin
    if (dut9.ins.op == dut9.OP_SHL)    n9_shl++;
    if (dut9.ins.op == dut9.OP_SHR)    n9_shr++;
    if (dut9.ins.op == dut9.OP_DECODE) n9_dec++;
    if (dut9.ins.op == dut9.OP_LOW)    n9_low++;
  end

  int n_shl, n_shr, n_dec;
  always @(posedge clk) if (dut.busy) begin
    if (dut.ins.op == dut.OP_SHL)    n_shl++;
    if (dut.ins.op == dut.OP_SHR)    n_shr++;
    if (dut.ins.op == dut.OP_DECODE) n_dec++;
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

  // Clock count of the 24-bit schedule: units plus the rotation distances.
  function automatic int cycles_for(input int n);
    int k = n / 3 - 1, prev = 0, tot = 0, rot;
    for (int d = 0; d < k; d++)
      for (int j = 0; j <= d; j++) begin
        rot = 3 * (d - j) - j;
        tot += ((rot > prev) ? rot - prev : prev - rot) + 1;
        prev = rot;
      end
    return tot + ((prev > 0) ? prev : -prev);
  endfunction

  task automatic run12(input logic [11:0] v, output int cyc);
    @(negedge clk);
    bin = v; start = 1;
    n_shl = 0; n_shr = 0; n_dec = 0;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    int cyc30;
    start = 0; start24 = 0; bin = '0; bin24 = '0;
    start9 = 0; start30 = 0; bin9 = '0; bin30 = '0;
    start13 = 0; start1330 = 0; bin13 = '0; bin1330 = '0;
    start2 = 0; start3 = 0; bin2 = '0; bin3 = '0; start2b = 0; bin2b = '0;
    start4 = 0; bin4 = '0;
    n2_sel = '{0, 0, 0}; n3_sel = '{0, 0, 0}; n2_dec = 0; n3_dec = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Worked example: 2967.
    @(negedge clk);
    bin = 12'd2967; start = 1;
    @(negedge clk); start = 0;
    @(negedge clk);
    expect_eq("2967 after first decode", longint'(dut.sr), longint'(15'b001000110010111));
    while (!done) @(negedge clk);
    expect_eq("2967 result", longint'(bcd), longint'(16'h2967));

    for (int v = 0; v < 4096; v++) begin
      run12(12'(v), cyc);
      expect_eq("bcd", longint'(bcd), longint'(to_bcd(longint'(v))));
      expect_eq("clocks", cyc, 30);
      if (v % 512 == 0) begin
        expect_eq("left shifts", n_shl, 12);
        expect_eq("right shifts", n_shr, 12);
        expect_eq("decodes", n_dec, 6);
      end
    end

    for (int t = 0; t < 300; t++) begin
      automatic logic [23:0] v = (t == 0) ? '1 : 24'($urandom);
      @(negedge clk);
      bin24 = v; start24 = 1;
      @(negedge clk); start24 = 0;
      cyc = 0;
      while (!done24) begin @(negedge clk); cyc++; end
      expect_eq("bcd24", longint'(bcd24), longint'(to_bcd(longint'(v))));
      expect_eq("clocks24", cyc, cycles_for(24));
    end

    for (int v = 0; v < 4096; v++) begin
      @(negedge clk);
      bin9 = 12'(v); start9 = 1;
      n9_shl = 0; n9_shr = 0; n9_dec = 0; n9_low = 0;
      @(negedge clk); start9 = 0;
      cyc = 0;
      while (!done9) begin @(negedge clk); cyc++; end
      expect_eq("E9 bcd", longint'(bcd9), longint'(to_bcd(longint'(v))));
      expect_eq("E9 clocks", cyc, 26);
      if (v % 512 == 0) begin
        expect_eq("E9 left shifts", n9_shl, 11);
        expect_eq("E9 right shifts", n9_shr, 11);
        expect_eq("E9 full decodes", n9_dec, 2);
        expect_eq("E9 low decodes", n9_low, 2);
      end
    end

    for (int t = 0; t < 300; t++) begin
      automatic logic [29:0] v = (t == 0) ? '1 : 30'($urandom);
      @(negedge clk);
      bin30 = v; start30 = 1;
      @(negedge clk); start30 = 0;
      cyc = 0;
      while (!done30) begin @(negedge clk); cyc++; end
      if (t == 0) begin
        cyc30 = cyc;
        $display("E9 hybrid, 30 bits: %0d clocks", cyc);
      end
      expect_eq("E9 bcd30", longint'(bcd30), longint'(to_bcd(longint'(v))));
      expect_eq("E9 clocks30", cyc, cyc30);
    end

    for (int v = 0; v < 4096; v++) begin
      @(negedge clk);
      bin13 = 12'(v); start13 = 1;
      n13_shl = 0; n13_shr = 0; n13_dec = 0; n13_low = 0;
      @(negedge clk); start13 = 0;
      cyc = 0;
      while (!done13) begin @(negedge clk); cyc++; end
      expect_eq("E13 bcd", longint'(bcd13), longint'(to_bcd(longint'(v))));
      expect_eq("E13 clocks", cyc, 19);
      if (v % 512 == 0) begin
        expect_eq("E13 left shifts", n13_shl, 8);
        expect_eq("E13 right shifts", n13_shr, 8);
        expect_eq("E13 full decodes", n13_dec, 1);
        expect_eq("E13 low decodes", n13_low, 2);
      end
    end

    for (int t = 0; t < 300; t++) begin
      automatic logic [29:0] v = (t == 0) ? '1 : 30'($urandom);
      @(negedge clk);
      bin1330 = v; start1330 = 1;
      @(negedge clk); start1330 = 0;
      cyc = 0;
      while (!done1330) begin @(negedge clk); cyc++; end
      expect_eq("E13 bcd30", longint'(bcd1330), longint'(to_bcd(longint'(v))));
      expect_eq("E13 clocks30", cyc, 175);
    end

    // Double and triple E6 forms, side by side.
    for (int v = 0; v < 4096; v++) begin
      int c2, c3;
      bit seen3;
      @(negedge clk);
      bin2 = 12'(v); bin3 = 12'(v); start2 = 1; start3 = 1;
      @(negedge clk); start2 = 0; start3 = 0;
      c2 = 0; c3 = 0; seen3 = 0;
      while (!done2 || !seen3) begin
        if (done3 && !seen3) begin c3 = c2; seen3 = 1; end
        if (!done2) begin @(negedge clk); c2++; end
      end
      expect_eq("double bcd", longint'(bcd2), longint'(to_bcd(longint'(v))));
      expect_eq("triple bcd", longint'(bcd3), longint'(to_bcd(longint'(v))));
      expect_eq("double clocks", c2, 16);
      expect_eq("triple clocks", c3, 10);
    end
    expect_eq("double decodes", n2_dec, 6 * 4096);
    expect_eq("triple decodes", n3_dec, 6 * 4096);
    for (int u = 0; u < 3; u++) begin
      checks++;
      if ((u < 2 && n2_sel[u] == 0) || n3_sel[u] == 0) begin
        failures++;
        $display("FAIL E6 number %0d never used", u);
      end
    end

    for (int v = 0; v < 4096; v++) begin
      @(negedge clk);
      bin4 = 12'(v); start4 = 1; n4_dec = 0;
      @(negedge clk); start4 = 0;
      cyc = 0;
      while (!done4) begin @(negedge clk); cyc++; end
      expect_eq("E4 bcd", longint'(bcd4), longint'(to_bcd(longint'(v))));
      expect_eq("E4 clocks", cyc, 54);
      if (v % 512 == 0) expect_eq("E4 decodes", n4_dec, 18);
    end

    for (int t = 0; t < 300; t++) begin
      automatic logic [23:0] v = (t == 0) ? '1 : 24'($urandom);
      @(negedge clk);
      bin2b = v; start2b = 1;
      @(negedge clk); start2b = 0;
      cyc = 0;
      while (!done2b) begin @(negedge clk); cyc++; end
      expect_eq("double bcd24", longint'(bcd2b), longint'(to_bcd(longint'(v))));
      expect_eq("double clocks24", cyc, 148);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
