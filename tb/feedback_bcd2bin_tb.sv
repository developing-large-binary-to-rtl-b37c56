// feedback_bcd2bin_tb -- self-checking test of the successive-approximation
// BCD-to-binary converter.
//
// Default size (8 bits): every BCD number 0..255 must convert to its binary
// value within K+1 = 9 clocks; 255 ends on the first compare (1 clock); the
// worked example 75 must end after 7 clocks with R1 going through 01111111,
// 00111111, 01011111, 01001111, 01000111, 01001011. Numbers 256..999 must set
// ovf. A 12-bit instance converts random numbers 0..4095.
module feedback_bcd2bin_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done, ovf;
  logic [11:0] bcd_in;
  logic [7:0]  bin;
  feedback_bcd2bin dut (.clk, .rst_n, .start, .bcd_in, .busy, .done, .ovf, .bin);

  logic        start12, busy12, done12, ovf12;
  logic [15:0] bcd12;
  logic [11:0] bin12;
  feedback_bcd2bin #(.K(12)) dut12 (.clk, .rst_n, .start(start12), .bcd_in(bcd12),
                                    .busy(busy12), .done(done12), .ovf(ovf12), .bin(bin12));

  function automatic logic [15:0] to_bcd(input int v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [7:0] trace [8];
  int         ntrace;

  task automatic run8(input int v, output int cyc);
    @(negedge clk);
    bcd_in = to_bcd(v)[11:0]; start = 1;
    @(negedge clk); start = 0;
    cyc = 0; ntrace = 0;
    while (!done) begin
      if (ntrace < 8) begin trace[ntrace] = bin; ntrace++; end
      @(negedge clk); cyc++;
    end
  endtask

  initial begin
    int cyc;
    start = 0; start12 = 0; bcd_in = '0; bcd12 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run8(75, cyc);
    expect_eq("75 result", bin, 75);
    expect_eq("75 clocks", cyc, 7);
    expect_eq("75 step 2", trace[1], 8'b01111111);
    expect_eq("75 step 3", trace[2], 8'b00111111);
    expect_eq("75 step 4", trace[3], 8'b01011111);
    expect_eq("75 step 5", trace[4], 8'b01001111);
    expect_eq("75 step 6", trace[5], 8'b01000111);
    expect_eq("75 step 7", trace[6], 8'b01001011);

    for (int v = 0; v < 256; v++) begin
      run8(v, cyc);
      expect_eq("bin", bin, v);
      expect_eq("ovf", ovf, 0);
      checks++;
      if (cyc > 9 || cyc < 1) begin failures++; $display("FAIL clocks %0d for %0d", cyc, v); end
      if (v == 255) expect_eq("255 clocks", cyc, 1);
    end
    for (int v = 256; v < 1000; v += 37) begin
      run8(v, cyc);
      expect_eq("ovf", ovf, 1);
    end

    for (int t = 0; t < 500; t++) begin
      automatic int v = (t == 0) ? 4095 : int'($urandom % 4096);
      @(negedge clk);
      bcd12 = to_bcd(v); start12 = 1;
      @(negedge clk); start12 = 0;
      cyc = 0;
      while (!done12) begin @(negedge clk); cyc++; end
      expect_eq("bin12", bin12, v);
      checks++;
      if (cyc > 13) begin failures++; $display("FAIL clocks12 %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
