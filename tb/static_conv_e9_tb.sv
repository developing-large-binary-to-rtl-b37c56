// static_conv_e9_tb -- self-checking test of static_conv_e9.
//
// The reference BCD value is formed here by repeated division by ten. The
// default-size converter (24 bits) gets corner values (0, all ones, powers
// of two and their neighbours) and 20000 random numbers; a second, 12-bit
// instance is checked exhaustively.
// The other pairing (GROUPING = 0, "1/2, 3/5, 4/7") is checked on the same
// default-size numbers, and a 30-bit instance (the size of the larger map)
// on random numbers.
module static_conv_e9_tb;
  localparam int unsigned NB  = 24;
  localparam int unsigned ND  = 8;
  localparam int unsigned NS  = 12;
  localparam int unsigned NSD = 4;

  logic [NB-1:0]   bin;
  logic [4*ND-1:0] bcd;
  logic [NS-1:0]   bin_s;
  logic [4*NSD-1:0] bcd_s;
  logic [4*ND-1:0] bcd_g0;
  logic [29:0] bin30;
  logic [39:0] bcd30;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  static_conv_e9 dut (.bin(bin), .bcd(bcd));
  static_conv_e9 #(.N(NS)) dut_s (.bin(bin_s), .bcd(bcd_s));
  static_conv_e9 #(.GROUPING(1'b0)) dut_g0 (.bin(bin), .bcd(bcd_g0));
  static_conv_e9 #(.N(30)) dut_30 (.bin(bin30), .bcd(bcd30));

  function automatic logic [4*ND-1:0] to_bcd(input longint unsigned v);
    logic [4*ND-1:0] r = '0;
    for (int d = 0; d < int'(ND); d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [39:0] to_bcd10(input longint unsigned v);
    logic [39:0] r = '0;
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [55:0] to_bcd14(input longint unsigned v);
    logic [55:0] r = '0;
    for (int d = 0; d < 14; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(input logic [4*ND-1:0] got, input logic [4*ND-1:0] exp, input longint unsigned v);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL bin=%0d bcd=%h expected %h", v, got, exp);
    end
  endtask

  task automatic try_big(input logic [NB-1:0] v);
    bin = v;
    #1 check(bcd, to_bcd(longint'(v)), longint'(v));
    check(bcd_g0, to_bcd(longint'(v)), longint'(v));
  endtask

  initial begin
    try_big('0);
    try_big('1);
    for (int b = 0; b < int'(NB); b++) begin
      try_big(NB'(1) << b);
      try_big((NB'(1) << b) - 1'b1);
      try_big((NB'(1) << b) + 1'b1);
    end
    for (int n = 0; n < 5000; n++) begin
      bin30 = (n == 0) ? '1 : 30'($urandom);
      #1;
      checks++;
      if (bcd30 !== to_bcd10(longint'(bin30))) begin
        failures++;
        if (failures < 10) $display("FAIL 30-bit bin=%0d bcd=%h", bin30, bcd30);
      end
    end
    for (int n = 0; n < 20000; n++) try_big(NB'({$urandom, $urandom}));
    bin = '0;
    for (int unsigned v = 0; v < (1 << NS); v++) begin
      bin_s = NS'(v);
      #1;
      checks++;
      if (bcd_s !== to_bcd(longint'(v))[4*NSD-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL small bin=%0d bcd=%h", v, bcd_s);
      end
    end
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
