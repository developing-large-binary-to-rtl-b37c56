// static_conv_e4_tb -- self-checking test of static_conv_e4.
//
// The reference BCD value is formed here by repeated division by ten. The
// default-size converter (15 bits) gets corner values (0, all ones, powers
// of two and their neighbours) and 20000 random numbers; a second, 10-bit
// instance is checked exhaustively.
module static_conv_e4_tb;
  localparam int unsigned NB  = 15;
  localparam int unsigned ND  = 5;
  localparam int unsigned NS  = 10;
  localparam int unsigned NSD = 4;

  logic [NB-1:0]   bin;
  logic [4*ND-1:0] bcd;
  logic [NS-1:0]   bin_s;
  logic [4*NSD-1:0] bcd_s;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  static_conv_e4 dut (.bin(bin), .bcd(bcd));
  static_conv_e4 #(.N(NS)) dut_s (.bin(bin_s), .bcd(bcd_s));

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
  endtask

  initial begin
    try_big('0);
    try_big('1);
    for (int b = 0; b < int'(NB); b++) begin
      try_big(NB'(1) << b);
      try_big((NB'(1) << b) - 1'b1);
      try_big((NB'(1) << b) + 1'b1);
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
