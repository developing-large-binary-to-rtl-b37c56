// e13_decoder_tb -- checks all 3200 lines of the E13 unit against a
// bit-serial model of two decades computed here: six add-3 steps of the lower
// decade, whose carries drive six steps of the upper decade. Also checks the
// printed example (line 3150: 1001 100 001 110 -> 111 111 0000 000) and that
// codes outside the table read 0.
module e13_decoder_tb;
  logic [12:0] i, o;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  e13_decoder dut (.i(i), .o(o));

  function automatic logic [12:0] model(input int d, input int r, input logic [5:0] b);
    logic [5:0] c, q;
    for (int t = 5; t >= 0; t--) begin
      int v = 2 * r + int'(b[t]);
      c[t] = (v >= 5);
      r = v % 5;
    end
    for (int t = 5; t >= 0; t--) begin
      q[t] = (d >= 5);
      d = 2 * (d % 5) + int'(c[t]);
    end
    return {q, 4'(d), 3'(r)};
  endfunction

  task automatic check(input logic [12:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL i=%b o=%b expected %b", i, o, exp);
    end
  endtask

  initial begin
    for (int d = 0; d < 10; d++)
      for (int r = 0; r < 5; r++)
        for (int b = 0; b < 64; b++) begin
          i = {4'(d), 3'(r), 6'(b)};
          #1 check(model(d, r, 6'(b)));
        end
    i = 13'b1001_100_001_110; #1 check(13'b111_111_0000_000);   // line 3150
    i = {4'd10, 9'd0};        #1 check('0);
    i = {4'd3, 3'd5, 6'd0};   #1 check('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
