// e6_decoder_tb -- checks all 40 lines of the E6 unit against three
// bit-serial add-3 steps computed here, plus the printed example (line 19:
// input 010 011 -> output 011 100) and rows of the printed table.
module e6_decoder_tb;
  logic [5:0] i, o;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  e6_decoder dut (.i(i), .o(o));

  // Three decade steps: value 2r+b, carry when >= 5, keep value mod 5.
  function automatic logic [5:0] model(input int r, input logic [2:0] b);
    logic [2:0] q = '0;
    for (int t = 2; t >= 0; t--) begin
      int d = 2 * r + int'(b[t]);
      q[t] = (d >= 5);
      r = d % 5;
    end
    return {q, 3'(r)};
  endfunction

  task automatic check(input logic [5:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL i=%o o=%o expected %o", i, o, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 5; r++)
      for (int b = 0; b < 8; b++) begin
        i = {3'(r), 3'(b)};
        #1 check(model(r, 3'(b)));
      end
    i = 6'o23; #1 check(6'o34);   // line 19
    i = 6'o05; #1 check(6'o10);   // line 5
    i = 6'o47; #1 check(6'o74);   // line 39
    i = 6'o10; #1 check(6'o13);   // line 8
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
