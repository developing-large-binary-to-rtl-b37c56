// e9_decoder_tb -- checks all 320 lines of the E9 unit against six bit-serial
// add-3 steps of one decade computed here, and the printed example
// (line 177: input 010 110 001 -> output 100 011 010).
module e9_decoder_tb;
  logic [8:0] i, o;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  e9_decoder dut (.i(i), .o(o));

  function automatic logic [8:0] model(input int r, input logic [5:0] b);
    logic [5:0] q = '0;
    for (int t = 5; t >= 0; t--) begin
      int d = 2 * r + int'(b[t]);
      q[t] = (d >= 5);
      r = d % 5;
    end
    return {q, 3'(r)};
  endfunction

  task automatic check(input logic [8:0] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL i=%o o=%o expected %o", i, o, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 5; r++)
      for (int b = 0; b < 64; b++) begin
        i = {3'(r), 6'(b)};
        #1 check(model(r, 6'(b)));
      end
    i = 9'b010_110_001; #1 check(9'b100_011_010);   // line 177
    // A unit with its three top inputs grounded acts as an E6.
    i = {3'b000, 6'o23}; #1 check({3'b000, 6'o34});
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
