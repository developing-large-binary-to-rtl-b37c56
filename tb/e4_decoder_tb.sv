// e4_decoder_tb -- checks the E4 unit against the add-3 rule worked out here
// (y = x for x < 5, x + 3 for x >= 5) and against the printed rows of the
// unit's table (5 -> 1000, 9 -> 1100). Codes 10..15 must read 0.
module e4_decoder_tb;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  e4_decoder dut (.x(x), .y(y));

  task automatic check(input logic [3:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL x=%0d y=%b expected %b", x, y, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      if (v < 5)       check(4'(v));
      else if (v < 10) check(4'(v + 3));
      else             check(4'd0);
    end
    x = 4'd5; #1; check(4'b1000);
    x = 4'd9; #1; check(4'b1100);
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
