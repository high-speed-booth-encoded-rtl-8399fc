// tb_full_adder -- exhaustive check of the one-bit 3:2 counter: for all eight
// input combinations {co, s} must equal the integer sum a + b + c.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (int'({co, s}) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> co=%b s=%b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
