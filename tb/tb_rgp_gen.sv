// tb_rgp_gen -- bitwise check of the r/g/p generator: for each random operand
// pair and each bit, r must be 1 when at least one operand bit is 1, g when
// both are, and p when exactly one is.
module tb_rgp_gen;
  logic [63:0] a, b, r, g, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rgp_gen dut (.a(a), .b(b), .r(r), .g(g), .p(p));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int v = 0; v < 500; v++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      @(posedge clk);
      for (int k = 0; k < 64; k++) begin
        n = int'(a[k]) + int'(b[k]);
        checks++;
        if (r[k] != (n >= 1) || g[k] != (n == 2) || p[k] != (n == 1)) begin
          failures++;
          $display("FAIL bit %0d a=%b b=%b r=%b g=%b p=%b", k, a[k], b[k], r[k], g[k], p[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
