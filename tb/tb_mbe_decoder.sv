// tb_mbe_decoder -- exhaustive check of one decoder bit.  For every Booth
// triplet and every (y[j], y[j-1]) the testbench forms the select signals and
// the XNORed multiplicand bits itself and expects y[j]^Neg for a digit of
// magnitude 1, y[j-1]^Neg for magnitude 2 and 0 for a zero digit.
module tb_mbe_decoder;
  logic xn_j, xn_jm1, x1_b, x2_b, z, ppt;
  logic [2:0] t;
  logic yj, yjm1, neg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  mbe_decoder dut (.xn_j(xn_j), .xn_jm1(xn_jm1), .x1_b(x1_b), .x2_b(x2_b), .z(z), .ppt(ppt));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    int d;
    for (int v = 0; v < 32; v++) begin
      {t, yj, yjm1} = 5'(v);
      neg    = t[2];
      x1_b   = ~(t[0] ^ t[1]);
      x2_b   = t[0] ^ t[1];
      z      = ~(t[2] ^ t[1]);
      xn_j   = ~(yj ^ neg);
      xn_jm1 = ~(yjm1 ^ neg);
      @(posedge clk);
      d = DIGIT[t];
      if (d == 1 || d == -1)      exp = yj ^ neg;
      else if (d == 2 || d == -2) exp = yjm1 ^ neg;
      else                        exp = 1'b0;
      checks++;
      if (ppt !== exp) begin
        failures++;
        $display("FAIL t=%b yj=%b yjm1=%b ppt=%b exp=%b", t, yj, yjm1, ppt, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
