// tb_mbe_encoder -- exhaustive check of the Booth recoder over the eight
// triplets and the four values of (y_lsb, y_msb).  X1_b, X2_b, Neg and Z are
// compared with the recoding truth table typed in below; Row_LSB, Neg_cin and
// the row sign are compared with values derived from the digit's arithmetic:
// row_lsb + 2*neg_cin must equal bit 0 of the ones'-complement row plus the
// +1 of the negation, and se the sign of digit*y for a non-zero digit.
module tb_mbe_encoder;
  logic [2:0] x;
  logic y_lsb, y_msb;
  logic x1_b, x2_b, z, neg, row_lsb, neg_cin, se;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Truth table rows, indexed by {x[2i+1], x[2i], x[2i-1]}: {X1_b, X2_b, Neg, Z}
  localparam logic [3:0] TT [8] = '{4'b1001, 4'b0101, 4'b0100, 4'b1000,
                                    4'b1010, 4'b0110, 4'b0111, 4'b1011};
  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  mbe_encoder dut (.x(x), .y_lsb(y_lsb), .y_msb(y_msb), .x1_b(x1_b), .x2_b(x2_b),
                   .z(z), .neg(neg), .row_lsb(row_lsb), .neg_cin(neg_cin), .se(se));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%b y_lsb=%b y_msb=%b", what, x, y_lsb, y_msb);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, b0, low, exp_se;
    for (int v = 0; v < 32; v++) begin
      {x, y_lsb, y_msb} = 5'(v);
      @(posedge clk);
      d = DIGIT[x];
      check({x1_b, x2_b, neg, z} == TT[x], "truth table");
      if (d == 0) low = 0;
      else begin
        b0  = ((d == 1 || d == -1) ? int'(y_lsb) : 0) ^ int'(x[2]);
        low = b0 + int'(x[2]);
      end
      check(int'(row_lsb) + 2 * int'(neg_cin) == low, "row_lsb/neg_cin");
      exp_se = (d == 0) ? 0 : int'(y_msb ^ (d < 0));
      check(int'(se) == exp_se, "sign");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
