// tb_cca_block -- exhaustive check of the conditional-carry section.
// The default 4-bit section and a 7-bit one (odd length, so the top 2-bit
// section holds one bit) see every pair of operands and both carries in.
// The testbench forms r, g, p itself; {cout, s} must equal a + b + cin.
module tb_cca_block;
  localparam int LA = 4;
  localparam int LB = 7;

  logic [LA-1:0] aa, ba, sa;
  logic [LB-1:0] ab, bb, sb;
  logic cin, ca, cb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cca_block           dut_a (.r(aa | ba), .g(aa & ba), .p(aa ^ ba), .cin(cin), .s(sa), .cout(ca));
  cca_block #(.L(LB)) dut_b (.r(ab | bb), .g(ab & bb), .p(ab ^ bb), .cin(cin), .s(sb), .cout(cb));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * LB + 1)); v++) begin
      {ab, bb, cin} = (2 * LB + 1)'(v);
      {aa, ba}      = (2 * LA)'(v >> 1);
      @(posedge clk);
      checks += 2;
      if (int'({ca, sa}) != int'(aa) + int'(ba) + int'(cin)) begin
        failures++;
        $display("FAIL L=%0d a=%0d b=%0d cin=%b -> %0d", LA, aa, ba, cin, {ca, sa});
      end
      if (int'({cb, sb}) != int'(ab) + int'(bb) + int'(cin)) begin
        failures++;
        $display("FAIL L=%0d a=%0d b=%0d cin=%b -> %0d", LB, ab, bb, cin, {cb, sb});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
