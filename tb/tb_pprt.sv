// tb_pprt -- the reduction tree must preserve the sum of its rows.
// The default tree (17 rows of 64 bits) and a 5-row, 16-bit tree are fed
// random rows, rows of all ones and sparse rows; sum_row + carry_row must
// equal the modular sum of the inputs.
module tb_pprt;
  localparam int R1 = 17, W1 = 64;
  localparam int R2 = 5,  W2 = 16;

  logic [R1-1:0][W1-1:0] in1;
  logic [R2-1:0][W2-1:0] in2;
  logic [W1-1:0] s1, c1;
  logic [W2-1:0] s2, c2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pprt                          dut1 (.rows(in1), .sum_row(s1), .carry_row(c1));
  pprt #(.ROWS(R2), .W(W2))     dut2 (.rows(in2), .sum_row(s2), .carry_row(c2));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W1-1:0] e1;
    logic [W2-1:0] e2;
    for (int v = 0; v < 3000; v++) begin
      for (int i = 0; i < R1; i++)
        case (v % 3)
          0: in1[i] = {$urandom(), $urandom()};
          1: in1[i] = '1;
          default: in1[i] = 64'($urandom() & 32'h0101_0101) << (i % 8);
        endcase
      for (int i = 0; i < R2; i++) in2[i] = (v % 3 == 1) ? '1 : 16'($urandom());
      @(posedge clk);
      e1 = '0;
      for (int i = 0; i < R1; i++) e1 += in1[i];
      e2 = '0;
      for (int i = 0; i < R2; i++) e2 += in2[i];
      checks += 2;
      if (s1 + c1 != e1) begin
        failures++;
        $display("FAIL 17x64 got=%h exp=%h", s1 + c1, e1);
      end
      if (16'(s2 + c2) != e2) begin
        failures++;
        $display("FAIL 5x16 got=%h exp=%h", s2 + c2, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
