// tb_mlcsma -- the final adder must add for any block partition.
//   * 8 bits split as a 4-bit conditional-carry block (bits 0-3) and a 4-bit
//     conditional-sum block (bits 4-7): all 65536 operand pairs;
//   * 16 bits with the default partition: random pairs and carry chains;
//   * the default 64-bit adder: random pairs, all-ones + 1, and patterns that
//     make a carry run through every block boundary.
// {cout, s} must equal a + b.
module tb_mlcsma;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic [63:0] a64, b64, s64;
  logic c8, c16, c64;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mlcsma #(.W(8), .BLOCK_START(8'b0001_0001)) dut8 (.a(a8), .b(b8), .s(s8), .cout(c8));
  mlcsma #(.W(16))                            dut16 (.a(a16), .b(b16), .s(s16), .cout(c16));
  mlcsma                                      dut64 (.a(a64), .b(b64), .s(s64), .cout(c64));

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] e64;
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      a16 = 16'($urandom());
      b16 = (v % 4 == 0) ? ~a16 + 16'(v % 3) : 16'($urandom());
      case (v % 4)
        0: begin a64 = {$urandom(), $urandom()}; b64 = ~a64 + 64'(v % 2); end
        1: begin a64 = '1; b64 = 64'(1) << (v % 64); end
        default: begin a64 = {$urandom(), $urandom()}; b64 = {$urandom(), $urandom()}; end
      endcase
      @(posedge clk);
      checks += 3;
      if (int'({c8, s8}) != int'(a8) + int'(b8)) begin
        failures++;
        $display("FAIL W=8 a=%0d b=%0d -> %0d", a8, b8, {c8, s8});
      end
      if (int'({c16, s16}) != int'(a16) + int'(b16)) begin
        failures++;
        $display("FAIL W=16 a=%0d b=%0d -> %0d", a16, b16, {c16, s16});
      end
      e64 = {1'b0, a64} + {1'b0, b64};
      if ({c64, s64} != e64) begin
        failures++;
        $display("FAIL W=64 a=%h b=%h -> %h exp %h", a64, b64, {c64, s64}, e64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
