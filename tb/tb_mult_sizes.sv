// tb_mult_sizes -- the multiplier at every size of the published comparison
// (6, 8, 12, 16, 18, 24, 32 and 36 bits).
// Each size is elaborated with its own default final-adder partition.  The
// 6- and 8-bit multipliers are checked for every operand pair; the larger
// ones for extreme operands and random ones.  Products are compared with a
// signed 128-bit product computed by the testbench.
module tb_mult_sizes;
  localparam int NS = 8;
  localparam int SIZES [NS] = '{6, 8, 12, 16, 18, 24, 32, 36};
  localparam int NRAND = 20000;

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar si = 0; si < NS; si++) begin : g_size
    localparam int N = SIZES[si];
    logic [N-1:0]   x, y;
    logic [2*N-1:0] p;

    booth_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p));

    function automatic logic [N-1:0] operand(input int k);
      case (k % 6)
        0: return {1'b1, {(N-1){1'b0}}};
        1: return {1'b0, {(N-1){1'b1}}};
        2: return '1;
        default: return N'({$urandom(), $urandom()});
      endcase
    endfunction

    initial begin
      logic signed [127:0] e;
      int nvec;
      nvec = (N <= 8) ? (1 << (2 * N)) : NRAND;
      for (int v = 0; v < nvec; v++) begin
        if (N <= 8) {x, y} = (2 * N)'(v);
        else begin
          x = operand(v);
          y = operand(v / 6 + v % 4);
        end
        @(posedge clk);
        e = 128'($signed(x)) * 128'($signed(y));
        checks++;
        if (p != e[2*N-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d p=%h", N, $signed(x), $signed(y), p);
        end
      end
      $display("  N=%0d: %0d products checked", N, nvec);
      done++;
    end
  end

  initial begin
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
