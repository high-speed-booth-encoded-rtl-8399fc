// tb_booth_multiplier -- end-to-end test of the 32 x 32 multiplier at its
// default parameters.
// Operands are extreme values (most negative, most positive, 0, -1, 1),
// values with long runs of ones and zeros, and random numbers; the product
// must equal the signed 64-bit product computed by the testbench.
// Besides the result it counts how often each mechanism of the design was
// exercised and fails if one never was:
//   * each of the eight Booth triplets 000 ... 111 in some row,
//   * a Neg_cin correction bit of 1 and a row sign of 1 (sign-extension terms),
//   * a carry of 1 out of the ripple bits, into a conditional-carry section
//     and into the conditional-sum last block, and a carry of 0 into that block.
module tb_booth_multiplier;
  import mbe_pkg::*;
  localparam int N     = 32;
  localparam int W     = 2 * N;
  localparam int LASTB = W - W / 3;     // first bit of the last (CSMA) block
  localparam int NVEC  = 40000;

  logic [N-1:0] x, y;
  logic [W-1:0] p;
  int checks = 0, failures = 0;
  int code_seen [8];
  int n_negcin = 0, n_sign = 0, n_ripple_c = 0, n_cca_c = 0, n_csma_c1 = 0, n_csma_c0 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] operand(input int k);
    case (k % 9)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '0;
      3: return '1;
      4: return N'(1);
      5: return N'({$urandom()} << ($urandom() % N));
      6: return ~N'({$urandom()} << ($urandom() % N));
      default: return N'($urandom());
    endcase
  endfunction

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-36s %0d", what, n);
  endtask

  initial begin
    logic [W-1:0] exp;
    logic [N:0] xe;
    foreach (code_seen[i]) code_seen[i] = 0;
    for (int v = 0; v < NVEC; v++) begin
      x = operand(v);
      y = operand(v / 9 + v % 5);
      @(posedge clk);
      exp = W'($signed(W'($signed(x))) * $signed(W'($signed(y))));
      checks++;
      if (p != exp) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d p=%h exp=%h", $signed(x), $signed(y), p, exp);
      end
      xe = {x, 1'b0};
      for (int i = 0; i < N / 2; i++) code_seen[xe[2*i +: 3]]++;
      if (|dut.u_ppa.ncin)       n_negcin++;
      if (|dut.u_ppa.se)         n_sign++;
      if (dut.u_fadd.c[4])       n_ripple_c++;
      if (dut.u_fadd.c[8])       n_cca_c++;
      if (dut.u_fadd.c[LASTB])   n_csma_c1++;
      else                       n_csma_c0++;
    end
    $display("mechanism counts:");
    for (int i = 0; i < 8; i++) expect_seen(code_seen[i], $sformatf("Booth triplet %03b (digit %0d)", 3'(i), booth_digit(3'(i))));
    expect_seen(n_negcin,   "Neg_cin correction bit = 1");
    expect_seen(n_sign,     "row sign = 1 (sign extension)");
    expect_seen(n_ripple_c, "carry 1 out of ripple bits");
    expect_seen(n_cca_c,    "carry 1 out of a CCA section");
    expect_seen(n_csma_c1,  "carry 1 into CSMA last block");
    expect_seen(n_csma_c0,  "carry 0 into CSMA last block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
