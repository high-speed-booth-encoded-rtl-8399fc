// tb_mbe_pp_array -- the partial-product array must sum to x*y.
// An 8 x 8 array is checked for all 65536 operand pairs: the N/2+1 rows,
// added modulo 2^16, must equal the signed product, and the layout must match
// the modified array: row i has no term below bit 2i, and the Neg_cin row
// only has terms at odd positions 2i+1 below bit N.  The default 32 x 32
// array is checked with random and extreme operands.
module tb_mbe_pp_array;
  localparam int NS = 8;
  localparam int NL = 32;

  logic [NS-1:0] xs, ys;
  logic [NL-1:0] xl, yl;
  logic [NS/2:0][2*NS-1:0] rs;
  logic [NL/2:0][2*NL-1:0] rl;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mbe_pp_array #(.N(NS)) dut_s (.x(xs), .y(ys), .rows(rs));
  mbe_pp_array           dut_l (.x(xl), .y(yl), .rows(rl));

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NL-1:0] pick(input int k);
    case (k % 5)
      0:       return {1'b1, {(NL-1){1'b0}}};
      1:       return {1'b0, {(NL-1){1'b1}}};
      2:       return '1;
      default: return $urandom();
    endcase
  endfunction

  initial begin
    logic [2*NS-1:0] acc_s;
    logic [2*NL-1:0] acc_l, exp_l;
    logic [2*NS-1:0] odd_mask;
    bit layout_ok;
    odd_mask = '0;
    for (int i = 0; i < NS / 2; i++) odd_mask[2*i+1] = 1'b1;
    for (int v = 0; v < 65536; v++) begin
      {xs, ys} = 16'(v);
      xl = pick(v);
      yl = pick(v / 7 + 3);
      @(posedge clk);
      acc_s = '0;
      layout_ok = 1'b1;
      for (int i = 0; i <= NS / 2; i++) acc_s += rs[i];
      for (int i = 0; i < NS / 2; i++)
        if (rs[i] & ((16'd1 << (2 * i)) - 16'd1)) layout_ok = 1'b0;
      if (rs[NS/2] & ~odd_mask) layout_ok = 1'b0;
      checks++;
      if (acc_s != 16'($signed(xs) * $signed(ys)) || !layout_ok) begin
        failures++;
        $display("FAIL N=8 x=%0d y=%0d sum=%h layout=%b", $signed(xs), $signed(ys), acc_s, layout_ok);
      end
      acc_l = '0;
      for (int i = 0; i <= NL / 2; i++) acc_l += rl[i];
      exp_l = 64'($signed(64'($signed(xl))) * $signed(64'($signed(yl))));
      checks++;
      if (acc_l != exp_l) begin
        failures++;
        $display("FAIL N=32 x=%0d y=%0d sum=%h exp=%h", $signed(xl), $signed(yl), acc_l, exp_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
