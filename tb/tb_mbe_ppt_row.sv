// tb_mbe_ppt_row -- checks that a partial-product row encodes digit * y.
// An 8-bit row is tested for all 8 triplets and all 256 multiplicands; the
// default 32-bit row for all triplets with random and extreme multiplicands.
// The row value is sum(ppt_out[j] 2^j) + 2 neg_cin - se 2^N, compared with the
// signed product of the digit and y.
module tb_mbe_ppt_row;
  localparam int NS = 8;
  localparam int NL = 32;
  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  logic [2:0]    xs, xl;
  logic [NS-1:0] ys, ps;
  logic [NL-1:0] yl, pl;
  logic ncs, ses, ncl, sel;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mbe_ppt_row #(.N(NS)) dut_s (.x(xs), .y(ys), .ppt_out(ps), .neg_cin(ncs), .se(ses));
  mbe_ppt_row           dut_l (.x(xl), .y(yl), .ppt_out(pl), .neg_cin(ncl), .se(sel));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint got, exp;
    for (int v = 0; v < 8 * 256; v++) begin
      {xs, ys} = 11'(v);
      xl = xs;
      case (v % 4)
        0:       yl = {1'b1, {(NL-1){1'b0}}};
        1:       yl = {1'b0, {(NL-1){1'b1}}};
        default: yl = $urandom();
      endcase
      @(posedge clk);
      got = longint'(ps) + 2 * longint'(ncs) - (longint'(ses) <<< NS);
      exp = longint'(DIGIT[xs]) * longint'($signed(ys));
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL N=8 x=%b y=%0d got=%0d exp=%0d", xs, $signed(ys), got, exp);
      end
      got = longint'(pl) + 2 * longint'(ncl) - (longint'(sel) <<< NL);
      exp = longint'(DIGIT[xl]) * longint'($signed(yl));
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL N=32 x=%b y=%0d got=%0d exp=%0d", xl, $signed(yl), got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
