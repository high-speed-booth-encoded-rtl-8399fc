// mlcsma -- multiple-level conditional-sum final adder, W bits.
//
// Adds the two rows left by the reduction tree.  The rows' bits arrive at
// different times (early at both ends, late in the middle), so the adder is a
// chain of blocks sized to that profile instead of one balanced tree:
//   * rgp_gen forms r, g, p for every bit;
//   * a block of one bit is a ripple full adder (bit 0, with no carry in, is a
//     half adder);
//   * a longer block that is not the last is a conditional-carry section
//     (cca_block): its (r, g) pair is ready before its carry in, which then
//     passes through it with one multiplexer;
//   * the last block is a conditional-sum section (csma_block).
// BLOCK_START marks where blocks begin (bit k set: a block starts at bit k;
// bit 0 always starts one).  The partition is the output of a design-time
// search over the arrival profile, so it is a parameter here; the default
// comes from mbe_pkg::default_blocks.  Any partition gives the same sum, only
// the delay differs.  s = (a + b) mod 2^W, cout is the carry out of bit W-1.
// Combinational.
module mlcsma
  import mbe_pkg::*;
#(
  parameter int           W           = 64,
  parameter logic [W-1:0] BLOCK_START = W'(default_blocks(W))
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  function automatic bit starts(input int k);
    return (k == 0) || BLOCK_START[k];
  endfunction

  function automatic int seg_len(input int k);
    int n;
    n = 1;
    while (k + n < W && !starts(k + n)) n++;
    return n;
  endfunction

  logic [W-1:0] r, g, p;
  logic [W:0]   c;

  assign c[0] = 1'b0;
  assign cout = c[W];

  rgp_gen #(.W(W)) u_rgp (.a(a), .b(b), .r(r), .g(g), .p(p));

  for (genvar k = 0; k < W; k++) begin : g_blk
    if (starts(k)) begin : g_start
      localparam int LEN = seg_len(k);
      if (k + LEN == W) begin : g_csma
        csma_block #(.L(LEN)) u_csma (
          .r(r[k +: LEN]), .g(g[k +: LEN]), .p(p[k +: LEN]),
          .cin(c[k]), .s(s[k +: LEN]), .cout(c[k+LEN])
        );
      end else if (LEN == 1) begin : g_fa
        full_adder u_fa (
          .a(a[k]), .b(b[k]), .c(c[k]), .s(s[k]), .co(c[k+1])
        );
      end else begin : g_cca
        cca_block #(.L(LEN)) u_cca (
          .r(r[k +: LEN]), .g(g[k +: LEN]), .p(p[k +: LEN]),
          .cin(c[k]), .s(s[k +: LEN]), .cout(c[k+LEN])
        );
      end
    end
  end
endmodule
