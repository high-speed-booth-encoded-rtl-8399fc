// mbe_encoder -- radix-4 modified Booth recoder of the new MBE scheme.
//
// Takes one overlapping triplet of the multiplier, {x[2i+1], x[2i], x[2i-1]},
// and the two end bits of the multiplicand, and produces:
//   X1_b  = XNOR(x[2i-1], x[2i])   low when the digit magnitude is 1
//   X2_b  = XOR (x[2i-1], x[2i])   low when the magnitude is 2, or the digit is 0
//   Z     = XNOR(x[2i+1], x[2i])   forces the x2 path off where X2_b is low
//                                  for a zero digit (000, 111)
//   Neg   = x[2i+1]
//   row_lsb = y_lsb & (x[2i-1] ^ x[2i])   bit 0 of the row
//   neg_cin = x[2i+1] & ~(x[2i]&x[2i-1] | y_lsb&x[2i] | y_lsb&x[2i-1])
//             the correction bit placed one position above row_lsb; together
//             row_lsb + 2*neg_cin equal the row's bit 0 plus its +1 of the
//             two's-complement negation
//   se    = row sign, (digit != 0) & (y_msb ^ x[2i+1]); the array turns it
//           into sign-extension terms.
// X1_b, X2_b, Z and Neg follow the scheme's truth table exactly.  neg_cin is
// written in the form derived from that table (the complement of a sum of
// products); se is this design's formulation of the sign signal the scheme
// derives from y_msb and the x bits.  Combinational.
module mbe_encoder (
  input  logic [2:0] x,        // {x[2i+1], x[2i], x[2i-1]}
  input  logic       y_lsb,
  input  logic       y_msb,
  output logic       x1_b,
  output logic       x2_b,
  output logic       z,
  output logic       neg,
  output logic       row_lsb,
  output logic       neg_cin,
  output logic       se
);
  logic xh, xm, xl;
  always_comb begin
    {xh, xm, xl} = x;
    x1_b    = ~(xl ^ xm);
    x2_b    = xl ^ xm;
    z       = ~(xh ^ xm);
    neg     = xh;
    row_lsb = y_lsb & (xl ^ xm);
    neg_cin = xh & ~((xm & xl) | (y_lsb & xm) | (y_lsb & xl));
    se      = ~((xh == xm) && (xm == xl)) & (y_msb ^ xh);
  end
endmodule
