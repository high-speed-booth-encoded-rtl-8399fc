// mbe_decoder -- one partial-product bit of the new MBE scheme.
//
// Inputs are the multiplicand bits y[j] and y[j-1] already passed through the
// row's shared XNOR gates with Neg (xn_j = ~(y[j]^Neg), xn_jm1 = ~(y[j-1]^Neg))
// and the encoder's active-low selects.  The bit is
//   ppt_j = ~((xn_j | X1_b) & (xn_jm1 | X2_b | Z))
// i.e. (y[j]^Neg) when the digit magnitude is 1, (y[j-1]^Neg) when it is 2, and
// 0 for a zero digit.  Z removes the x2 term for the triplets where X2_b alone
// would wrongly select it.  The equation is worked out from the recoding truth
// table; it is a single AND-OR-invert stage after the XNORs, so every path is
// two gate delays long.  Combinational.
module mbe_decoder (
  input  logic xn_j,     // ~(y[j]   ^ Neg)
  input  logic xn_jm1,   // ~(y[j-1] ^ Neg)
  input  logic x1_b,
  input  logic x2_b,
  input  logic z,
  output logic ppt
);
  always_comb ppt = ~((xn_j | x1_b) & (xn_jm1 | x2_b | z));
endmodule
