// mbe_ppt_row -- one row of radix-4 Booth partial products (new MBE scheme).
//
// The encoder recodes the triplet {x[2i+1], x[2i], x[2i-1]} and looks at the
// end bits of y.  A row of XNOR gates forms ~(y[j]^Neg) once per multiplicand
// bit and shares each output between the two neighbouring decoders; decoder j
// (j = 1..N-1) then produces ppt_out[j].  Bit 0 of the row, ppt_out[0], is the
// encoder's Row_LSB term, so no decoder is spent on it.  Besides the row the
// block returns neg_cin (weight 2 relative to ppt_out[0]) and se, the row's
// sign, from which the array builds the sign-extension terms.
// The row value is  sum(ppt_out[j]*2^j) + 2*neg_cin - se*2^N = digit * y.
// Decoder 1 needs ~(y[0]^Neg), so this row has N XNOR gates (y[N-1:0]).
// Combinational; every path is two gate delays after x is stable.
module mbe_ppt_row #(
  parameter int N = 32
) (
  input  logic [2:0]   x,        // {x[2i+1], x[2i], x[2i-1]}
  input  logic [N-1:0] y,
  output logic [N-1:0] ppt_out,
  output logic         neg_cin,
  output logic         se
);
  logic x1_b, x2_b, z, neg, row_lsb;
  logic [N-1:0] xn;

  mbe_encoder u_enc (
    .x(x), .y_lsb(y[0]), .y_msb(y[N-1]),
    .x1_b(x1_b), .x2_b(x2_b), .z(z), .neg(neg),
    .row_lsb(row_lsb), .neg_cin(neg_cin), .se(se)
  );

  always_comb xn = ~(y ^ {N{neg}});

  assign ppt_out[0] = row_lsb;

  for (genvar j = 1; j < N; j++) begin : g_dec
    mbe_decoder u_dec (
      .xn_j(xn[j]), .xn_jm1(xn[j-1]),
      .x1_b(x1_b), .x2_b(x2_b), .z(z), .ppt(ppt_out[j])
    );
  end
endmodule
