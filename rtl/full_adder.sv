// full_adder -- one-bit 3:2 counter.
//
// Adds three bits of equal weight: s = a ^ b ^ c is the sum bit, co the carry
// (majority of the three).  This is the cell the reduction tree is built from
// and the ripple bit of the final adder.  The three full-adder cells of the
// design's delay model differ only in input-to-output delays; their logic is
// this one.  Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
