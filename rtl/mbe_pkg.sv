// mbe_pkg -- types and helpers shared by the Booth multiplier and its final adder.
//
// rg_t is the (r, g) pair of a bit or of a group of bits in the final adder:
// r is the carry out of the group when its carry in is 1, g the carry out when
// its carry in is 0 (for a single bit r = a|b, g = a&b).  rg_merge combines a
// lower group with the group directly above it with two 2:1 multiplexers whose
// select is the lower group's term, which is the associative but not
// commutative operator the adder is built from.  booth_code_t names the eight
// radix-4 recoding triplets {x[2i+1], x[2i], x[2i-1]}.
package mbe_pkg;

  typedef struct packed {
    logic r;  // carry out when carry in = 1
    logic g;  // carry out when carry in = 0
  } rg_t;

  // Carry of a group selected by its incoming carry.
  function automatic logic rg_select(input rg_t grp, input logic cin);
    return cin ? grp.r : grp.g;
  endfunction

  // Merge group `lo` (less significant) with group `hi` placed directly above it.
  function automatic rg_t rg_merge(input rg_t lo, input rg_t hi);
    rg_t m;
    m.r = lo.r ? hi.r : hi.g;
    m.g = lo.g ? hi.r : hi.g;
    return m;
  endfunction

  // Booth triplet {x[2i+1], x[2i], x[2i-1]} and its digit value.
  typedef enum logic [2:0] {
    BC_P0  = 3'b000, BC_P1A = 3'b001, BC_P1B = 3'b010, BC_P2 = 3'b011,
    BC_M2  = 3'b100, BC_M1A = 3'b101, BC_M1B = 3'b110, BC_M0 = 3'b111
  } booth_code_t;

  function automatic int booth_digit(input logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  // Default block partition of a W-bit final adder (W <= 256); bit k set means
  // a block starts at bit k.  Bits 0..3 ripple (bit 0 is a half adder), then
  // 4-bit conditional-carry sections, and the last block, a conditional-sum
  // section, covers the top third.  For W = 64 the section boundaries at bits
  // 27, 33 and 43 of the published 32 x 32 example are used instead of the
  // 4-bit grid above bit 24.
  function automatic logic [255:0] default_blocks(input int w);
    logic [255:0] m;
    int last;
    m    = '0;
    last = w - w / 3;
    for (int k = 0; k < w && k < 4; k++) m[k] = 1'b1;
    for (int k = 4; k < last; k += 4) m[k] = 1'b1;
    if (w == 64) begin
      m[28]   = 1'b0;
      m[32]   = 1'b0;
      m[36]   = 1'b0;
      m[40]   = 1'b0;
      m[27]   = 1'b1;
      m[33]   = 1'b1;
    end
    if (last < w) m[last] = 1'b1;
    return m;
  endfunction

endpackage
