// booth_multiplier -- N x N two's-complement parallel multiplier with the new
// radix-4 modified Booth encoding and a multiple-level conditional-sum final
// adder.
//
// p = x * y, all combinational, in three stages:
//   1. mbe_pp_array recodes x in radix 4 and forms N/2 partial-product rows
//      plus one row of negation-correction bits (N/2 + 1 rows of 2N bits);
//   2. pprt compresses those rows with full adders to two rows;
//   3. mlcsma adds the two rows; its block partition (parameter BLOCK_START)
//      is matched to the arrival profile of the tree's outputs.
// N must be even and at least 4.  There is no clock: the result is valid one
// combinational delay after x and y change.
module booth_multiplier
  import mbe_pkg::*;
#(
  parameter int             N           = 32,
  parameter logic [2*N-1:0] BLOCK_START = (2 * N)'(default_blocks(2 * N))
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int ROWS = N / 2 + 1;

  logic [ROWS-1:0][2*N-1:0] pp_rows;
  logic [2*N-1:0]           sum_row, carry_row;
  logic                     unused_cout;

  mbe_pp_array #(.N(N)) u_ppa (.x(x), .y(y), .rows(pp_rows));

  pprt #(.ROWS(ROWS), .W(2 * N)) u_pprt (
    .rows(pp_rows), .sum_row(sum_row), .carry_row(carry_row)
  );

  mlcsma #(.W(2 * N), .BLOCK_START(BLOCK_START)) u_fadd (
    .a(sum_row), .b(carry_row), .s(p), .cout(unused_cout)
  );
endmodule
