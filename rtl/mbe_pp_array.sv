// mbe_pp_array -- the modified MBE partial-product array of an N x N multiplier.
//
// x and y are N-bit two's-complement numbers (N even).  Row i (i = 0..N/2-1)
// recodes {x[2i+1], x[2i], x[2i-1]} with x[-1] = 0 and is placed at bit 2i:
//   bit 2i        Row_LSB term
//   bits 2i+1 ..  2i+N-1   decoder outputs
//   row 0:  se0 at N, se0 at N+1, ~se0 at N+2
//   row i>0: ~se_i at 2i+N, constant 1 at 2i+N+1
// This is the usual sign-extension-free layout: the constants encode
// -sum(2^(2i+N)) modulo 2^(2N).  Output row N/2 holds the Neg_cin terms,
// Neg_cin of row i at bit 2i+1, so that row is never longer than N bits and
// the array has no term at bit N-2 below the last row.
// Summing all N/2+1 rows modulo 2^(2N) gives x*y.  Combinational.
module mbe_pp_array #(
  parameter int N = 32
) (
  input  logic [N-1:0]                x,
  input  logic [N-1:0]                y,
  output logic [N/2:0][2*N-1:0]       rows   // rows[N/2] is the Neg_cin row
);
  localparam int M = N / 2;

  logic [N:0]              xe;       // x with x[-1] = 0 appended at the bottom
  logic [M-1:0][N-1:0]     ppt;
  logic [M-1:0]            ncin, se;

  assign xe = {x, 1'b0};

  for (genvar i = 0; i < M; i++) begin : g_row
    mbe_ppt_row #(.N(N)) u_row (
      .x(xe[2*i+2 -: 3]), .y(y), .ppt_out(ppt[i]), .neg_cin(ncin[i]), .se(se[i])
    );
  end

  always_comb begin
    rows = '0;
    for (int i = 0; i < M; i++) begin
      rows[i][2*i +: N] = ppt[i];
      if (i == 0) begin
        rows[0][N]   = se[0];
        rows[0][N+1] = se[0];
        rows[0][N+2] = ~se[0];
      end else begin
        rows[i][2*i+N] = ~se[i];
        rows[i][2*i+N+1] = 1'b1;
      end
      rows[M][2*i+1] = ncin[i];
    end
  end
endmodule
