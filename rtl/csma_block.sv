// csma_block -- tree-based conditional-sum adder section of L bits (used as
// the final adder's last block).
//
// Every bit starts as a 1-bit group with both candidate results: sum p or ~p
// and carry out g or r, for a group carry in of 0 or 1.  Each tree level then
// pairs neighbouring groups: the lower group's two candidate carries pick,
// with one row of 2:1 multiplexers, which candidate sums and carries of the
// upper group belong to each candidate of the merged group.  After
// ceil(log2 L) levels one group spans the section, and the incoming carry cin
// selects its final sums and carry out with one more multiplexer.  A late cin
// thus costs a single multiplexer delay.  L need not be a power of two; a
// group without an upper partner passes through a level unchanged.
// Combinational.
module csma_block #(
  parameter int L = 4
) (
  input  logic [L-1:0] r,
  input  logic [L-1:0] g,
  input  logic [L-1:0] p,
  input  logic         cin,
  output logic [L-1:0] s,
  output logic         cout
);
  localparam int K = (L > 1) ? $clog2(L) : 0;

  // Level k: sum0/sum1 of every bit for group carry in 0/1; cy0/cy1 of every
  // group (indexed by group number j >> k) for group carry in 0/1.
  logic [L-1:0] sum0 [K+1];
  logic [L-1:0] sum1 [K+1];
  logic [L-1:0] cy0  [K+1];
  logic [L-1:0] cy1  [K+1];

  assign sum0[0] = p;
  assign sum1[0] = ~p;
  assign cy0[0]  = g;
  assign cy1[0]  = r;

  for (genvar k = 0; k < K; k++) begin : g_lvl
    localparam int NG  = (L + (1 << k) - 1) >> k;        // groups at level k
    localparam int NG2 = (L + (1 << (k + 1)) - 1) >> (k + 1);
    for (genvar j = 0; j < L; j++) begin : g_sum
      if (((j >> k) & 1) == 0) begin : g_lo
        assign sum0[k+1][j] = sum0[k][j];
        assign sum1[k+1][j] = sum1[k][j];
      end else begin : g_hi
        // upper half: selected by the lower neighbour's candidate carries
        assign sum0[k+1][j] = cy0[k][(j >> k) - 1] ? sum1[k][j] : sum0[k][j];
        assign sum1[k+1][j] = cy1[k][(j >> k) - 1] ? sum1[k][j] : sum0[k][j];
      end
    end
    for (genvar gi = 0; gi < L; gi++) begin : g_grp
      if (gi < NG2 && 2 * gi + 1 < NG) begin : g_pair
        assign cy0[k+1][gi] = cy0[k][2*gi] ? cy1[k][2*gi+1] : cy0[k][2*gi+1];
        assign cy1[k+1][gi] = cy1[k][2*gi] ? cy1[k][2*gi+1] : cy0[k][2*gi+1];
      end else if (gi < NG2) begin : g_alone
        assign cy0[k+1][gi] = cy0[k][2*gi];
        assign cy1[k+1][gi] = cy1[k][2*gi];
      end else begin : g_none
        assign cy0[k+1][gi] = 1'b0;
        assign cy1[k+1][gi] = 1'b0;
      end
    end
  end

  assign s    = cin ? sum1[K] : sum0[K];
  assign cout = cin ? cy1[K][0] : cy0[K][0];
endmodule
