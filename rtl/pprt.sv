// pprt -- partial product reduction tree: ROWS rows of W bits down to two.
//
// Each level takes its rows in groups of three and compresses every group with
// one full adder per bit position (a 3:2 counter row): the sum vector stays in
// place, the carry vector moves up one bit and the carry out of bit W-1 is
// dropped, so the result is modulo 2^W.  Rows left over from a level (one or
// two) pass to the next level unchanged.  A level turns r rows into
// 2*floor(r/3) + r mod 3, and levels are added until two rows remain: a
// Wallace-style tree of about log1.5(ROWS/2) full-adder delays.  Positions
// that only ever hold zeros simplify away in synthesis.  The unused upper
// entries of each level's array are tied to zero.
// sum_row + carry_row == sum of all input rows (mod 2^W).  Combinational.
module pprt #(
  parameter int ROWS = 17,
  parameter int W    = 64
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_row,
  output logic [W-1:0]           carry_row
);
  // Number of rows present at level l.
  function automatic int rows_at(input int l);
    int n;
    n = ROWS;
    for (int i = 0; i < l; i++) if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int num_levels();
    int n, l;
    n = ROWS;
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NLEV = num_levels();

  logic [ROWS-1:0][W-1:0] lv [NLEV+1];

  assign lv[0] = rows;

  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int CUR    = rows_at(l);
    localparam int GROUPS = CUR / 3;
    localparam int REST   = CUR % 3;
    localparam int NXT    = 2 * GROUPS + REST;

    for (genvar gi = 0; gi < GROUPS; gi++) begin : g_grp
      logic [W-1:0] s, co;
      for (genvar k = 0; k < W; k++) begin : g_bit
        full_adder u_fa (
          .a(lv[l][3*gi][k]), .b(lv[l][3*gi+1][k]), .c(lv[l][3*gi+2][k]),
          .s(s[k]), .co(co[k])
        );
      end
      assign lv[l+1][2*gi]   = s;
      assign lv[l+1][2*gi+1] = {co[W-2:0], 1'b0};
    end
    for (genvar ri = 0; ri < REST; ri++) begin : g_pass
      assign lv[l+1][2*GROUPS+ri] = lv[l][3*GROUPS+ri];
    end
    for (genvar z = NXT; z < ROWS; z++) begin : g_zero
      assign lv[l+1][z] = '0;
    end
  end

  assign sum_row = lv[NLEV][0];
  if (rows_at(NLEV) >= 2) begin : g_two
    assign carry_row = lv[NLEV][1];
  end else begin : g_one
    assign carry_row = '0;
  end
endmodule
