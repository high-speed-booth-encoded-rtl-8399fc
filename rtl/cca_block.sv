// cca_block -- conditional-carry adder section of L bits.
//
// Inputs are the per-bit r, g, p terms of the section and its incoming carry.
// The section's own (r, g) pair is built as in the multiple-level scheme: the
// bits are first merged in 2-bit sections, then the sections are merged into
// the topmost one from the top down, one multiplexer level per section, so
// that late sections at the top enter the chain last.  The carry out is that
// pair selected by cin.  The carries inside the section come from a running
// merge of (r, g) from the section's bottom bit, each selected by cin, and the
// sums are s[j] = p[j] ^ c[j] (the CCA style: one XOR at the very end).
// L = 1 degenerates to a single multiplexer carry.  Combinational.
module cca_block
  import mbe_pkg::*;
#(
  parameter int L = 4
) (
  input  logic [L-1:0] r,
  input  logic [L-1:0] g,
  input  logic [L-1:0] p,
  input  logic         cin,
  output logic [L-1:0] s,
  output logic         cout
);
  localparam int NSEC = (L + 1) / 2;

  rg_t [L-1:0]    bit_rg;
  rg_t [L-1:0]    pre;      // pre[j]: merged (r, g) of bits 0..j
  rg_t [NSEC-1:0] sec;      // 2-bit sections
  rg_t            grp;
  logic [L-1:0]   c;

  rg_t [NSEC-1:0] acc;      // acc[k]: sections k..NSEC-1 merged

  for (genvar j = 0; j < L; j++) begin : g_bit
    assign bit_rg[j] = '{r: r[j], g: g[j]};
    if (j == 0) begin : g_first
      assign pre[j] = bit_rg[j];
      assign c[j]   = cin;
    end else begin : g_next
      assign pre[j] = rg_merge(pre[j-1], bit_rg[j]);
      assign c[j]   = rg_select(pre[j-1], cin);
    end
  end

  for (genvar k = 0; k < NSEC; k++) begin : g_sec
    if (2*k+1 < L) begin : g_pair
      assign sec[k] = rg_merge(bit_rg[2*k], bit_rg[2*k+1]);
    end else begin : g_single
      assign sec[k] = bit_rg[2*k];
    end
    if (k == NSEC - 1) begin : g_top
      assign acc[k] = sec[k];
    end else begin : g_down
      assign acc[k] = rg_merge(sec[k], acc[k+1]);
    end
  end

  assign grp  = acc[0];
  assign s    = p ^ c;
  assign cout = rg_select(grp, cin);
endmodule
