// rgp_gen -- first stage of the final adder.
//
// For every bit of the two operand rows it forms
//   r = a | b   (carry out of the bit when its carry in is 1)
//   g = a & b   (carry out when its carry in is 0)
//   p = a ^ b   (half sum)
// All later stages of the adder are 2:1 multiplexers on these terms and XOR
// gates with p.  Combinational, W bits wide.
module rgp_gen #(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] r,
  output logic [W-1:0] g,
  output logic [W-1:0] p
);
  always_comb begin
    r = a | b;
    g = a & b;
    p = a ^ b;
  end
endmodule
