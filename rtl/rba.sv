// rba: carry-propagation-free redundant binary adder for radix-2 signed-digit
// (SD2) operands.
//
// Each digit i is a pair of bits (h, l) whose value is h - l, so a digit is in
// {-1, 0, 1} and an operand's value is h - l read as two unsigned integers.
// Every digit position is one 4-to-2 signed-digit carry-save cell made of two
// full adders, with the input and output inversions of the cell diagram:
//   FA1( ~y_l, x_h, ~x_l ) -> s1, c1 ;  co_l = ~c1
//   FA2( s1, ~ci_l, y_h )  -> s2, c2 ;  co_h = c2 ; z_l = ~s2 ; z_h = ci_h
// A carry leaves a cell only towards its neighbour, never further, so the
// delay of an n-digit addition is two full adders regardless of n.
//
// The carries out of the top cell form one extra result digit, so the W+1 digit
// result is exact (no overflow): value(z) = value(x) + value(y). The cell
// structure follows the document; the extra top digit and the constant
// carry-ins of cell 0 (ci_l = 0, ci_h = 0) are this design's choices.
// Purely combinational. Because cell 0 has no carry in, z_h[0] is always 0.
module rba #(
  parameter int W = 192
) (
  input  logic [W-1:0] x_h, x_l,
  input  logic [W-1:0] y_h, y_l,
  output logic [W:0]   z_h, z_l
);
  logic [W:0] cl, ch;   // carries into each cell: cl = ci_l, ch = ci_h
  logic [W-1:0] s1, c1, s2, c2;

  assign cl[0] = 1'b0;
  assign ch[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    // FA1
    assign s1[i] = ~y_l[i] ^ x_h[i] ^ ~x_l[i];
    assign c1[i] = (~y_l[i] & x_h[i]) | (~y_l[i] & ~x_l[i]) | (x_h[i] & ~x_l[i]);
    // FA2
    assign s2[i] = s1[i] ^ ~cl[i] ^ y_h[i];
    assign c2[i] = (s1[i] & ~cl[i]) | (s1[i] & y_h[i]) | (~cl[i] & y_h[i]);
    assign cl[i+1] = ~c1[i];
    assign ch[i+1] = c2[i];
    assign z_l[i]  = ~s2[i];
    assign z_h[i]  = ch[i];
  end
  // top digit from the carries out of the last cell: value c2 + c1 - 1
  assign z_h[W] = ch[W];
  assign z_l[W] = cl[W];
endmodule
