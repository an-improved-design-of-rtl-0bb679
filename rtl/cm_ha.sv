// cm_ha: carry-maskable half adder.
// With mask_x = 1 it is an accurate half adder (s = x ^ y, cout = x & y).
// With mask_x = 0 the carry is suppressed: s = x | y and cout = 0.
// Gate structure as in the document: a three-input NAND of mask_x, x and
// y gates an OR of x and y to form the sum, and its inverse is the carry.
// Purely combinational.
module cm_ha (
  input  logic mask_x,
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);
  logic n1;  // low when the carry is generated and not masked
  assign n1   = ~(mask_x & x & y);
  assign s    = n1 & (x | y);
  assign cout = ~n1;
endmodule
