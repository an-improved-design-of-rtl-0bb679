// cm_fa: carry-maskable full adder.
// With mask_x = 1 it is an accurate full adder. With mask_x = 0 it no
// longer generates a carry of its own: the half sum w1 becomes x | y,
// s = w1 ^ cin and cout = w1 & cin, so an incoming carry still passes.
// When all lower bits of a chain are masked too, cin is 0 and the cell
// reduces to an OR gate. Gate structure as in the document:
//   n1 = NAND(mask_x, x, y), w1 = n1 & (x | y), s = w1 ^ cin,
//   w2 = NAND(w1, cin),      cout = NAND(n1, w2).
// Purely combinational.
module cm_fa (
  input  logic mask_x,
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic n1, w1, w2;
  assign n1   = ~(mask_x & x & y);
  assign w1   = n1 & (x | y);
  assign s    = w1 ^ cin;
  assign w2   = ~(w1 & cin);
  assign cout = ~(n1 & w2);
endmodule
