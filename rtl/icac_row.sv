// icac_row: a row of W incomplete adder cells.
// For two W-bit words A and B it produces the approximate sum P = A | B
// and the error recovery vector Q = A & B, with A + B = P + Q. P alone is
// an approximation of the sum that is never larger than it. Purely
// combinational; W = 8 is the document's example width.
module icac_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] q
);
  for (genvar i = 0; i < W; i++) begin : g_cell
    icac u_cell (.a(a[i]), .b(b[i]), .p(p[i]), .q(q[i]));
  end
endmodule
