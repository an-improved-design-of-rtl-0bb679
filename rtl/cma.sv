// cma: K-bit carry-maskable adder.
// A ripple-carry adder whose bit 0 is a carry-maskable half adder and
// whose higher bits are carry-maskable full adders, each with its own
// mask bit (1 = accurate, 0 = no carry generated at that bit). Setting
// the upper u mask bits and clearing the lower K-u makes the upper u bits
// an exact adder and the lower bits OR gates, which shortens the carry
// chain to u bits: mask = all ones is a K-bit ripple adder, mask = 0 is a
// row of OR gates. There is no carry input, since the part below the CMA
// produces no carry. Purely combinational. K = 7 is the document's size.
module cma #(
  parameter int unsigned K = 7
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic [K-1:0] mask,
  output logic [K-1:0] s,
  output logic         cout
);
  logic [K:0] c;  // c[i] is the carry into bit i
  assign c[0] = 1'b0;

  cm_ha u_ha (.mask_x(mask[0]), .x(x[0]), .y(y[0]), .s(s[0]), .cout(c[1]));

  for (genvar i = 1; i < K; i++) begin : g_fa
    cm_fa u_fa (.mask_x(mask[i]), .x(x[i]), .y(y[i]), .cin(c[i]),
                .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[K];
endmodule
