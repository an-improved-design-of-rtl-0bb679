// full_adder: accurate full adder, {c, s} = a + b + ci.
// Used in the third reduction stage and in the accurate part of the final
// adder of the multiplier. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic c
);
  assign s = a ^ b ^ ci;
  assign c = (a & b) | (ci & (a ^ b));
endmodule
