// half_adder: accurate half adder, s = a ^ b, c = a & b.
// Used in the third reduction stage of the multiplier. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
