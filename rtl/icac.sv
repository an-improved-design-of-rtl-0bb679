// icac: incomplete adder cell.
// Splits the sum of two bits into two bits of equal weight: p = a | b is
// the approximate sum and q = a & b the error recovery bit, so that
// a + b = p + q exactly. Compared with a half adder, the XOR is replaced
// by an OR; q equals the half adder's carry but keeps the weight of the
// inputs. Purely combinational. The gates follow the document.
module icac (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a | b;
  assign q = a & b;
endmodule
