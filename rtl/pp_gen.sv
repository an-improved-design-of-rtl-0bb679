// pp_gen: partial product generation for an N x N unsigned multiplier.
// pp[i][j] = a[j] & b[i]; row i has weight 2^i, so bit j of row i has
// weight 2^(i+j). The rows are returned unshifted; the reduction tree
// applies the offsets. One AND gate per partial product, as the document
// describes. Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end
endmodule
