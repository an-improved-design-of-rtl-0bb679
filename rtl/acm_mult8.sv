// acm_mult8: 8x8 unsigned accuracy-controllable approximate multiplier.
// z approximates a * b. Partial products are formed by AND gates
// (pp_gen), reduced to two rows by approximate tree compressors and a
// short Wallace-style stage (ppr), and added by a final adder whose
// middle seven bits are carry-maskable (scalable_cpa). The 7-bit mask
// sets the accuracy at run time: mask[i] = 1 lets product bit 5+i
// generate a carry. The intended settings are thermometer codes, the
// upper u bits set: u = 7 gives the most accurate result, u = 0 the
// shortest carry chain and least switching. The result is never above
// the exact product; even with every mask bit set it may be below it,
// because the compressors and the truncated low bits approximate.
// Purely combinational: no clock, no reset, result valid one
// propagation delay after the inputs change. The structure is the
// document's; the raw 7-bit mask port is this design's choice.
module acm_mult8
  import acm_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  input  mask_t    mask,
  output product_t z
);
  logic [OP_W-1:0][OP_W-1:0] pp;
  row_t sum_row, carry_row;

  pp_gen #(.N(OP_W)) u_pp (.a(a), .b(b), .pp(pp));
  ppr u_ppr (.pp(pp), .sum_row(sum_row), .carry_row(carry_row));
  scalable_cpa u_cpa (.sum_row(sum_row), .carry_row(carry_row),
                      .mask(mask), .z(z));
endmodule
