// scalable_cpa: accuracy-scalable final adder of the 8x8 multiplier.
// Adds the two rows left by the reduction tree in three parts:
//   truncated part, bits 0..4: bits 0 and 1 are taken from the sum row
//     (the carry row is empty there) and bits 2..4 are the OR of the two
//     rows; no carry leaves this part.
//   controllable part, bits 5..11: a 7-bit carry-maskable adder; mask
//     bit i enables the carry of product bit 5+i (1 = accurate).
//   accurate part, bits 12..14: three full adders fed by the CMA's carry
//     out; the carry out of bit 14 is product bit 15.
// The longest carry chain is therefore 10 bits (5..14) with all mask bits
// set and 3 bits with all cleared. Split points follow the document.
// Purely combinational.
module scalable_cpa
  import acm_pkg::*;
(
  input  row_t     sum_row,
  input  row_t     carry_row,
  input  mask_t    mask,
  output product_t z
);
  logic       cma_cout;
  logic [3:0] acc_c;  // carries inside the accurate part

  // Truncated part.
  assign z[1:0] = sum_row[1:0];
  assign z[TRUNC_W-1:2] = sum_row[TRUNC_W-1:2] | carry_row[TRUNC_W-1:2];

  // Controllable part.
  cma #(.K(CMA_W)) u_cma (
    .x   (sum_row[ACC_LO-1:CMA_LO]),
    .y   (carry_row[ACC_LO-1:CMA_LO]),
    .mask(mask),
    .s   (z[ACC_LO-1:CMA_LO]),
    .cout(cma_cout)
  );

  // Accurate part.
  assign acc_c[0] = cma_cout;
  for (genvar i = 0; i < 3; i++) begin : g_acc
    full_adder u_fa (.a(sum_row[ACC_LO+i]), .b(carry_row[ACC_LO+i]),
                     .ci(acc_c[i]), .s(z[ACC_LO+i]), .c(acc_c[i+1]));
  end
  assign z[PROD_W-1] = acc_c[3];
endmodule
