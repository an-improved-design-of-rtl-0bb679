// ppr: approximate partial product reduction of an 8x8 multiplier.
// Reduces the 64 partial products to two 15-bit rows in three stages.
//   Stage 1: an ATC-8 turns the eight partial product rows into four
//            rows P1..P4 (weight offsets 0, 2, 4, 6) and compensation
//            vector V1; an ATC-4 turns P1..P4 into P5 (offset 0) and P6
//            (offset 4) and compensation vector V2; a row of seven iCACs
//            over bits 4..10 turns P5 and P6 into P7 and recovery vector
//            Q7. Only the final iCAC row keeps both outputs, so no
//            accuracy is lost there.
//   Stage 2: bits 4..10 now hold four bits each (P7, Q7, V1, V2); seven
//            OR gates replace V1 + V2 by V1 | V2 there, leaving at most
//            three bits per column.
//   Stage 3: half adders at bits 1 and 13 and full adders at bits 2..12
//            reduce the three rows to a sum row and a carry row.
// The approximations (OR of the Q vectors inside each ATC, OR of V1 and
// V2) only drop value, so the two rows never add up to more than the
// exact product. Structure, bit ranges and gate counts follow the
// document; it is purely combinational.
// Outputs: sum_row bits 0..14; carry_row bits 2..14 (bits 0, 1 are 0).
// The bits of the Stage 2 rows r1 and r2 that no adder reads (r1 bits 0
// and 14, r2 bits 0, 1, 13 and 14) are always zero, so lint reports them
// as unused.
module ppr
  import acm_pkg::*;
(
  input  logic [OP_W-1:0][OP_W-1:0] pp,         // pp[i][j] = a[j] & b[i]
  output row_t                      sum_row,
  output row_t                      carry_row
);
  // Stage 1 -------------------------------------------------------------
  logic [3:0][OP_W:0]   p14;   // P1..P4, 9 bits each
  logic [1:0][OP_W+2:0] p56;   // P5, P6, 11 bits each
  row_t                 v1, v2;
  row_t                 p7, q7;
  logic [6:0]           p7_mid, q7_mid;

  atc #(.N(8), .W(OP_W), .S(1)) u_atc8 (.rows(pp), .p(p14), .v(v1));
  atc #(.N(4), .W(OP_W+1), .S(2)) u_atc4 (.rows(p14), .p(p56), .v(v2));

  // P5 covers bits 0..10 and P6 bits 4..14; they share bits 4..10.
  icac_row #(.W(7)) u_row7 (
    .a(p56[0][10:4]),
    .b(p56[1][6:0]),
    .p(p7_mid),
    .q(q7_mid)
  );
  assign p7 = {p56[1][10:7], p7_mid, p56[0][3:0]};
  assign q7 = {4'b0, q7_mid, 4'b0};

  // Stage 2 -------------------------------------------------------------
  // Three rows: r0 = P7; r1 = Q7 in bits 4..10 and V1 elsewhere;
  // r2 = V1 | V2 in bits 4..10 and V2 elsewhere.
  row_t r0, r1, r2;
  always_comb begin
    r0 = p7;
    for (int k = 0; k < ROW_W; k++) begin
      if (k >= OR_LO && k <= OR_HI) begin
        r1[k] = q7[k];
        r2[k] = v1[k] | v2[k];
      end else begin
        r1[k] = v1[k];
        r2[k] = v2[k];
      end
    end
  end

  // Stage 3 -------------------------------------------------------------
  logic [ROW_W-1:0] cy;  // cy[k+1] is the carry out of column k
  assign cy[0]      = 1'b0;
  assign cy[1]      = 1'b0;
  assign sum_row[0] = r0[0];

  half_adder u_ha1 (.a(r0[1]), .b(r1[1]), .s(sum_row[1]), .c(cy[2]));
  for (genvar k = 2; k <= 12; k++) begin : g_fa
    full_adder u_fa (.a(r0[k]), .b(r1[k]), .ci(r2[k]),
                     .s(sum_row[k]), .c(cy[k+1]));
  end
  half_adder u_ha13 (.a(r0[13]), .b(r1[13]), .s(sum_row[13]), .c(cy[14]));
  assign sum_row[14] = r0[14];

  assign carry_row = cy;
endmodule
