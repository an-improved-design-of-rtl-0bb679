// atc: approximate tree compressor (ATC-n).
// Compresses N shifted rows into N/2 rows plus one compensation vector.
// Row k has weight offset k*S. Rows are taken in pairs (2j, 2j+1); the
// W-S bit positions the two rows of a pair share go through a row of
// incomplete adder cells, and the S bits at either end that only one row
// covers pass through unchanged. Each pair gives an approximate sum
// p[j] (W+S bits, weight offset 2*j*S) and an error recovery vector Q_j.
// The N/2 recovery vectors are then ORed, bit by bit at their absolute
// positions, into the compensation vector v, which approximates their
// sum (the Q vectors are sparse: each bit is 1 with probability 1/4 for
// random inputs). The N/2 rows plus v are what the next stage adds; the
// loss is where two Q vectors have a 1 at the same position.
// With N = 8, W = 8, S = 1 this is the document's ATC-8 over the eight
// partial product rows of an 8x8 multiplier; with N = 4, W = 9, S = 2 it
// is the ATC-4 that follows it. v is given over the full span of the
// input rows, (N-1)*S+W bits, with zeros where no Q bit lies.
// Purely combinational.
module atc #(
  parameter int unsigned N = 8,   // number of input rows (even)
  parameter int unsigned W = 8,   // width of each input row
  parameter int unsigned S = 1    // weight offset between consecutive rows
) (
  input  logic [N-1:0][W-1:0]     rows,
  output logic [N/2-1:0][W+S-1:0] p,
  output logic [(N-1)*S+W-1:0]    v
);
  localparam int unsigned M  = W - S;          // iCACs per pair
  localparam int unsigned VW = (N-1)*S + W;    // span of all rows

  logic [N/2-1:0][M-1:0] q;

  for (genvar j = 0; j < N/2; j++) begin : g_pair
    logic [M-1:0] pm;
    // Lower row bits S..W-1 meet upper row bits 0..W-S-1.
    icac_row #(.W(M)) u_row (
      .a(rows[2*j][W-1:S]),
      .b(rows[2*j+1][M-1:0]),
      .p(pm),
      .q(q[j])
    );
    assign p[j] = {rows[2*j+1][W-1:M], pm, rows[2*j][S-1:0]};
  end

  // Compensation vector: OR of the recovery vectors at their positions.
  always_comb begin
    v = '0;
    for (int j = 0; j < N/2; j++) begin
      v = v | (VW'(q[j]) << ((2*j+1)*S));
    end
  end

  if (N % 2 != 0 || W <= S) begin : g_bad_params
    $error("atc: N must be even and W must exceed S");
  end
endmodule
