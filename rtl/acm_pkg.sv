// acm_pkg: constants shared by the 8x8 accuracy-controllable approximate
// multiplier. The operand width, the split of the final adder into a
// truncated part, a carry-maskable part and an accurate part, and the
// bit range where the two compensation vectors are merged by OR gates
// are the document's numbers for its 8-bit design.
package acm_pkg;
  localparam int unsigned OP_W    = 8;               // operand width
  localparam int unsigned ROW_W   = 2 * OP_W - 1;    // reduced rows, bits 0..14
  localparam int unsigned PROD_W  = 2 * OP_W;        // product, bits 0..15
  localparam int unsigned TRUNC_W = 5;               // truncated part, bits 0..4
  localparam int unsigned CMA_W   = 7;               // carry-maskable part, bits 5..11
  localparam int unsigned CMA_LO  = TRUNC_W;         // lowest CMA bit
  localparam int unsigned ACC_LO  = CMA_LO + CMA_W;  // accurate part, bits 12..14
  localparam int unsigned OR_LO   = 4;               // Stage 2 OR gates, bits 4..10
  localparam int unsigned OR_HI   = 10;

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [PROD_W-1:0] product_t;
  typedef logic [CMA_W-1:0]  mask_t;
endpackage
