// acm_ref_pkg: bit-accurate reference model of the 8x8 accuracy-
// controllable approximate multiplier, written column by column from the
// algorithm rather than from the RTL's module structure. Used by the
// testbenches of ppr, scalable_cpa and acm_mult8.
package acm_ref_pkg;

  typedef struct {
    int unsigned atc_loss;    // value lost by ORing Q vectors inside the ATCs
    int unsigned or_loss;     // value lost by the Stage 2 OR gates
    int unsigned trunc_loss;  // value lost in the truncated part
    int unsigned cma_loss;    // value lost by masked carries in the CMA
    bit          cma_carry;   // the CMA passed a carry into the accurate part
  } ref_stats_t;

  // One approximate tree compressor over absolute-position rows.
  function automatic void atc_ref(input int unsigned rows[], input int offs[],
                                  input int width, output int unsigned p[],
                                  output int unsigned v, output int unsigned loss);
    int unsigned qsum;
    p = new[rows.size() / 2];
    v = 0;
    qsum = 0;
    for (int j = 0; j < rows.size(); j += 2) begin
      int unsigned ov;
      int unsigned q;
      ov = 0;
      for (int k = offs[j+1]; k <= offs[j] + width - 1; k++) ov |= (1 << k);
      q = rows[j] & rows[j+1] & ov;
      p[j/2] = rows[j] | rows[j+1];
      v |= q;
      qsum += q;
    end
    loss = qsum - v;
  endfunction

  // Stages 1-3: the two rows left for the final adder.
  function automatic void reduce_ref(input logic [7:0] a, input logic [7:0] b,
                                     output logic [14:0] x, output logic [14:0] y,
                                     inout ref_stats_t st);
    int unsigned pp[], p1[], p2[];
    int unsigned v1, v2, q7, p7, l1, l2;
    int offs8[], offs4[];
    pp = new[8];
    offs8 = new[8];
    offs4 = '{0, 2, 4, 6};
    for (int i = 0; i < 8; i++) begin
      pp[i] = b[i] ? (int'(a) << i) : 0;
      offs8[i] = i;
    end
    atc_ref(pp, offs8, 8, p1, v1, l1);
    atc_ref(p1, offs4, 9, p2, v2, l2);
    q7 = p2[0] & p2[1] & 32'h7F0;
    p7 = p2[0] | p2[1];
    st.atc_loss = l1 + l2;
    st.or_loss  = (v1 & v2 & 32'h7F0);
    x = '0;
    y = '0;
    for (int k = 0; k < 15; k++) begin
      int s;
      if (k >= 4 && k <= 10)
        s = int'(p7[k]) + int'(q7[k]) + int'(((v1 | v2) >> k) & 1);
      else
        s = int'(p7[k]) + int'(v1[k]) + int'(v2[k]);
      x[k] = s[0];
      if (k < 14) y[k+1] = s[1];
      else if (s[1]) $fatal(1, "column 14 produced a carry");
    end
  endfunction

  // Stage 4: truncated OR part, carry-maskable part, accurate part.
  function automatic logic [15:0] cpa_ref(input logic [14:0] x, input logic [14:0] y,
                                          input logic [6:0] mask, inout ref_stats_t st);
    logic [15:0] z;
    logic        c;
    int unsigned hi;
    logic [4:0]  both;
    z = '0;
    z[1:0] = x[1:0];
    for (int k = 2; k < 5; k++) z[k] = x[k] | y[k];
    both = x[4:0] & y[4:0];
    st.trunc_loss = int'(both) << 1;
    st.cma_loss = 0;
    c = 1'b0;
    for (int i = 0; i < 7; i++) begin
      logic xi, yi;
      xi = x[5+i];
      yi = y[5+i];
      if (mask[i]) begin
        z[5+i] = xi ^ yi ^ c;
        c = (xi & yi) | (c & (xi ^ yi));
      end else begin
        z[5+i] = (xi | yi) ^ c;
        if (xi & yi) st.cma_loss += (1 << (5+i+1));
        c = (xi | yi) & c;
      end
    end
    st.cma_carry = c;
    hi = int'(x[14:12]) + int'(y[14:12]) + int'(c);
    z[15:12] = hi[3:0];
    return z;
  endfunction

  function automatic logic [15:0] mult_ref(input logic [7:0] a, input logic [7:0] b,
                                           input logic [6:0] mask, inout ref_stats_t st);
    logic [14:0] x, y;
    reduce_ref(a, b, x, y, st);
    return cpa_ref(x, y, mask, st);
  endfunction

endpackage
