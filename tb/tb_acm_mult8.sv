// tb_acm_mult8: end-to-end test of the 8x8 accuracy-controllable
// approximate multiplier at its default (and only) size. Every operand
// pair is run at each of the eight thermometer mask settings u = 0..7
// (upper u CMA bits accurate), and a random sample at arbitrary masks.
// Each result is compared with an independent reference model and must
// not exceed a * b; for a fixed operand pair the result must not drop
// when u grows. The test counts how often each approximation mechanism
// acts (compressor OR loss, Stage 2 OR loss, truncation loss, masked
// carry, carry into the accurate part) and fails if one never does.
// It prints the mean error per setting and the results for four example
// operand pairs.
module tb_acm_mult8;
  import acm_ref_pkg::*;
  logic [7:0]  a, b;
  logic [6:0]  mask;
  logic [15:0] z;
  int checks = 0, failures = 0;
  int n_atc = 0, n_or = 0, n_trunc = 0, n_masked = 0, n_carry = 0, n_exact = 0;
  longint err_sum[8];

  acm_mult8 dut (.a(a), .b(b), .mask(mask), .z(z));

  function automatic logic [6:0] thermo(input int u);
    return 7'(((1 << u) - 1) << (7 - u));
  endfunction

  task automatic run_one(input int i, input int j, input logic [6:0] m, output logic [15:0] res);
    ref_stats_t st;
    logic [15:0] ez;
    a = 8'(i);
    b = 8'(j);
    mask = m;
    #1;
    st = '{default: 0};
    ez = mult_ref(a, b, m, st);
    res = z;
    checks++;
    if (z !== ez) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d mask=%b z=%0d exp %0d", i, j, m, z, ez);
    end
    checks++;
    if (int'(z) > i * j) failures++;
    if (st.atc_loss > 0) n_atc++;
    if (st.or_loss > 0) n_or++;
    if (st.trunc_loss > 0) n_trunc++;
    if (st.cma_loss > 0) n_masked++;
    if (st.cma_carry) n_carry++;
    if (int'(z) == i * j) n_exact++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r, prev;
    for (int u = 0; u < 8; u++) err_sum[u] = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int u = 0; u < 8; u++) begin
          run_one(i, j, thermo(u), r);
          err_sum[u] += longint'(i * j) - longint'(r);
          if (u > 0) begin
            checks++;
            if (r < prev) failures++;
          end
          prev = r;
        end
      end
    end
    for (int n = 0; n < 20000; n++) run_one(int'($urandom_range(255)), int'($urandom_range(255)),
                                            7'($urandom), r);
    // Mask at full accuracy, one example pair worked out by hand:
    // 255 x 255 = 65025; the result must stay below it.
    run_one(255, 255, 7'h7F, r);
    $display("255x255 at u=7: %0d", r);
    for (int u = 0; u < 8; u++)
      $display("u=%0d mean error %0.2f", u, real'(err_sum[u]) / 65536.0);
    for (int u = 1; u < 8; u++) begin
      checks++;
      if (err_sum[u] > err_sum[u-1]) failures++;
    end
    // Example operand pairs.
    begin
      automatic int ea[4] = '{45, 61, 109, 47};
      automatic int eb[4] = '{35, 43, 47, 59};
      for (int k = 0; k < 4; k++) begin
        logic [15:0] r0, r7;
        run_one(ea[k], eb[k], 7'h00, r0);
        run_one(ea[k], eb[k], 7'h7F, r7);
        $display("%0d x %0d = %0d: u=0 -> %0d, u=7 -> %0d", ea[k], eb[k], ea[k] * eb[k], r0, r7);
      end
    end
    $display("mechanisms: atc_loss=%0d or_loss=%0d trunc_loss=%0d masked_carry=%0d carry_into_accurate=%0d exact=%0d",
             n_atc, n_or, n_trunc, n_masked, n_carry, n_exact);
    checks++;
    if (n_atc == 0 || n_or == 0 || n_trunc == 0 || n_masked == 0 || n_carry == 0 || n_exact == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
