// tb_scalable_cpa: checks the three-part final adder on random rows and
// masks against a reference model, and checks that with all mask bits
// set and no overlapping bits in the truncated part the result is the
// exact sum of the two rows.
module tb_scalable_cpa;
  import acm_ref_pkg::*;
  logic [14:0] x, y;
  logic [6:0]  mask;
  logic [15:0] z;
  int checks = 0, failures = 0;
  int n_carry_in_acc = 0, n_masked_loss = 0;

  scalable_cpa dut (.sum_row(x), .carry_row(y), .mask(mask), .z(z));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50000; n++) begin
      ref_stats_t st;
      logic [15:0] ez;
      x = 15'($urandom);
      y = 15'($urandom) & 15'h7FFC;
      mask = (n % 4 == 0) ? 7'h7F : 7'($urandom);
      #1;
      st = '{default: 0};
      ez = cpa_ref(x, y, mask, st);
      checks++;
      if (z !== ez) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h m=%b z=%h exp %h", x, y, mask, z, ez);
      end
      if (st.cma_carry) n_carry_in_acc++;
      if (st.cma_loss > 0) n_masked_loss++;
      if (mask == 7'h7F && (x[4:0] & y[4:0]) == 0) begin
        checks++;
        if (int'(z) != int'(x) + int'(y)) failures++;
      end
    end
    $display("carry_into_accurate=%0d masked_loss=%0d", n_carry_in_acc, n_masked_loss);
    checks++;
    if (n_carry_in_acc == 0 || n_masked_loss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
