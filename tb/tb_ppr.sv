// tb_ppr: checks the three reduction stages of the 8x8 multiplier for
// every operand pair against a column-by-column reference model. The two
// output rows must match the model, add up to no more than a * b, and
// both approximations (OR of recovery vectors inside the compressors,
// OR of V1 and V2 in Stage 2) must be seen losing value at least once.
module tb_ppr;
  import acm_ref_pkg::*;
  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  logic [14:0] sum_row, carry_row;
  int checks = 0, failures = 0;
  int n_atc_loss = 0, n_or_loss = 0, n_exact = 0;

  ppr dut (.pp(pp), .sum_row(sum_row), .carry_row(carry_row));

  always_comb for (int i = 0; i < 8; i++) pp[i] = a & {8{b[i]}};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        logic [14:0] ex, ey;
        ref_stats_t st;
        int total;
        a = 8'(i);
        b = 8'(j);
        #1;
        st = '{default: 0};
        reduce_ref(a, b, ex, ey, st);
        total = int'(sum_row) + int'(carry_row);
        checks++;
        if (sum_row !== ex || carry_row !== ey) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d rows %h %h exp %h %h", i, j, sum_row, carry_row, ex, ey);
        end
        checks++;
        if (total > i * j || total != i * j - int'(st.atc_loss) - int'(st.or_loss)) failures++;
        checks++;
        if (carry_row[1:0] !== 2'b00) failures++;
        if (st.atc_loss > 0) n_atc_loss++;
        if (st.or_loss > 0) n_or_loss++;
        if (total == i * j) n_exact++;
      end
    end
    $display("atc_loss=%0d or_loss=%0d exact=%0d of 65536", n_atc_loss, n_or_loss, n_exact);
    checks++;
    if (n_atc_loss == 0 || n_or_loss == 0 || n_exact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
