// tb_atc: checks the approximate tree compressor in both sizes the
// multiplier uses, ATC-8 (8 rows of 8 bits, offset 1) and ATC-4 (4 rows
// of 9 bits, offset 2), on random rows. Each p[j] must be the OR of its
// pair of rows at their positions, v the OR of the pairs' ANDs, and
// sum(p) + v must never exceed the weighted sum of the rows and equal it
// when no two recovery vectors overlap.
module tb_atc;
  int checks = 0, failures = 0;
  int exact_cases = 0, lossy_cases = 0;

  logic [7:0][7:0] r8;
  logic [3:0][8:0] p8;
  logic [14:0]     v8;
  logic [3:0][8:0] r4;
  logic [1:0][10:0] p4;
  logic [14:0]     v4;

  atc #(.N(8), .W(8), .S(1)) dut8 (.rows(r8), .p(p8), .v(v8));
  atc #(.N(4), .W(9), .S(2)) dut4 (.rows(r4), .p(p4), .v(v4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Generic check of one compressor given absolute-position rows.
  task automatic check_atc(input int n, input int s, input longint rows_abs[],
                           input longint p_abs[], input longint v, input string tag);
    longint sum_in, sum_out, qsum, vexp;
    sum_in = 0; sum_out = 0; qsum = 0; vexp = 0;
    for (int k = 0; k < n; k++) sum_in += rows_abs[k];
    for (int j = 0; j < n/2; j++) begin
      longint q;
      q = rows_abs[2*j] & rows_abs[2*j+1];
      check(p_abs[j] == (rows_abs[2*j] | rows_abs[2*j+1]), {tag, " p"});
      vexp |= q;
      qsum += q;
      sum_out += p_abs[j];
    end
    check(v == vexp, {tag, " v"});
    check(sum_out + v <= sum_in, {tag, " bound"});
    check((sum_out + qsum) == sum_in, {tag, " p+q identity"});
    if (vexp == qsum) begin
      exact_cases++;
      check(sum_out + v == sum_in, {tag, " exact"});
    end else lossy_cases++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ra[], pa[];
    for (int n = 0; n < 3000; n++) begin
      // Sparse inputs now and then, so that both exact and lossy cases occur.
      for (int k = 0; k < 8; k++) r8[k] = 8'($urandom) & ((n % 3 == 0) ? 8'($urandom) : 8'hFF);
      for (int k = 0; k < 4; k++) r4[k] = 9'($urandom) & ((n % 3 == 0) ? 9'($urandom) : 9'h1FF);
      #1;
      ra = new[8]; pa = new[4];
      for (int k = 0; k < 8; k++) ra[k] = longint'(r8[k]) << k;
      for (int j = 0; j < 4; j++) pa[j] = longint'(p8[j]) << (2*j);
      check_atc(8, 1, ra, pa, longint'(v8), "atc8");
      ra = new[4]; pa = new[2];
      for (int k = 0; k < 4; k++) ra[k] = longint'(r4[k]) << (2*k);
      for (int j = 0; j < 2; j++) pa[j] = longint'(p4[j]) << (4*j);
      check_atc(4, 2, ra, pa, longint'(v4), "atc4");
    end
    check(exact_cases > 0 && lossy_cases > 0, "coverage of exact and lossy cases");
    $display("exact=%0d lossy=%0d", exact_cases, lossy_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
