// tb_pp_gen: checks the 8x8 partial product generator: every bit must be
// a[j] & b[i], and the rows weighted by 2^i must add up to a * b.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int sum;
      a = N'($urandom);
      b = N'($urandom);
      #1;
      sum = 0;
      for (int i = 0; i < N; i++) begin
        sum += int'(pp[i]) << i;
        for (int j = 0; j < N; j++) begin
          checks++;
          if (pp[i][j] !== (a[j] & b[i])) failures++;
        end
      end
      checks++;
      if (sum != int'(a) * int'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
