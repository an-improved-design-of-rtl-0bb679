// tb_icac_row: checks an 8-bit row of incomplete adder cells on the
// worked example A = 01011111, B = 00110110 (P = 01111111,
// Q = 00010110, A + B = 10010101) and on random words, where
// P + Q must equal A + B and P must never exceed A + B.
module tb_icac_row;
  localparam int W = 8;
  logic [W-1:0] a, b, p, q;
  int checks = 0, failures = 0;

  icac_row #(.W(W)) dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b p=%b q=%b", what, a, b, p, q);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'b01011111;
    b = 8'b00110110;
    #1;
    check(p == 8'b01111111, "example P");
    check(q == 8'b00010110, "example Q");
    check(int'(p) + int'(q) == 'b10010101, "example sum");
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      #1;
      check(int'(p) + int'(q) == int'(a) + int'(b), "P+Q");
      check(int'(p) <= int'(a) + int'(b), "P bound");
      for (int i = 0; i < W; i++) begin
        check(p[i] == (a[i] | b[i]) && q[i] == (a[i] & b[i]), "bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
