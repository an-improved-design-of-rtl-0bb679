// tb_icac: exhaustive check of the incomplete adder cell against its
// truth table (p = a | b, q = a & b) and the identity a + b = p + q.
module tb_icac;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // Expected {q, p} for inputs {a, b} = 00, 01, 10, 11.
  localparam logic [1:0] EXP_QP [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  icac dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({q, p} !== EXP_QP[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b: q=%0b p=%0b", a, b, q, p);
      end
      checks++;
      if (int'(a) + int'(b) != int'(p) + int'(q)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
