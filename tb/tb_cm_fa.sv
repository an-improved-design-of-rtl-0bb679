// tb_cm_fa: exhaustive check of the carry-maskable full adder. With
// mask_x = 1 it must add exactly; with mask_x = 0 the cell generates no
// carry: s = (x | y) ^ cin and cout = (x | y) & cin.
module tb_cm_fa;
  logic mask_x, x, y, cin, s, cout;
  int checks = 0, failures = 0;

  cm_fa dut (.mask_x(mask_x), .x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic es, ec;
      {mask_x, x, y, cin} = 4'(i);
      #1;
      if (mask_x) {ec, es} = 2'(int'(x) + int'(y) + int'(cin));
      else begin
        es = (x | y) ^ cin;
        ec = (x | y) & cin;
      end
      checks++;
      if (s !== es || cout !== ec) begin
        failures++;
        $display("FAIL m=%0b x=%0b y=%0b cin=%0b: s=%0b cout=%0b", mask_x, x, y, cin, s, cout);
      end
      // Internal nodes at x=1, y=0, cin=1, mask_x=1: w1 = 1, w2 = 0.
      if (mask_x && x && !y && cin) begin
        checks++;
        if (dut.w1 !== 1'b1 || dut.w2 !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
