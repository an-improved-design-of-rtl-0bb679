// tb_cm_ha: exhaustive check of the carry-maskable half adder. With
// mask_x = 1 it must add exactly; with mask_x = 0 it must give
// s = x | y and cout = 0.
module tb_cm_ha;
  logic mask_x, x, y, s, cout;
  int checks = 0, failures = 0;

  cm_ha dut (.mask_x(mask_x), .x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic es, ec;
      {mask_x, x, y} = 3'(i);
      #1;
      if (mask_x) {ec, es} = 2'(int'(x) + int'(y));
      else begin
        es = x | y;
        ec = 1'b0;
      end
      checks++;
      if (s !== es || cout !== ec) begin
        failures++;
        $display("FAIL m=%0b x=%0b y=%0b: s=%0b cout=%0b", mask_x, x, y, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
