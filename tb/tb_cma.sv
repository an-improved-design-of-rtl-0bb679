// tb_cma: checks the 7-bit carry-maskable adder on random operands and
// masks against a bit-serial model, and on every operand pair for the
// two extreme settings: all mask bits set must give x + y, none set must
// give x | y with no carry out.
module tb_cma;
  localparam int K = 7;
  logic [K-1:0] x, y, mask, s;
  logic         cout;
  int checks = 0, failures = 0;

  cma #(.K(K)) dut (.x(x), .y(y), .mask(mask), .s(s), .cout(cout));

  function automatic logic [K:0] model(input logic [K-1:0] xx, yy, mm);
    logic [K:0] r;
    logic c;
    c = 1'b0;
    for (int i = 0; i < K; i++) begin
      if (mm[i]) begin
        r[i] = xx[i] ^ yy[i] ^ c;
        c = (xx[i] & yy[i]) | (c & (xx[i] ^ yy[i]));
      end else begin
        r[i] = (xx[i] | yy[i]) ^ c;
        c = (xx[i] | yy[i]) & c;
      end
    end
    r[K] = c;
    return r;
  endfunction

  task automatic check(input logic [K:0] exp, input string what);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%b y=%b mask=%b: got %b exp %b", what, x, y, mask, {cout, s}, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << K); i++) begin
      for (int j = 0; j < (1 << K); j++) begin
        x = K'(i);
        y = K'(j);
        mask = '1;
        #1;
        check((K+1)'(i + j), "accurate");
        mask = '0;
        #1;
        check({1'b0, x | y}, "or-mode");
      end
    end
    for (int n = 0; n < 20000; n++) begin
      x = K'($urandom);
      y = K'($urandom);
      mask = K'($urandom);
      #1;
      check(model(x, y, mask), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
