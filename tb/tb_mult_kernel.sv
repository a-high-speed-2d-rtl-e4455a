// tb_mult_kernel: checks the multiplier kernel with the two coefficient
// sets the convolver uses, [1 2 1] and [2 4 2], against integer sums, and
// one unrelated set [3 5 7] to show the coefficients are honoured.
module tb_mult_kernel;
  logic [7:0]  a, b, c;
  logic [10:0] y121, y242, y357;
  logic [11:0] y357w;
  int checks = 0, failures = 0;

  mult_kernel #(.PIX_W(8), .COEF_W(3), .K0(1), .K1(2), .K2(1)) u121 (.a, .b, .c, .y(y121));
  mult_kernel #(.PIX_W(8), .COEF_W(3), .K0(2), .K1(4), .K2(2)) u242 (.a, .b, .c, .y(y242));
  mult_kernel #(.PIX_W(8), .COEF_W(4), .K0(3), .K1(5), .K2(7)) u357 (.a, .b, .c, .y(y357w));

  task automatic check(input int ia, ib, ic);
    a = 8'(ia); b = 8'(ib); c = 8'(ic);
    #1;
    checks += 3;
    if (int'(y121) != ia + 2 * ib + ic) begin
      failures++; $display("FAIL [1 2 1] %0d %0d %0d -> %0d", ia, ib, ic, y121);
    end
    if (int'(y242) != 2 * ia + 4 * ib + 2 * ic) begin
      failures++; $display("FAIL [2 4 2] %0d %0d %0d -> %0d", ia, ib, ic, y242);
    end
    if (int'(y357w) != 3 * ia + 5 * ib + 7 * ic) begin
      failures++; $display("FAIL [3 5 7] %0d %0d %0d -> %0d", ia, ib, ic, y357w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y357 = '0;
    check(0, 0, 0);
    check(255, 255, 255);
    check(255, 0, 0);
    check(0, 255, 0);
    check(0, 0, 255);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
