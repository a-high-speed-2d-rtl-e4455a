// tb_shift_121: checks the [1 2 1] shift kernel against a + 2b + c
// computed with integer arithmetic, on corner values and random pixels.
module tb_shift_121;
  logic [7:0] a, b, c;
  logic [9:0] y;
  int checks = 0, failures = 0;

  shift_121 #(.PIX_W(8)) dut (.a, .b, .c, .y);

  task automatic check(input int ia, ib, ic);
    int exp;
    a = 8'(ia); b = 8'(ib); c = 8'(ic);
    #1;
    exp = ia + 2 * ib + ic;
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL shift_121 %0d %0d %0d: got %0d want %0d", ia, ib, ic, y, exp);
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
    check(0, 0, 0);
    check(255, 255, 255);
    check(255, 0, 0);
    check(0, 255, 0);
    check(0, 0, 255);
    check(1, 128, 1);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
