// tb_dct_butterfly: checks the add/subtract element against integer
// arithmetic on random and extreme operands.
module tb_dct_butterfly;
  localparam int W = 12;
  logic signed [W-1:0] x0, x1;
  logic signed [W:0]   sum, diff;
  int checks = 0, failures = 0;

  dct_butterfly #(.W(W)) dut (.x0(x0), .x1(x1), .sum(sum), .diff(diff));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b);
    x0 = W'(a); x1 = W'(b);
    #1;
    checks++;
    if (int'(sum) != a + b || int'(diff) != a - b) begin
      failures++;
      $display("FAIL %0d %0d -> %0d %0d", a, b, sum, diff);
    end
  endtask

  initial begin
    check(-2048, -2048);
    check(2047, -2048);
    check(-2048, 2047);
    check(2047, 2047);
    for (int i = 0; i < 500; i++)
      check(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
