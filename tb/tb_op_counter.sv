// tb_op_counter: starts the counter with several mod values and checks that
// run stays high for exactly mod_value cycles, that done pulses once as it
// falls, that count steps 0, 1, 2, ... and that a start while running
// restarts the count.
module tb_op_counter;
  logic clk = 1'b0, rst, start, run, done;
  logic [15:0] mod_value, count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  op_counter #(.CNT_W(16)) dut (.clk(clk), .rst(rst), .start(start),
    .mod_value(mod_value), .run(run), .done(done), .count(count));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_with(input int m);
    int high, dones, expect_cnt;
    bit cnt_ok;
    mod_value = 16'(m);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    high = 0; dones = 0; expect_cnt = 0; cnt_ok = 1'b1;
    while (run) begin
      if (int'(count) != expect_cnt) cnt_ok = 1'b0;
      expect_cnt++;
      high++;
      @(negedge clk);
      if (done) dones++;
    end
    repeat (3) begin @(negedge clk); if (done) dones++; end
    checks++;
    if (high != m) begin failures++; $display("FAIL mod %0d ran %0d", m, high); end
    checks++;
    if (dones != 1) begin failures++; $display("FAIL mod %0d done pulses %0d", m, dones); end
    checks++;
    if (!cnt_ok) begin failures++; $display("FAIL mod %0d count sequence", m); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; mod_value = 16'd10;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_with(1);
    run_with(2);
    run_with(7);
    run_with(594);
    for (int i = 0; i < 10; i++) run_with(int'($urandom_range(300)) + 1);
    // restart while running
    mod_value = 16'd20;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (10) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (count != 16'd0 || !run) begin failures++; $display("FAIL restart"); end
    repeat (19) @(negedge clk);
    checks++;
    if (!run) begin failures++; $display("FAIL restart ended early"); end
    @(negedge clk);
    checks++;
    if (run) begin failures++; $display("FAIL restart ended late"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
