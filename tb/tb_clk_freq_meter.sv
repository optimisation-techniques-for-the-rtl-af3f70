// tb_clk_freq_meter: measures test clocks of known period with a 30 ns CPU
// clock and checks that the count equals 1.2 us / period within two cycles,
// that the count-enable window spans 40 CPU cycles, and that a new measure
// clears the old count.
module tb_clk_freq_meter;
  logic cpu_clk = 1'b0, rst, measure, meas_clk = 1'b0, done;
  logic [31:0] count_value;
  int checks = 0, failures = 0;
  realtime half = 3.038ns;
  int win_cycles;

  always #15ns cpu_clk = ~cpu_clk;
  always #(half) meas_clk = ~meas_clk;

  clk_freq_meter dut (.cpu_clk(cpu_clk), .rst(rst), .measure(measure), .meas_clk(meas_clk),
    .done(done), .count_value(count_value));

  always @(posedge cpu_clk) if (dut.window) win_cycles++;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic meas(input realtime period);
    real want;
    half = period / 2.0;
    #100ns;
    win_cycles = 0;
    @(negedge cpu_clk) measure = 1'b1;
    @(negedge cpu_clk) measure = 1'b0;
    while (!done) @(negedge cpu_clk);
    repeat (4) @(negedge cpu_clk);
    want = 1200.0 / (period / 1ns);
    checks++;
    if ($itor(count_value) < want - 2.0 || $itor(count_value) > want + 2.0) begin
      failures++;
      $display("FAIL period %f ns: count %0d want %f", period / 1ns, count_value, want);
    end
    checks++;
    if (win_cycles != 40) begin failures++; $display("FAIL window %0d cycles", win_cycles); end
  endtask

  initial begin
    rst = 1'b1; measure = 1'b0;
    repeat (3) @(negedge cpu_clk);
    rst = 1'b0;
    meas(6.076ns);
    meas(13.704ns);
    meas(10.0ns);
    meas(30.0ns);
    meas(7.3ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
