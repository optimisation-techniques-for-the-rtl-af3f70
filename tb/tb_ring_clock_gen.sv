// tb_ring_clock_gen: measures the period of the ring-oscillator model for
// every tap and compares it with 2 x (2493 ps + (tap+1) x 545 ps), which
// puts tap 0 at the 6.076 ns and tap 7 at about the 13.704 ns reported for 1
// and 8 multiplexers in cascade. Checks that run = 0 holds the clock at 0 and
// that a mux whose select is 0 stops the ring at its a input.
module tb_ring_clock_gen;
  logic run;
  logic [18:0] s, a;
  logic [2:0] tap;
  logic clk_out;
  int checks = 0, failures = 0;

  ring_clock_gen dut (.run(run), .s(s), .a(a), .tap(tap), .clk_out(clk_out));

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t1, t2, p, want;
    int edges;
    run = 1'b0; s = '1; a = '0; tap = '0;
    #50ns;
    for (int k = 0; k < 8; k++) begin
      run = 1'b0;
      #50ns;
      tap = 3'(k);
      run = 1'b1;
      #100ns;
      @(posedge clk_out) t1 = $realtime;
      @(posedge clk_out) t2 = $realtime;
      p = t2 - t1;
      want = 2.0 * (2.493 + (k + 1) * 0.545);
      checks++;
      if (p < want - 0.002 || p > want + 0.002) begin
        failures++;
        $display("FAIL tap %0d period %f ns want %f", k, p, want);
      end else $display("tap %0d: %0d mux in cascade, period %f ns", k, k + 1, p);
    end
    // run = 0 stops the clock at 0
    run = 1'b0;
    #30ns;
    edges = 0;
    fork
      begin repeat (100) begin @(clk_out); edges++; end end
      #200ns;
    join_any
    disable fork;
    checks++;
    if (edges != 0 || clk_out !== 1'b0) begin failures++; $display("FAIL clock moved while stopped"); end
    // a mux with select 0 passes its constant input: the ring stops
    tap = 3'd3; s = '1; s[10] = 1'b0; a[10] = 1'b1;
    run = 1'b1;
    #200ns;
    edges = 0;
    fork
      begin repeat (100) begin @(clk_out); edges++; end end
      #200ns;
    join_any
    disable fork;
    checks++;
    if (edges != 0 || clk_out !== 1'b1) begin failures++; $display("FAIL ring not held by a[10]"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
