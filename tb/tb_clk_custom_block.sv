// tb_clk_custom_block: runs the clock custom instruction with the ring
// oscillator model attached: for several taps it issues RUN and MEASURE,
// waits for STATUS to report the measurement done, READs the count and checks
// it against 1.2 us divided by the model's period; then STOP must hold the
// clock at 0 and a new measurement must read 0.
module tb_clk_custom_block;
  import jpeg_pkg::*;

  logic clk = 1'b0, reset, clk_en;
  ci_req_t req;
  logic [31:0] result;
  logic gen_run, int_clk;
  logic [18:0] gen_s, gen_a;
  logic [2:0] gen_tap;
  int checks = 0, failures = 0;

  always #15ns clk = ~clk;

  clk_custom_block dut (.clk(clk), .reset(reset), .clk_en(clk_en), .req(req), .result(result),
    .gen_run(gen_run), .gen_s(gen_s), .gen_a(gen_a), .gen_tap(gen_tap), .int_clk(int_clk));
  ring_clock_gen u_ring (.run(gen_run), .s(gen_s), .a(gen_a), .tap(gen_tap), .clk_out(int_clk));

  initial begin
    #500us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input clk_prefix_e p, input logic [31:0] a, input logic [31:0] b,
                    output logic [31:0] r);
    @(negedge clk);
    req.start = 1'b1; req.prefix = p; req.dataa = a; req.datab = b;
    @(negedge clk);
    req.start = 1'b0;
    @(negedge clk);
    r = result;
  endtask

  task automatic measure_count(output int n);
    logic [31:0] r;
    ci(CPFX_MEASURE, 0, 0, r);
    do ci(CPFX_STATUS, 0, 0, r); while (!r[1]);
    repeat (3) @(negedge clk);
    ci(CPFX_READ, 0, 0, r);
    n = int'(r);
  endtask

  initial begin
    logic [31:0] r;
    int n;
    real want;
    reset = 1'b1; clk_en = 1'b1; req = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int k = 0; k < 8; k += 7) begin
      ci(CPFX_STOP, 0, 0, r);
      ci(CPFX_RUN, {10'd0, 3'(k), 19'h7FFFF}, 32'd0, r);
      measure_count(n);
      want = 1200.0 / (2.0 * (2.493 + (k + 1) * 0.545));
      checks++;
      if ($itor(n) < want - 2.0 || $itor(n) > want + 2.0) begin
        failures++;
        $display("FAIL tap %0d count %0d want %f", k, n, want);
      end else $display("tap %0d: count %0d in 1.2 us", k, n);
    end
    ci(CPFX_STOP, 0, 0, r);
    ci(CPFX_STATUS, 0, 0, r);
    checks++;
    if (r[0] || gen_run) begin failures++; $display("FAIL STOP did not stop"); end
    repeat (5) @(negedge clk);
    checks++;
    if (int_clk !== 1'b0) begin failures++; $display("FAIL clock not held at 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
