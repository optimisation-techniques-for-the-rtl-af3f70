// tb_dct_2d: runs the row-column DCT on random and extreme 8x8 blocks held in
// a two-cycle-read sample memory, collects the 64 coefficient writes and
// compares them with the 2D DCT formula in real arithmetic (tolerance 2,
// the effect of the intermediate rounding). Also checks that done comes
// 401 cycles after start (16 vectors x 25 cycles + 1) and that en low stops
// a block in progress.
module tb_dct_2d;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst, en, start, done;
  logic [3:0] in_raddr;
  logic [31:0] in_rdata;
  logic coef_we;
  logic [5:0] coef_waddr;
  logic signed [15:0] coef_wdata;
  logic [3:0] ld_we;
  logic [3:0] ld_addr;
  logic [31:0] ld_data;
  int checks = 0, failures = 0, cycles = 0;
  int got [64];
  int nwrites;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  ram_2c #(.ADDR_W(4), .LANE_W(8), .LANES(4)) u_mem (
    .wclk(clk), .we(ld_we), .waddr(ld_addr), .wdata(ld_data),
    .rclk(clk), .raddr(in_raddr), .rdata(in_rdata));

  dct_2d dut (.clk(clk), .rst(rst), .en(en), .start(start), .done(done),
    .in_raddr(in_raddr), .in_rdata(in_rdata),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata));

  always @(posedge clk) if (coef_we) begin
    got[coef_waddr] = int'(coef_wdata);
    nwrites++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int s [64]);
    int t0, lat;
    real r;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      ld_we = 4'hF; ld_addr = 4'(w);
      ld_data = {8'(s[4*w+3]), 8'(s[4*w+2]), 8'(s[4*w+1]), 8'(s[4*w])};
    end
    @(negedge clk) ld_we = '0;
    nwrites = 0;
    start = 1'b1;
    t0 = cycles;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    lat = cycles - t0;
    checks++;
    if (lat != 401) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (nwrites != 64) begin failures++; $display("FAIL %0d writes", nwrites); end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        r = dct2(s, u, v);
        checks++;
        if (fabs($itor(got[8*u+v]) - r) > 2.0) begin
          failures++;
          $display("FAIL F(%0d,%0d) got %0d want %f", u, v, got[8*u+v], r);
        end
      end
  endtask

  initial begin
    int s [64];
    rst = 1'b1; en = 1'b0; start = 1'b0; ld_we = '0; ld_addr = '0; ld_data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0; en = 1'b1;
    foreach (s[i]) s[i] = 127;
    run_block(s);
    foreach (s[i]) s[i] = -128;
    run_block(s);
    foreach (s[i]) s[i] = ((i / 8 + i % 8) % 2 == 0) ? 127 : -128;
    run_block(s);
    for (int b = 0; b < 5; b++) begin
      foreach (s[i]) s[i] = int'($urandom_range(255)) - 128;
      run_block(s);
    end
    // en low aborts a block; a fresh start afterwards still works
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (50) @(negedge clk);
    en = 1'b0;
    @(negedge clk) en = 1'b1;
    repeat (450) @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL engine kept running after en low"); end
    foreach (s[i]) s[i] = int'($urandom_range(255)) - 128;
    run_block(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
