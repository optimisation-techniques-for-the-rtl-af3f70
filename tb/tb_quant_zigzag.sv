// tb_quant_zigzag: fills the coefficient memory with values chosen so that
// F / (4Q) lies within 0.25 of an integer n (so the rounded result is n
// exactly), runs the quantizer and checks every output write: value n at the
// zig-zag position of its raster index (taken from the standard's listing),
// the DC term as the difference to the previous block, clearing of the DC
// predictor, reprogramming of scale entries, and 193 cycles from start to
// done (64 x 3 + 1).
module tb_quant_zigzag;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst, en, start, clr_dc, done;
  logic [5:0] coef_raddr;
  logic signed [15:0] coef_rdata;
  logic tb_we;
  logic [5:0] tb_waddr;
  logic [15:0] tb_wdata;
  logic scale_we;
  logic [5:0] scale_waddr;
  logic [16:0] scale_wdata;
  logic out_we;
  logic [5:0] out_waddr;
  logic signed [15:0] out_wdata;
  int checks = 0, failures = 0, cycles = 0;
  int got [64];
  int q_tab [64];
  int prev_dc;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  ram_2c #(.ADDR_W(6), .LANE_W(16), .LANES(1)) u_coef (
    .wclk(clk), .we(tb_we), .waddr(tb_waddr), .wdata(tb_wdata),
    .rclk(clk), .raddr(coef_raddr), .rdata(coef_rdata));

  quant_zigzag dut (.clk(clk), .rst(rst), .en(en), .start(start), .clr_dc(clr_dc),
    .done(done), .coef_raddr(coef_raddr), .coef_rdata(coef_rdata),
    .cfg_clk(clk), .cfg_rst(rst), .scale_we(scale_we), .scale_waddr(scale_waddr),
    .scale_wdata(scale_wdata), .out_we(out_we), .out_waddr(out_waddr), .out_wdata(out_wdata));

  always @(posedge clk) if (out_we) got[out_waddr] = int'(out_wdata);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block();
    int n [64];
    int f, t0, lat, want, d;
    for (int k = 0; k < 64; k++) begin
      n[k] = int'($urandom_range(20)) - 10;
      if (4 * q_tab[k] * 12 > 4000) n[k] = int'($urandom_range(4)) - 2;
      d = int'($urandom_range(2 * q_tab[k])) - q_tab[k];
      f = 4 * q_tab[k] * n[k] + d;
      @(negedge clk);
      tb_we = 1'b1; tb_waddr = 6'(k); tb_wdata = 16'(f);
    end
    @(negedge clk) tb_we = 1'b0;
    start = 1'b1;
    t0 = cycles;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    lat = cycles - t0;
    checks++;
    if (lat != 193) begin failures++; $display("FAIL latency %0d", lat); end
    for (int p = 0; p < 64; p++) begin
      want = (p == 0) ? n[0] - prev_dc : n[ZZ_ORDER[p]];
      checks++;
      if (got[p] != want) begin
        failures++;
        $display("FAIL scan %0d got %0d want %0d", p, got[p], want);
      end
    end
    prev_dc = n[0];
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; start = 1'b0; clr_dc = 1'b0; tb_we = 1'b0;
    tb_waddr = '0; tb_wdata = '0; scale_we = 1'b0; scale_waddr = '0; scale_wdata = '0;
    foreach (q_tab[k]) q_tab[k] = int'(QTAB_LUM[k]);
    prev_dc = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0; en = 1'b1;
    run_block();
    run_block();
    run_block();
    // clearing the predictor
    @(negedge clk) clr_dc = 1'b1;
    @(negedge clk) clr_dc = 1'b0;
    prev_dc = 0;
    run_block();
    // reprogram a few entries: Q = 1, 2, 3, 200
    for (int j = 0; j < 8; j++) begin
      int k, q;
      k = int'($urandom_range(63));
      q = (j % 4 == 0) ? 1 : (j % 4 == 1) ? 2 : (j % 4 == 2) ? 3 : 200;
      q_tab[k] = q;
      @(negedge clk);
      scale_we = 1'b1; scale_waddr = 6'(k); scale_wdata = 17'((65536 + q / 2) / q);
    end
    @(negedge clk) scale_we = 1'b0;
    run_block();
    run_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
