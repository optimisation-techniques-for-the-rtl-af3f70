// tb_rle_encoder: runs the run-length coder over random sparse blocks (long
// zero runs, trailing zeros, a nonzero last coefficient, an all-zero block)
// with a randomly stalling receiver, and compares the symbol sequence with
// one computed in the testbench from the JPEG rules. Also counts how often
// ZRL and EOB occurred.
module tb_rle_encoder;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst, start, busy, done;
  logic [5:0] rd_addr;
  logic [15:0] rd_data;
  logic sym_valid, sym_ready;
  rle_sym_t sym;
  logic tb_we;
  logic [5:0] tb_waddr;
  logic [15:0] tb_wdata;
  int checks = 0, failures = 0, n_zrl = 0, n_eob = 0;
  rle_sym_t got [$];

  always #5 clk = ~clk;

  ram_2c #(.ADDR_W(6), .LANE_W(16), .LANES(1)) u_mem (
    .wclk(clk), .we(tb_we), .waddr(tb_waddr), .wdata(tb_wdata),
    .rclk(clk), .raddr(rd_addr), .rdata(rd_data));

  rle_encoder dut (.clk(clk), .rst(rst), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_data(rd_data), .sym_valid(sym_valid), .sym_ready(sym_ready),
    .sym(sym));

  always @(posedge clk) if (sym_valid && sym_ready) got.push_back(sym);
  always @(negedge clk) sym_ready = ($urandom_range(3) != 0);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rle_sym_t mk(input bit dc, input int run, input int v);
    int s;
    s = size_cat(v);
    return '{is_dc: dc, run: 4'(run), size: 4'(s), amp: 12'(v < 0 ? v - 1 : v)};
  endfunction

  task automatic run_block(input int c [64]);
    rle_sym_t want [$];
    int run;
    want.push_back(mk(1, 0, c[0]));
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (c[k] == 0) run++;
      else begin
        while (run > 15) begin want.push_back('{is_dc: 0, run: 15, size: 0, amp: 0}); run -= 16; end
        want.push_back(mk(0, run, c[k]));
        run = 0;
      end
    end
    if (run > 0) want.push_back('{is_dc: 0, run: 0, size: 0, amp: 0});
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      tb_we = 1'b1; tb_waddr = 6'(k); tb_wdata = 16'(c[k]);
    end
    @(negedge clk) tb_we = 1'b0;
    got.delete();
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (got.size() != want.size()) begin
      failures++;
      $display("FAIL %0d symbols, want %0d", got.size(), want.size());
    end else begin
      foreach (want[i]) begin
        checks++;
        if (got[i] != want[i]) begin failures++; $display("FAIL symbol %0d: %p want %p", i, got[i], want[i]); end
        if (!want[i].is_dc && want[i].size == 0) begin
          if (want[i].run == 15) n_zrl++; else n_eob++;
        end
      end
    end
  endtask

  initial begin
    int c [64];
    rst = 1'b1; start = 1'b0; tb_we = 1'b0; tb_waddr = '0; tb_wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (c[k]) c[k] = 0;
    run_block(c);                       // all zero: DC size 0 and EOB
    c[0] = -37; c[40] = 5; c[63] = -1;  // 39 zeros: two ZRLs; last nonzero
    run_block(c);
    foreach (c[k]) c[k] = 0;
    c[0] = 1000; c[17] = 1023; c[50] = -1023;
    run_block(c);
    for (int b = 0; b < 30; b++) begin
      foreach (c[k]) c[k] = ($urandom_range(5) == 0) ? int'($urandom_range(60)) - 30 : 0;
      if (b % 3 == 0) for (int k = 10; k < 45; k++) c[k] = 0;
      c[0] = int'($urandom_range(4000)) - 2000;
      run_block(c);
    end
    checks++;
    if (n_zrl == 0 || n_eob == 0) begin failures++; $display("FAIL ZRL %0d EOB %0d", n_zrl, n_eob); end
    $display("ZRL symbols %0d, EOB symbols %0d", n_zrl, n_eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
