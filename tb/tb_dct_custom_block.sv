// tb_dct_custom_block: drives the DCT custom instruction as the Nios CPU
// would, with a 30 ns CPU clock and a phase-aligned 15 ns memory clock.
// For several blocks it loads 64 samples, starts, polls STATUS, reads the 32
// coefficient pairs and compares them with a reference built from the DCT
// formula, real division by the quantization table and the standard zig-zag
// order (tolerance one step for the fixed-point rounding, two for the DC
// difference). It also checks the cycle count of a block, that LOAD and READ
// are locked out while busy, that a mod value too small stops the engine
// before it writes results, SET_Q, and CLR_DC.
module tb_dct_custom_block;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk, clk_mem, reset, clk_en;
  ci_req_t req;
  logic [31:0] result;
  int checks = 0, failures = 0, cpu_cycles = 0;
  int q_tab [64];
  int prev_dc_ref;

  always begin
    clk = 1'b1; clk_mem = 1'b1;
    #7.5 clk_mem = 1'b0;
    #7.5 clk = 1'b0; clk_mem = 1'b1;
    #7.5 clk_mem = 1'b0;
    #7.5;
  end
  always @(posedge clk) cpu_cycles++;

  dct_custom_block dut (.clk(clk), .clk_mem(clk_mem), .reset(reset), .clk_en(clk_en),
    .req(req), .result(result));

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input dct_prefix_e p, input logic [31:0] a, input logic [31:0] b,
                    output logic [31:0] r);
    @(negedge clk);
    req.start = 1'b1; req.prefix = p; req.dataa = a; req.datab = b;
    @(negedge clk);
    req.start = 1'b0;
    @(negedge clk);
    r = result;
  endtask

  task automatic load(input int s [64]);
    logic [31:0] r;
    for (int w = 0; w < 16; w++)
      ci(DPFX_LOAD, 32'(w), {8'(s[4*w+3]), 8'(s[4*w+2]), 8'(s[4*w+1]), 8'(s[4*w])}, r);
  endtask

  task automatic start_and_wait(output int took);
    logic [31:0] r;
    int t0;
    ci(DPFX_START, 0, 0, r);
    t0 = cpu_cycles;
    do ci(DPFX_STATUS, 0, 0, r); while (r[31]);
    took = cpu_cycles - t0;
  endtask

  task automatic read_all(output int q [64]);
    logic [31:0] r;
    for (int p = 0; p < 32; p++) begin
      ci(DPFX_READ, 32'(p), 0, r);
      q[2*p]   = int'($signed(r[15:0]));
      q[2*p+1] = int'($signed(r[31:16]));
    end
  endtask

  task automatic check_block(input int s [64], input int q [64]);
    int want, tol, bad;
    real f;
    bad = 0;
    for (int p = 0; p < 64; p++) begin
      int k;
      k = ZZ_ORDER[p];
      f = dct2(s, k / 8, k % 8);
      want = rnd(f / (4.0 * q_tab[k]));
      tol = 1;
      if (p == 0) begin
        int q0;
        q0 = want;
        want = q0 - prev_dc_ref;
        prev_dc_ref = q0;
        tol = 2;
      end
      checks++;
      if (q[p] - want > tol || want - q[p] > tol) begin
        failures++;
        $display("FAIL scan %0d (raster %0d) got %0d want %0d", p, k, q[p], want);
      end
      if (q[p] != want) bad++;
    end
    checks++;
    if (bad > 4) begin failures++; $display("FAIL %0d inexact coefficients", bad); end
  endtask

  task automatic smooth_block(output int s [64]);
    int base, gx, gy;
    base = int'($urandom_range(160)) - 80;
    gx = int'($urandom_range(10)) - 5;
    gy = int'($urandom_range(10)) - 5;
    foreach (s[i]) begin
      s[i] = base + gx * (i % 8) + gy * (i / 8) + int'($urandom_range(16)) - 8;
      if (s[i] > 127) s[i] = 127;
      if (s[i] < -128) s[i] = -128;
    end
  endtask

  initial begin
    int s [64], s2 [64], q [64], q_prev [64];
    int took;
    logic [31:0] r;
    reset = 1'b1; clk_en = 1'b1; req = '0;
    foreach (q_tab[k]) q_tab[k] = int'(QTAB_LUM[k]);
    prev_dc_ref = 0;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);

    // ordinary blocks: smooth image-like content and full-range noise
    for (int b = 0; b < 4; b++) begin
      if (b < 3) smooth_block(s);
      else foreach (s[i]) s[i] = int'($urandom_range(255)) - 128;
      load(s);
      start_and_wait(took);
      read_all(q);
      check_block(s, q);
    end
    // one block takes 594 memory cycles = 297 CPU cycles; the START and
    // STATUS instructions add their own 3 cycles each around it
    checks++;
    if (took < 297 || took > 303) begin failures++; $display("FAIL block took %0d CPU cycles", took); end
    ci(DPFX_STATUS, 0, 0, r);
    checks++;
    if (r[15:0] != 16'd594) begin failures++; $display("FAIL counter stopped at %0d", r[15:0]); end

    // LOAD and READ are locked out while the block runs
    smooth_block(s);
    load(s);
    ci(DPFX_START, 0, 0, r);
    smooth_block(s2);
    ci(DPFX_LOAD, 32'd0, 32'hDEAD_BEEF, r);
    ci(DPFX_READ, 32'd0, 0, r);
    checks++;
    if (r != 32'd0) begin failures++; $display("FAIL READ while busy gave %h", r); end
    ci(DPFX_STATUS, 0, 0, r);
    checks++;
    if (!r[31]) begin failures++; $display("FAIL not busy after START"); end
    do ci(DPFX_STATUS, 0, 0, r); while (r[31]);
    read_all(q);
    check_block(s, q);
    q_prev = q;

    // a mod value shorter than the work stops the engine before any result
    ci(DPFX_SET_MOD, 0, 32'd300, r);
    foreach (s2[i]) s2[i] = int'($urandom_range(255)) - 128;
    load(s2);
    start_and_wait(took);
    read_all(q);
    checks++;
    if (q != q_prev) begin failures++; $display("FAIL truncated run changed the output"); end
    ci(DPFX_SET_MOD, 0, 32'd594, r);

    // new quantization entries and a cleared DC predictor
    for (int j = 0; j < 64; j += 5) begin
      q_tab[j] = 1 + j / 5;
      ci(DPFX_SET_Q, 32'(j), 32'((65536 + q_tab[j] / 2) / q_tab[j]), r);
    end
    ci(DPFX_CLR_DC, 0, 0, r);
    prev_dc_ref = 0;
    smooth_block(s);
    load(s);
    start_and_wait(took);
    read_all(q);
    check_block(s, q);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
