// tb_jpeg_soc_top: end-to-end run of the whole design at its default sizes.
// A testbench "CPU" encodes a 32x16 synthetic image (eight 8x8 blocks): it
// loads each block into the DCT custom instruction, and while that block is
// being transformed it run-length/Huffman codes the previous block in the
// encoder custom instruction, the concurrent scheme the design is built for.
// Every block's quantized coefficients are checked against the DCT formula,
// real division and the standard zig-zag order; every bit stream is checked
// against the baseline JPEG coding of those coefficients. It also measures
// the internal clock at two taps and stops it. Each mechanism (concurrent
// encode during a DCT, busy lock-out, counter expiry, truncation by a short
// mod value, DC differential coding, ZRL, EOB, internal clock run, stop and
// measurement) is counted and must occur at least once.
module tb_jpeg_soc_top;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk, clk_mem, reset, clk_en;
  ci_req_t dct_req, enc_req, clk_req;
  logic [31:0] dct_result, enc_result, clk_result;
  logic int_clk;
  int checks = 0, failures = 0, cpu_cycles = 0;

  // mechanism counters
  int n_concurrent = 0, n_lockout = 0, n_expiry = 0, n_truncated = 0, n_dcdiff = 0;
  int n_zrl = 0, n_eob = 0, n_clk_run = 0, n_clk_stop = 0, n_measure = 0;

  always begin
    clk = 1'b1; clk_mem = 1'b1;
    #7.5 clk_mem = 1'b0;
    #7.5 clk = 1'b0; clk_mem = 1'b1;
    #7.5 clk_mem = 1'b0;
    #7.5;
  end
  always @(posedge clk) cpu_cycles++;

  jpeg_soc_top dut (.clk(clk), .clk_mem(clk_mem), .reset(reset), .clk_en(clk_en),
    .dct_req(dct_req), .dct_result(dct_result), .enc_req(enc_req), .enc_result(enc_result),
    .clk_req(clk_req), .clk_result(clk_result), .int_clk(int_clk));

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one custom instruction; the three blocks share the CPU, so one at a time
  task automatic ci(input int unit, input logic [10:0] p, input logic [31:0] a,
                    input logic [31:0] b, output logic [31:0] r);
    ci_req_t q;
    q = '{start: 1'b1, prefix: p, dataa: a, datab: b};
    @(negedge clk);
    if (unit == 0) dct_req = q; else if (unit == 1) enc_req = q; else clk_req = q;
    @(negedge clk);
    dct_req.start = 1'b0; enc_req.start = 1'b0; clk_req.start = 1'b0;
    @(negedge clk);
    r = (unit == 0) ? dct_result : (unit == 1) ? enc_result : clk_result;
  endtask

  function automatic bit dct_busy_now();
    return dut.u_dct.busy;
  endfunction

  int img [16][32];
  int prev_dc_ref = 0;

  task automatic block_samples(input int bx, output int s [64]);
    for (int i = 0; i < 64; i++) s[i] = img[i / 8][8 * bx + i % 8];
  endtask

  task automatic check_coeffs(input int s [64], input int q [64]);
    int want, tol, q0, qv;
    real f;
    for (int p = 0; p < 64; p++) begin
      int k;
      k = ZZ_ORDER[p];
      f = dct2(s, k / 8, k % 8);
      qv = int'(QTAB_LUM[k]);
      want = rnd(f / (4.0 * qv));
      tol = 1;
      if (p == 0) begin
        q0 = want;
        want = q0 - prev_dc_ref;
        prev_dc_ref = q0;
        tol = 2;
      end
      checks++;
      if (q[p] - want > tol || want - q[p] > tol) begin
        failures++;
        $display("FAIL coefficient scan %0d got %0d want %0d", p, q[p], want);
      end
    end
  endtask

  // encode one coefficient block in the encoder instruction and check it
  task automatic encode_and_check(input int q [64]);
    bit want [$], got [$];
    logic [31:0] r;
    int nbits, run;
    encode_block(q, want);
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (q[k] == 0) run++;
      else begin n_zrl += run / 16; run = 0; end
    end
    if (run > 0) n_eob++;
    for (int p = 0; p < 32; p++) ci(1, EPFX_LOAD, 32'(p), {16'(q[2*p+1]), 16'(q[2*p])}, r);
    ci(1, EPFX_START, 0, 0, r);
    if (dct_busy_now()) n_concurrent++;
    do ci(1, EPFX_STATUS, 0, 0, r); while (r[31]);
    nbits = int'(r[15:0]);
    for (int w = 0; w < (nbits + 31) / 32; w++) begin
      ci(1, EPFX_READ, 32'(w), 0, r);
      for (int i = 31; i >= 0; i--) got.push_back(r[i]);
    end
    while (want.size() % 32 != 0) want.push_back(1'b1);
    checks++;
    if (nbits != ((want.size() + 31) / 32) * 32 - (want.size() - nbits) || got != want) begin
      failures++;
      $display("FAIL bit stream of a block (%0d bits)", nbits);
    end
  endtask

  initial begin
    int s [64], q [64], q_prev [64];
    logic [31:0] r;
    int cnt;
    bit have_prev;
    real want;

    reset = 1'b1; clk_en = 1'b1; dct_req = '0; enc_req = '0; clk_req = '0;
    // image: smooth gradients and a bright disc, one block of fine
    // checkerboard (energy only at the highest frequency) and one flat block
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 32; x++) begin
        int v;
        v = 3 * x - 2 * y - 40;
        if ((x - 20) * (x - 20) + (y - 8) * (y - 8) < 30) v += 90;
        if (x >= 8 && x < 16 && y < 8) v = ((x + y) % 2 == 0) ? 40 : -40;
        if (x >= 24 && y >= 8) v = 17;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        img[y][x] = v;
      end
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);

    have_prev = 1'b0;
    for (int b = 0; b < 8; b++) begin
      block_samples(b % 4, s);
      if (b >= 4) for (int i = 0; i < 64; i++) s[i] = img[8 + i / 8][8 * (b % 4) + i % 8];
      for (int w = 0; w < 16; w++)
        ci(0, DPFX_LOAD, 32'(w), {8'(s[4*w+3]), 8'(s[4*w+2]), 8'(s[4*w+1]), 8'(s[4*w])}, r);
      ci(0, DPFX_START, 0, 0, r);
      // the CPU is free: code the previous block meanwhile
      ci(0, DPFX_READ, 0, 0, r);
      if (r == 0) n_lockout++;
      if (have_prev) encode_and_check(q_prev);
      do ci(0, DPFX_STATUS, 0, 0, r); while (r[31]);
      if (r[15:0] == 16'd594) n_expiry++;
      for (int p = 0; p < 32; p++) begin
        ci(0, DPFX_READ, 32'(p), 0, r);
        q[2*p]   = int'($signed(r[15:0]));
        q[2*p+1] = int'($signed(r[31:16]));
      end
      check_coeffs(s, q);
      if (b > 0 && q[0] != 0) n_dcdiff++;
      q_prev = q;
      have_prev = 1'b1;
    end
    encode_and_check(q_prev);
    // image blocks of this size rarely hold 16 zeros followed by a nonzero
    // value; a sparse block coded on its own exercises ZRL
    foreach (q[k]) q[k] = 0;
    q[0] = -5; q[1] = 2; q[40] = -3;
    encode_and_check(q);

    // a short mod value stops the DCT before any result is written
    ci(0, DPFX_SET_MOD, 0, 32'd100, r);
    ci(0, DPFX_START, 0, 0, r);
    do ci(0, DPFX_STATUS, 0, 0, r); while (r[31]);
    for (int p = 0; p < 32; p++) begin
      ci(0, DPFX_READ, 32'(p), 0, r);
      q[2*p]   = int'($signed(r[15:0]));
      q[2*p+1] = int'($signed(r[31:16]));
    end
    checks++;
    if (q != q_prev) begin failures++; $display("FAIL truncated run changed results"); end
    else n_truncated++;
    ci(0, DPFX_SET_MOD, 0, 32'd594, r);

    // internal clock: run at the shortest and longest tap, measure, stop
    for (int k = 0; k < 8; k += 7) begin
      ci(2, CPFX_STOP, 0, 0, r);
      ci(2, CPFX_RUN, {10'd0, 3'(k), 19'h7FFFF}, 0, r);
      n_clk_run++;
      ci(2, CPFX_MEASURE, 0, 0, r);
      do ci(2, CPFX_STATUS, 0, 0, r); while (!r[1]);
      repeat (3) @(negedge clk);
      ci(2, CPFX_READ, 0, 0, r);
      cnt = int'(r);
      want = 1200.0 / (2.0 * (2.493 + (k + 1) * 0.545));
      checks++;
      if ($itor(cnt) < want - 2.0 || $itor(cnt) > want + 2.0) begin
        failures++;
        $display("FAIL internal clock tap %0d count %0d want %f", k, cnt, want);
      end else n_measure++;
    end
    ci(2, CPFX_STOP, 0, 0, r);
    repeat (3) @(negedge clk);
    checks++;
    if (int_clk !== 1'b0) begin failures++; $display("FAIL internal clock not stopped"); end
    else n_clk_stop++;

    $display("mechanisms: concurrent=%0d lockout=%0d expiry=%0d truncated=%0d dcdiff=%0d zrl=%0d eob=%0d clk_run=%0d clk_stop=%0d measure=%0d",
             n_concurrent, n_lockout, n_expiry, n_truncated, n_dcdiff, n_zrl, n_eob,
             n_clk_run, n_clk_stop, n_measure);
    checks++; if (n_concurrent == 0) begin failures++; $display("FAIL no concurrent encode"); end
    checks++; if (n_lockout == 0)    begin failures++; $display("FAIL no lock-out seen"); end
    checks++; if (n_expiry == 0)     begin failures++; $display("FAIL no counter expiry"); end
    checks++; if (n_truncated == 0)  begin failures++; $display("FAIL no truncated run"); end
    checks++; if (n_dcdiff == 0)     begin failures++; $display("FAIL no DC difference"); end
    checks++; if (n_zrl == 0)        begin failures++; $display("FAIL no ZRL"); end
    checks++; if (n_eob == 0)        begin failures++; $display("FAIL no EOB"); end
    checks++; if (n_clk_run == 0 || n_measure == 0) begin failures++; $display("FAIL no clock measurement"); end
    checks++; if (n_clk_stop == 0)   begin failures++; $display("FAIL no clock stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
