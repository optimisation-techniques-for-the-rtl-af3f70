// tb_enc_custom_block: drives the run-length/Huffman custom instruction as
// the CPU would: loads blocks of coefficients in scan order, starts, polls
// STATUS, reads the bit-stream words and compares the bit string with the
// baseline JPEG coding of the block computed in the testbench (padded with
// 1s to a word). Checks the bit count, the busy lock-out of READ, and that
// the encoding time stays within two to three cycles per coefficient.
module tb_enc_custom_block;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, reset, clk_en;
  ci_req_t req;
  logic [31:0] result;
  int checks = 0, failures = 0, cycles = 0;

  always #15 clk = ~clk;
  always @(posedge clk) cycles++;

  enc_custom_block dut (.clk(clk), .reset(reset), .clk_en(clk_en), .req(req), .result(result));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ci(input enc_prefix_e p, input logic [31:0] a, input logic [31:0] b,
                    output logic [31:0] r);
    @(negedge clk);
    req.start = 1'b1; req.prefix = p; req.dataa = a; req.datab = b;
    @(negedge clk);
    req.start = 1'b0;
    @(negedge clk);
    r = result;
  endtask

  task automatic run_block(input int c [64]);
    bit want [$], got [$];
    logic [31:0] r;
    int t0, took, nbits, nwords;
    encode_block(c, want);
    for (int p = 0; p < 32; p++) ci(EPFX_LOAD, 32'(p), {16'(c[2*p+1]), 16'(c[2*p])}, r);
    ci(EPFX_START, 0, 0, r);
    t0 = cycles;
    ci(EPFX_READ, 0, 0, r);
    checks++;
    if (r != 0) begin failures++; $display("FAIL READ while busy"); end
    do ci(EPFX_STATUS, 0, 0, r); while (r[31]);
    took = cycles - t0;
    nbits = int'(r[15:0]);
    $display("block encoded: %0d bits in %0d cycles (incl. polling)", nbits, took);
    checks++;
    if (nbits != want.size()) begin failures++; $display("FAIL %0d bits, want %0d", nbits, want.size()); end
    checks++;
    if (took > 3 * 64 + 30) begin failures++; $display("FAIL took %0d cycles", took); end
    nwords = (nbits + 31) / 32;
    for (int w = 0; w < nwords; w++) begin
      ci(EPFX_READ, 32'(w), 0, r);
      for (int i = 31; i >= 0; i--) got.push_back(r[i]);
    end
    while (want.size() % 32 != 0) want.push_back(1'b1);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL bit stream differs (%0d bits)", want.size());
    end
  endtask

  initial begin
    int c [64];
    reset = 1'b1; clk_en = 1'b1; req = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    foreach (c[k]) c[k] = 0;
    run_block(c);
    c[0] = -300; c[1] = 12; c[2] = -3; c[5] = 1; c[30] = 2; c[63] = -1;
    run_block(c);
    for (int b = 0; b < 12; b++) begin
      foreach (c[k]) c[k] = (k < 10 || $urandom_range(6) == 0) ? int'($urandom_range(40)) - 20 : 0;
      if (b % 4 == 0) for (int k = 12; k < 50; k++) c[k] = 0;
      c[0] = int'($urandom_range(2000)) - 1000;
      run_block(c);
    end
    // densest case: every coefficient nonzero and large
    foreach (c[k]) c[k] = (k % 2 == 0) ? 1023 : -1023;
    run_block(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
