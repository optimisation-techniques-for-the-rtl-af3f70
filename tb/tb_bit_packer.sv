// tb_bit_packer: feeds random code words (1..27 bits) and rebuilds the bit
// stream from the 32-bit output words; it must equal the concatenated code
// words followed by 1-bit padding to a word boundary, and bit_count must be
// the number of code bits.
module tb_bit_packer;
  logic clk = 1'b0, rst, clear, cw_valid, cw_ready, flush, flush_done, word_valid;
  logic [31:0] cw_bits, word;
  logic [5:0]  cw_nbits;
  logic [15:0] bit_count;
  int checks = 0, failures = 0;
  bit sent [$], rcvd [$];

  always #5 clk = ~clk;

  bit_packer dut (.clk(clk), .rst(rst), .clear(clear), .cw_valid(cw_valid),
    .cw_ready(cw_ready), .cw_bits(cw_bits), .cw_nbits(cw_nbits), .flush(flush),
    .flush_done(flush_done), .word_valid(word_valid), .word(word), .bit_count(bit_count));

  always @(posedge clk) if (word_valid) for (int i = 31; i >= 0; i--) rcvd.push_back(word[i]);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input int nwords);
    int n;
    logic [31:0] b;
    sent.delete(); rcvd.delete();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int i = 0; i < nwords; i++) begin
      n = int'($urandom_range(26)) + 1;
      b = $urandom() & ((32'd1 << n) - 1);
      for (int j = n - 1; j >= 0; j--) sent.push_back(b[j]);
      cw_valid = 1'b1; cw_bits = b; cw_nbits = 6'(n);
      @(posedge clk);
      while (!cw_ready) @(posedge clk);
      @(negedge clk);
      cw_valid = 1'b0;
      if ($urandom_range(1)) @(negedge clk);
    end
    checks++;
    if (int'(bit_count) != sent.size()) begin failures++; $display("FAIL bit_count %0d want %0d", bit_count, sent.size()); end
    flush = 1'b1;
    @(negedge clk) flush = 1'b0;
    while (!flush_done) @(negedge clk);
    @(negedge clk);
    while (sent.size() % 32 != 0) sent.push_back(1'b1);
    checks++;
    if (rcvd.size() != sent.size()) begin
      failures++;
      $display("FAIL %0d bits out, want %0d", rcvd.size(), sent.size());
    end else begin
      foreach (sent[i]) if (sent[i] != rcvd[i]) begin
        failures++;
        $display("FAIL bit %0d", i);
        break;
      end
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; cw_valid = 1'b0; cw_bits = '0; cw_nbits = '0; flush = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_stream(1);
    run_stream(5);
    for (int t = 0; t < 20; t++) run_stream(int'($urandom_range(60)) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
