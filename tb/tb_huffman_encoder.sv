// tb_huffman_encoder: checks code words against codes listed in the JPEG
// standard's example luminance tables (typed in here, not derived), with the
// amplitude bits appended, and checks that the output register holds its
// word while the receiver stalls.
module tb_huffman_encoder;
  import jpeg_pkg::*;

  logic clk = 1'b0, rst;
  logic sym_valid, sym_ready, cw_valid, cw_ready;
  rle_sym_t sym;
  logic [31:0] cw_bits;
  logic [5:0]  cw_nbits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  huffman_encoder dut (.clk(clk), .rst(rst), .sym_valid(sym_valid), .sym_ready(sym_ready),
    .sym(sym), .cw_valid(cw_valid), .cw_ready(cw_ready), .cw_bits(cw_bits), .cw_nbits(cw_nbits));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one symbol and compare the word; code given as a string of 0/1
  task automatic check(input bit dc, input int run, input int size, input int amp,
                       input string code, input int stall);
    logic [31:0] want;
    int n;
    want = '0;
    n = code.len();
    for (int i = 0; i < n; i++) want = {want[30:0], code[i] == "1"};
    for (int i = size - 1; i >= 0; i--) want = {want[30:0], 1'(amp >> i)};
    n += size;
    @(negedge clk);
    sym_valid = 1'b1;
    sym = '{is_dc: dc, run: 4'(run), size: 4'(size), amp: 12'(amp)};
    cw_ready = 1'b0;
    @(negedge clk);
    sym_valid = 1'b0;
    repeat (stall) begin
      @(negedge clk);
      checks++;
      if (!cw_valid || cw_bits != want) begin failures++; $display("FAIL word lost in stall"); end
    end
    checks++;
    if (!cw_valid || cw_bits != want || int'(cw_nbits) != n) begin
      failures++;
      $display("FAIL dc=%0d run=%0d size=%0d: got %h/%0d want %h/%0d", dc, run, size,
               cw_bits, cw_nbits, want, n);
    end
    cw_ready = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; sym_valid = 1'b0; cw_ready = 1'b1; sym = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // DC luminance
    check(1, 0, 0, 0, "00", 0);
    check(1, 0, 1, 1, "010", 0);
    check(1, 0, 2, 1, "011", 1);
    check(1, 0, 3, 5, "100", 0);
    check(1, 0, 4, 9, "101", 0);
    check(1, 0, 5, 17, "110", 0);
    check(1, 0, 6, 33, "1110", 0);
    check(1, 0, 7, 100, "11110", 0);
    check(1, 0, 8, 200, "111110", 2);
    check(1, 0, 9, 300, "1111110", 0);
    check(1, 0, 10, 700, "11111110", 0);
    check(1, 0, 11, 1500, "111111110", 0);
    // AC luminance
    check(0, 0, 0, 0, "1010", 0);            // EOB
    check(0, 15, 0, 0, "11111111001", 0);    // ZRL
    check(0, 0, 1, 1, "00", 0);
    check(0, 0, 2, 2, "01", 3);
    check(0, 0, 3, 4, "100", 0);
    check(0, 0, 4, 8, "1011", 0);
    check(0, 0, 5, 16, "11010", 0);
    check(0, 0, 6, 40, "1111000", 0);
    check(0, 0, 7, 64, "11111000", 0);
    check(0, 0, 8, 129, "1111110110", 0);
    check(0, 1, 1, 0, "1100", 0);
    check(0, 1, 2, 3, "11011", 0);
    check(0, 1, 3, 4, "1111001", 0);
    check(0, 2, 1, 1, "11100", 0);
    check(0, 2, 2, 2, "11111001", 0);
    check(0, 3, 1, 1, "111010", 0);
    check(0, 4, 1, 0, "111011", 0);
    check(0, 5, 1, 1, "1111010", 0);
    check(0, 6, 1, 1, "1111011", 0);
    check(0, 7, 1, 1, "11111010", 0);
    check(0, 8, 1, 1, "111111000", 0);
    check(0, 0, 10, 1000, "1111111110000011", 0);
    check(0, 15, 10, 1000, "1111111111111110", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
