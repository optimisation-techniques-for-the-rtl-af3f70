// jpeg_soc_top: the custom hardware of the JPEG encoder system on chip.
//
// Three Nios custom instructions stand side by side, each with its own
// request port and result, because the CPU, which issues them and moves the
// data between them, is not part of this design:
//   * dct_*: 2D DCT (13-multiplier AAT), differential quantization and
//     zig-zag scan of an 8x8 block, run concurrently with the CPU under an
//     operation counter, on the doubled memory clock clk_mem;
//   * enc_*: run-length and Huffman coding of a block into a bit stream;
//   * clk_*: the internal ring-oscillator clock generator and its frequency
//     meter; the generated clock is also brought out as int_clk.
// clk is the CPU clock (33.33 MHz in the source); clk_mem must be clk doubled
// and phase-aligned by a PLL, which is outside this design. reset is
// synchronous to clk and active high; clk_en is the Nios custom instruction
// clock enable, shared by the three blocks.
module jpeg_soc_top
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        clk_mem,
  input  logic        reset,
  input  logic        clk_en,
  input  ci_req_t     dct_req,
  output logic [31:0] dct_result,
  input  ci_req_t     enc_req,
  output logic [31:0] enc_result,
  input  ci_req_t     clk_req,
  output logic [31:0] clk_result,
  output logic        int_clk
);
  dct_custom_block u_dct (
    .clk(clk), .clk_mem(clk_mem), .reset(reset), .clk_en(clk_en),
    .req(dct_req), .result(dct_result));

  enc_custom_block u_enc (
    .clk(clk), .reset(reset), .clk_en(clk_en),
    .req(enc_req), .result(enc_result));

  logic        gen_run;
  logic [18:0] gen_s, gen_a;
  logic [2:0]  gen_tap;
  clk_custom_block u_clk (
    .clk(clk), .reset(reset), .clk_en(clk_en), .req(clk_req), .result(clk_result),
    .gen_run(gen_run), .gen_s(gen_s), .gen_a(gen_a), .gen_tap(gen_tap),
    .int_clk(int_clk));

  ring_clock_gen u_ring (
    .run(gen_run), .s(gen_s), .a(gen_a), .tap(gen_tap), .clk_out(int_clk));
endmodule
