// huffman_encoder: maps run-length symbols to baseline JPEG code words.
//
// A DC symbol of size category s becomes the DC luminance code of s; an AC
// symbol (run r, size s) becomes the AC luminance code of the byte 16r + s
// (ZRL = 0xF0, EOB = 0x00). The s amplitude bits are appended after the code.
// The output is one code word, right-aligned in `bits` with its length in
// `nbits` (at most 16 + 11 = 27). Both tables are derived at elaboration
// from their BITS/HUFFVAL lists (jpeg_pkg), so they synthesize to ROMs.
//
// One register stage with a valid/ready handshake: a symbol is taken when
// the stage is empty or its word is being taken in the same cycle. The
// source only names Huffman encoding; the tables are the JPEG standard's
// example luminance tables.
module huffman_encoder
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sym_valid,
  output logic        sym_ready,
  input  rle_sym_t    sym,
  output logic        cw_valid,
  input  logic        cw_ready,
  output logic [31:0] cw_bits,
  output logic [5:0]  cw_nbits
);
  huff_code_t hc;
  logic [31:0] bits_n;
  logic [5:0]  nbits_n;
  logic [11:0] amp_mask;

  always_comb begin
    if (sym.is_dc) hc = huff_code_t'(DC_TABLE[sym.size]);
    else           hc = huff_code_t'(AC_TABLE[{sym.run, sym.size}]);
    amp_mask = 12'((13'd1 << sym.size) - 13'd1);
    bits_n   = (32'(hc.code) << sym.size) | 32'(sym.amp & amp_mask);
    nbits_n  = 6'(hc.len) + 6'(sym.size);
    sym_ready = !cw_valid || cw_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cw_valid <= 1'b0;
      cw_bits  <= '0;
      cw_nbits <= '0;
    end else if (sym_ready) begin
      cw_valid <= sym_valid;
      if (sym_valid) begin
        cw_bits  <= bits_n;
        cw_nbits <= nbits_n;
      end
    end
  end

  // every symbol the run-length coder produces has a code
  always_ff @(posedge clk)
    if (!rst && sym_valid) assert (hc.len != 5'd0)
      else $error("huffman_encoder: symbol without a code");
endmodule
