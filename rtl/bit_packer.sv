// bit_packer: packs variable-length code words into 32-bit words, first bit
// in the most significant position.
//
// Code words (right-aligned bits, length nbits <= 32) arrive on a valid/ready
// handshake and are appended to a 64-bit left-aligned accumulator. Each cycle
// the packer either writes out (word and word_valid registered, one
// cycle later) a full 32-bit word (when 32 or more bits are
// held) or takes one code word (when fewer than 32 are held). flush, once the
// input has drained, writes out the remaining bits padded with 1s, as JPEG
// pads the end of a scan, and pulses flush_done. bit_count counts all bits
// taken since clear. The source only shows an "encoded output"; word size,
// padding and timing are this design's choices (byte stuffing of 0xFF is not
// done here).
module bit_packer (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        cw_valid,
  output logic        cw_ready,
  input  logic [31:0] cw_bits,
  input  logic [5:0]  cw_nbits,
  input  logic        flush,
  output logic        flush_done,
  output logic        word_valid,
  output logic [31:0] word,
  output logic [15:0] bit_count
);
  logic [63:0] acc;
  logic [6:0]  acc_n;
  logic        flushing;
  logic [63:0] cw_aligned;
  logic [31:0] pad_word;

  always_comb begin
    cw_ready   = (acc_n < 7'd32) && !flushing;
    cw_aligned = (64'(cw_bits) << (7'd64 - 7'(cw_nbits))) >> acc_n;
    pad_word   = acc[63:32] | (acc_n < 7'd32 ? (32'hFFFF_FFFF >> acc_n) : 32'd0);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc        <= '0;
      acc_n      <= '0;
      flushing   <= 1'b0;
      flush_done <= 1'b0;
      word_valid <= 1'b0;
      bit_count  <= '0;
      word       <= '0;
    end else begin
      flush_done <= 1'b0;
      word_valid <= 1'b0;
      if (flush) flushing <= 1'b1;
      if (acc_n >= 7'd32) begin
        word_valid <= 1'b1;
        word       <= acc[63:32];
        acc        <= acc << 32;
        acc_n      <= acc_n - 7'd32;
      end else if (cw_valid && cw_ready) begin
        acc       <= acc | cw_aligned;
        acc_n     <= acc_n + 7'(cw_nbits);
        bit_count <= bit_count + 16'(cw_nbits);
      end else if (flushing || flush) begin
        word_valid <= (acc_n != 7'd0);
        word       <= pad_word;
        acc        <= '0;
        acc_n      <= '0;
        flushing   <= 1'b0;
        flush_done <= 1'b1;
      end
    end
  end
endmodule
