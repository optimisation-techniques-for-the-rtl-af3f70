// enc_custom_block: Nios custom instruction that run-length and Huffman codes
// one block of 64 quantized coefficients into a packed bit stream.
//
// The CPU loads the 64 coefficients (zig-zag order, position 0 the DC
// difference, as produced by dct_custom_block) into the coefficient register
// file, issues a start and polls STATUS until busy clears (the length of the
// output varies, so no fixed cycle count is used here). The chain
// rle_encoder -> huffman_encoder -> bit_packer then runs from the coefficient
// file into the 64 x 32-bit bit-stream file, which the CPU reads word by word;
// STATUS also returns the number of valid bits.
//
// Interface: Nios custom-instruction request on clk; result valid two clk
// cycles after start (the start cycle and one more), for every prefix.
// Prefix codes (jpeg_pkg::enc_prefix_e):
//   LOAD   dataa[4:0] = pair p, datab = {c(2p+1), c(2p)}, 16-bit each.
//   START  encode the loaded block.
//   READ   dataa[5:0] = word index -> bit-stream word (first bit is bit 31).
//   STATUS result = {busy, 15'b0, bit count}.
// LOAD and READ are ignored (READ returns 0) while busy. The source builds
// these two stages as custom blocks for comparison with software; the
// interface and the packing are this design's choices. The whole block runs
// on the CPU clock.
module enc_custom_block
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        clk_en,
  input  ci_req_t     req,
  output logic [31:0] result
);
  logic        issue, issue_q;
  enc_prefix_e pfx, pfx_q;
  logic        busy;
  logic        start_enc;

  always_comb begin
    issue = req.start && clk_en;
    pfx   = enc_prefix_e'(req.prefix);
    start_enc = issue && pfx == EPFX_START && !busy;
  end

  // coefficient register file
  logic [5:0]  rle_addr;
  logic [31:0] coef_pair;
  ram_2c #(.ADDR_W(5), .LANE_W(16), .LANES(2)) u_coeffile (
    .wclk(clk), .we({2{issue && pfx == EPFX_LOAD && !busy}}),
    .waddr(req.dataa[4:0]), .wdata(req.datab),
    .rclk(clk), .raddr(rle_addr[5:1]), .rdata(coef_pair));

  logic rle_busy, rle_done;
  logic sym_valid, sym_ready;
  rle_sym_t sym;
  rle_encoder u_rle (
    .clk(clk), .rst(reset), .start(start_enc), .busy(rle_busy), .done(rle_done),
    .rd_addr(rle_addr),
    .rd_data(rle_addr[0] ? $signed(coef_pair[31:16]) : $signed(coef_pair[15:0])),
    .sym_valid(sym_valid), .sym_ready(sym_ready), .sym(sym));

  logic cw_valid, cw_ready;
  logic [31:0] cw_bits;
  logic [5:0]  cw_nbits;
  huffman_encoder u_huff (
    .clk(clk), .rst(reset),
    .sym_valid(sym_valid), .sym_ready(sym_ready), .sym(sym),
    .cw_valid(cw_valid), .cw_ready(cw_ready), .cw_bits(cw_bits), .cw_nbits(cw_nbits));

  // flush once the run-length coder is done and the Huffman stage is empty
  logic flush_armed, flush, flush_done;
  always_ff @(posedge clk) begin
    if (reset) flush_armed <= 1'b0;
    else if (rle_done) flush_armed <= 1'b1;
    else if (flush) flush_armed <= 1'b0;
  end
  assign flush = flush_armed && !cw_valid;

  logic        word_valid;
  logic [31:0] word;
  logic [15:0] bit_count;
  logic        packing;
  bit_packer u_pack (
    .clk(clk), .rst(reset), .clear(start_enc),
    .cw_valid(cw_valid), .cw_ready(cw_ready), .cw_bits(cw_bits), .cw_nbits(cw_nbits),
    .flush(flush), .flush_done(flush_done),
    .word_valid(word_valid), .word(word), .bit_count(bit_count));

  // bit-stream file
  logic [5:0]  wr_ptr;
  logic [31:0] bs_rdata;
  ram_2c #(.ADDR_W(6), .LANE_W(32), .LANES(1)) u_bsfile (
    .wclk(clk), .we(word_valid), .waddr(wr_ptr), .wdata(word),
    .rclk(clk), .raddr(req.dataa[5:0]), .rdata(bs_rdata));

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr  <= '0;
      packing <= 1'b0;
    end else begin
      if (start_enc) begin
        wr_ptr  <= '0;
        packing <= 1'b1;
      end else begin
        if (word_valid) wr_ptr <= wr_ptr + 6'd1;
        // the last word is written the cycle after flush_done
        if (flush_done) packing <= 1'b0;
      end
    end
  end
  logic tail;
  always_ff @(posedge clk) tail <= flush_done && !reset;
  assign busy = packing || rle_busy || tail;

  always_ff @(posedge clk) begin
    if (reset) begin
      issue_q <= 1'b0;
      pfx_q   <= EPFX_NOP;
      result  <= '0;
    end else begin
      issue_q <= issue;
      if (issue) pfx_q <= pfx;
      if (issue_q) begin
        unique case (pfx_q)
          EPFX_READ:   result <= busy ? 32'd0 : bs_rdata;
          EPFX_STATUS: result <= {busy, 15'd0, bit_count};
          default:     result <= '0;
        endcase
      end
    end
  end
endmodule
