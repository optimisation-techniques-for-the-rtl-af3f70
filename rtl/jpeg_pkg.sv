// jpeg_pkg: types and constants shared by the JPEG encoder custom blocks.
//
// Holds the fixed-point DCT constants of the 13-multiplier AAT structure, the
// zig-zag scan order (computed, not tabulated), the default luminance
// quantization table, the baseline luminance Huffman tables in their
// BITS/HUFFVAL form with a function that derives the canonical code words, the
// Nios custom instruction request bundle and the prefix codes of each custom
// block. The DCT constants are round(4096 * f(theta)); the quantization and
// Huffman tables are the JPEG standard's example luminance tables. The prefix
// code values are this design's choice: the source only says that prefix codes
// select load, read, parameter initialisation and start.
package jpeg_pkg;

  // ---------------------------------------------------------------- DCT
  localparam int COEF_FRAC = 12;               // constants are Q.12
  localparam int COEF_W    = 14;               // signed constant width
  // rot(theta) needs (sin-cos), cos, (sin+cos), each times 2^12
  typedef struct packed {
    logic signed [COEF_W-1:0] a_minus_b;
    logic signed [COEF_W-1:0] b;
    logic signed [COEF_W-1:0] a_plus_b;
  } rot_coef_t;
  localparam rot_coef_t ROT_PI_16  = '{a_minus_b: -14'sd3218, b: 14'sd4017, a_plus_b: 14'sd4816};
  localparam rot_coef_t ROT_3PI_16 = '{a_minus_b: -14'sd1130, b: 14'sd3406, a_plus_b: 14'sd5681};
  localparam rot_coef_t ROT_PI_8   = '{a_minus_b: -14'sd2217, b: 14'sd3784, a_plus_b: 14'sd5352};
  localparam logic signed [COEF_W-1:0] C4 = 14'sd2896;  // cos(pi/4)

  localparam int PIX_W  = 8;    // level-shifted sample, signed
  localparam int ROW_W  = 12;   // row-pass result kept in the transpose memory
  localparam int ROW_FRAC = 1;  // fraction bits of a row-pass result
  localparam int COEF_OUT_W = 16; // 2D DCT coefficient, signed integer
  localparam int QSCALE_W = 17; // quantizer scale round(2^16/Q)
  localparam int QOUT_W = 16;   // quantized coefficient in the output file

  // ---------------------------------------------------------------- zig-zag
  // Raster index (8*row+col) -> position in the zig-zag scan.
  function automatic logic [5:0] zigzag_pos(input logic [5:0] raster);
    int r, c, pos;
    zigzag_pos = '0;
    pos = 0;
    for (int s = 0; s < 15; s++) begin
      for (int i = 0; i < 8; i++) begin
        // along anti-diagonal s; odd diagonals run downwards, even upwards
        r = (s % 2 == 1) ? i : s - i;
        c = s - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          if (raster == 6'(8 * r + c)) zigzag_pos = 6'(pos);
          pos++;
        end
      end
    end
  endfunction

  function automatic logic [63:0][5:0] build_zigzag_table();
    for (int k = 0; k < 64; k++) build_zigzag_table[k] = zigzag_pos(6'(k));
  endfunction
  localparam logic [63:0][5:0] ZIGZAG_POS = build_zigzag_table();

  // Default luminance quantization table, raster order.
  localparam logic [0:63][7:0] QTAB_LUM = {
    8'd16, 8'd11, 8'd10, 8'd16, 8'd24, 8'd40, 8'd51, 8'd61,
    8'd12, 8'd12, 8'd14, 8'd19, 8'd26, 8'd58, 8'd60, 8'd55,
    8'd14, 8'd13, 8'd16, 8'd24, 8'd40, 8'd57, 8'd69, 8'd56,
    8'd14, 8'd17, 8'd22, 8'd29, 8'd51, 8'd87, 8'd80, 8'd62,
    8'd18, 8'd22, 8'd37, 8'd56, 8'd68, 8'd109, 8'd103, 8'd77,
    8'd24, 8'd35, 8'd55, 8'd64, 8'd81, 8'd104, 8'd113, 8'd92,
    8'd49, 8'd64, 8'd78, 8'd87, 8'd103, 8'd121, 8'd120, 8'd101,
    8'd72, 8'd92, 8'd95, 8'd98, 8'd112, 8'd100, 8'd103, 8'd99};

  function automatic logic [QSCALE_W-1:0] qscale_of(input int q);
    return QSCALE_W'((65536 + q / 2) / q);
  endfunction

  // ---------------------------------------------------------------- Huffman
  // Code word table entry: length 0 means "no code".
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;   // right-aligned
  } huff_code_t;

  localparam logic [1:16][7:0] DC_BITS = {8'd0, 8'd1, 8'd5, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1,
                                          8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam logic [0:11][7:0] DC_VAL = {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7,
                                         8'd8, 8'd9, 8'd10, 8'd11};
  localparam logic [1:16][7:0] AC_BITS = {8'd0, 8'd2, 8'd1, 8'd3, 8'd3, 8'd2, 8'd4, 8'd3,
                                          8'd5, 8'd5, 8'd4, 8'd4, 8'd0, 8'd0, 8'd1, 8'h7d};
  localparam logic [0:161][7:0] AC_VAL = {
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12,
    8'h21, 8'h31, 8'h41, 8'h06, 8'h13, 8'h51, 8'h61, 8'h07,
    8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08,
    8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0,
    8'h24, 8'h33, 8'h62, 8'h72, 8'h82, 8'h09, 8'h0a, 8'h16,
    8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28,
    8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39,
    8'h3a, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48, 8'h49,
    8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59,
    8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69,
    8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79,
    8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89,
    8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98,
    8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7,
    8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6,
    8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5,
    8'hc6, 8'hc7, 8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4,
    8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2,
    8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea,
    8'hf1, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8,
    8'hf9, 8'hfa};

  // Canonical code generation (JPEG Annex C): codes of one length are
  // consecutive; moving to the next length appends a zero bit.
  function automatic logic [255:0][20:0] build_ac_table();
    logic [15:0] code;
    int k;
    build_ac_table = '0;
    code = '0;
    k = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int j = 0; j < int'(AC_BITS[l]); j++) begin
        build_ac_table[AC_VAL[k]] = {5'(l), code};
        code = code + 16'd1;
        k++;
      end
      code = code << 1;
    end
  endfunction

  function automatic logic [15:0][20:0] build_dc_table();
    logic [15:0] code;
    int k;
    build_dc_table = '0;
    code = '0;
    k = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int j = 0; j < int'(DC_BITS[l]); j++) begin
        build_dc_table[DC_VAL[k][3:0]] = {5'(l), code};
        code = code + 16'd1;
        k++;
      end
      code = code << 1;
    end
  endfunction

  localparam logic [255:0][20:0] AC_TABLE = build_ac_table();
  localparam logic [15:0][20:0]  DC_TABLE = build_dc_table();

  // Run-length symbol: run of zeros (AC only), size category, amplitude bits.
  typedef struct packed {
    logic        is_dc;
    logic [3:0]  run;
    logic [3:0]  size;
    logic [11:0] amp;    // low `size` bits are the JPEG amplitude bits
  } rle_sym_t;

  // ---------------------------------------------------------------- Nios
  // One custom instruction request, as driven by the Nios ALU (Fig. 3).
  typedef struct packed {
    logic        start;
    logic [10:0] prefix;
    logic [31:0] dataa;
    logic [31:0] datab;
  } ci_req_t;

  // DCT / quantization / zig-zag custom block
  typedef enum logic [10:0] {
    DPFX_NOP     = 11'd0,
    DPFX_LOAD    = 11'd1,  // dataa[3:0] word index, datab = 4 samples
    DPFX_START   = 11'd2,  // reset and start the counter
    DPFX_READ    = 11'd3,  // dataa[4:0] pair index -> two coefficients
    DPFX_SET_Q   = 11'd4,  // dataa[5:0] raster index, datab = scale
    DPFX_SET_MOD = 11'd5,  // datab = counter mod value
    DPFX_CLR_DC  = 11'd6,  // clear the DC predictor
    DPFX_STATUS  = 11'd7   // result = {busy, count}
  } dct_prefix_e;

  // Run-length / Huffman custom block
  typedef enum logic [10:0] {
    EPFX_NOP    = 11'd0,
    EPFX_LOAD   = 11'd1,   // dataa[4:0] pair index, datab = two coefficients
    EPFX_START  = 11'd2,
    EPFX_READ   = 11'd3,   // dataa[5:0] word index -> bit-stream word
    EPFX_STATUS = 11'd4    // result = {busy, bit count}
  } enc_prefix_e;

  // Clock generation / measurement custom block
  typedef enum logic [10:0] {
    CPFX_STOP    = 11'd0,  // internal clock held at 0
    CPFX_RUN     = 11'd1,  // latch selects (dataa) and data inputs (datab)
    CPFX_MEASURE = 11'd2,  // clear the cycle counter and arm one window
    CPFX_READ    = 11'd3,  // result = count value
    CPFX_STATUS  = 11'd4   // result = {measurement done, running}
  } clk_prefix_e;

endpackage
