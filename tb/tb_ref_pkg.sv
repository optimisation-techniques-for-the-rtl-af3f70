// tb_ref_pkg: reference models shared by the testbenches, written
// independently of the RTL: the DCT straight from its defining formula in
// real arithmetic, quantization by real division, the zig-zag order as the
// standard's listing, and the baseline JPEG run-length/Huffman coding of a
// block into a bit string.
package tb_ref_pkg;
  import jpeg_pkg::*;

  localparam real PI = 3.14159265358979;

  // scan position -> raster index
  localparam int ZZ_ORDER [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // F(u,v) = a(u) a(v) sum_x sum_y s(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
  function automatic real dct2(input int s [64], input int u, input int v);
    real acc, au, av;
    acc = 0.0;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        acc += $itor(s[8*x+y]) * $cos((2.0*x+1.0)*u*PI/16.0) * $cos((2.0*y+1.0)*v*PI/16.0);
    au = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    av = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return au * av * acc;
  endfunction

  function automatic int size_cat(input int v);
    int m, s;
    m = v < 0 ? -v : v;
    s = 0;
    while (m > 0) begin s++; m = m >> 1; end
    return s;
  endfunction

  // append `n` bits of `val` (msb first) to a bit queue
  function automatic void put_bits(ref bit q[$], input longint val, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(val[i]);
  endfunction

  function automatic void put_value(ref bit q[$], input int v);
    int s;
    s = size_cat(v);
    put_bits(q, v < 0 ? v - 1 : v, s);
  endfunction

  // baseline coding of one block given in scan order, c[0] = DC difference
  function automatic void encode_block(input int c [64], ref bit q[$]);
    huff_code_t h;
    int run;
    h = huff_code_t'(DC_TABLE[size_cat(c[0])]);
    put_bits(q, h.code, h.len);
    put_value(q, c[0]);
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (c[k] == 0) begin
        run++;
      end else begin
        while (run > 15) begin
          h = huff_code_t'(AC_TABLE[8'hF0]);
          put_bits(q, h.code, h.len);
          run -= 16;
        end
        h = huff_code_t'(AC_TABLE[8'(run * 16 + size_cat(c[k]))]);
        put_bits(q, h.code, h.len);
        put_value(q, c[k]);
        run = 0;
      end
    end
    if (run > 0) begin
      h = huff_code_t'(AC_TABLE[8'h00]);
      put_bits(q, h.code, h.len);
    end
  endfunction
endpackage
