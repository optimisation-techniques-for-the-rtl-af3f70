// dct_1d_aat: 8-point one-dimensional DCT with the 13-multiplier
// Algorithm-Architecture Transform (AAT) structure.
//
// Computes X(k) = alpha(k) * sum_n x(n) cos((2n+1) k pi / 16), alpha(0) =
// 1/sqrt(2), alpha(k>0) = 1, i.e. the DCT without the 1/2 normalisation.
// Structure, as in the source's AAT figure:
//   * four input butterflies on (x0,x7) (x3,x4) (x1,x6) (x2,x5);
//   * even half: two butterflies on the sums, then a butterfly followed by
//     two C4 = cos(pi/4) multipliers for X(0) and X(4), and rot(pi/8) for
//     X(2) and X(6);
//   * odd half: rot(3pi/16) on the (x0,x7) and (x3,x4) differences and
//     rot(pi/16) on the (x1,x6) and (x2,x5) differences; two cross adders
//     give X(3) and X(5); two butterflies and two adders, each followed by a
//     C4 multiplier, give X(1) and X(7).
// That is 3 rotations x 3 + 4 C4 = 13 multipliers. Which output of a rotation
// feeds which adder, and the operand order of each butterfly, are chosen here
// so that the result equals the DCT formula above; the figure's line styles
// do not settle all signs.
//
// Combinational. Inputs are signed IN_W-bit with IN_FRAC fraction bits;
// outputs are rounded (half up) to OUT_FRAC fraction bits and saturated to
// signed OUT_W bits.
module dct_1d_aat
  import jpeg_pkg::*;
#(
  parameter int IN_W     = 8,
  parameter int IN_FRAC  = 0,
  parameter int OUT_W    = 12,
  parameter int OUT_FRAC = 1
) (
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [OUT_W-1:0] y [8]
);
  localparam int W1 = IN_W + 1;            // after the input butterflies
  localparam int W2 = IN_W + 2;            // after the second butterflies
  localparam int RW1 = W1 + COEF_W + 2;    // rotation output, odd half
  localparam int RW2 = W2 + COEF_W + 2;    // rotation output, even half
  localparam int PW = RW1 + 1 + COEF_W + 1; // C4 products of the odd half
  localparam int F12 = IN_FRAC + COEF_FRAC;
  localparam int F24 = IN_FRAC + 2 * COEF_FRAC;

  // ---- input butterflies
  logic signed [W1-1:0] s07, d07, s34, d34, s16, d16, s25, d25;
  dct_butterfly #(.W(IN_W)) u_bf07 (.x0(x[0]), .x1(x[7]), .sum(s07), .diff(d07));
  dct_butterfly #(.W(IN_W)) u_bf34 (.x0(x[3]), .x1(x[4]), .sum(s34), .diff(d34));
  dct_butterfly #(.W(IN_W)) u_bf16 (.x0(x[1]), .x1(x[6]), .sum(s16), .diff(d16));
  dct_butterfly #(.W(IN_W)) u_bf25 (.x0(x[2]), .x1(x[5]), .sum(s25), .diff(d25));

  // ---- even half
  logic signed [W2-1:0] a0, a1, b0, b1n;
  dct_butterfly #(.W(W1)) u_bf_a (.x0(s07), .x1(s34), .sum(a0), .diff(a1));
  dct_butterfly #(.W(W1)) u_bf_b (.x0(s25), .x1(s16), .sum(b0), .diff(b1n));

  logic signed [W2:0] e_sum, e_diff;
  dct_butterfly #(.W(W2)) u_bf_e (.x0(a0), .x1(b0), .sum(e_sum), .diff(e_diff));

  logic signed [RW2-1:0] x2_f, x6_f;
  dct_rot #(.W(W2), .COEF(ROT_PI_8)) u_rot_pi8 (
    .x(a1), .y(b1n), .y_bx_ay(x2_f), .y_ax_by(x6_f));

  logic signed [W2+COEF_W:0] x0_f, x4_f;
  always_comb begin
    x0_f = (W2+COEF_W+1)'(e_sum)  * (W2+COEF_W+1)'(C4);
    x4_f = (W2+COEF_W+1)'(e_diff) * (W2+COEF_W+1)'(C4);
  end

  // ---- odd half
  logic signed [RW1-1:0] r3_top, r3_bot, r1_top, r1_bot;
  dct_rot #(.W(W1), .COEF(ROT_3PI_16)) u_rot_3pi16 (
    .x(d07), .y(d34), .y_bx_ay(r3_top), .y_ax_by(r3_bot));
  dct_rot #(.W(W1), .COEF(ROT_PI_16)) u_rot_pi16 (
    .x(d16), .y(d25), .y_bx_ay(r1_top), .y_ax_by(r1_bot));

  logic signed [RW1:0] x3_f, x5_f;
  logic signed [RW1:0] up_sum, up_diff, lo_sum, lo_diff;
  dct_butterfly #(.W(RW1)) u_bf_up (.x0(r3_top), .x1(r3_bot), .sum(up_sum), .diff(up_diff));
  dct_butterfly #(.W(RW1)) u_bf_lo (.x0(r1_top), .x1(r1_bot), .sum(lo_sum), .diff(lo_diff));

  logic signed [RW1+1:0] x1_pre, x7_pre;
  logic signed [PW-1:0]  x1_f, x7_f;
  always_comb begin
    x3_f   = (RW1+1)'(r3_top) - (RW1+1)'(r1_bot);
    x5_f   = (RW1+1)'(r3_bot) - (RW1+1)'(r1_top);
    x1_pre = (RW1+2)'(up_sum)  + (RW1+2)'(lo_sum);
    x7_pre = (RW1+2)'(up_diff) - (RW1+2)'(lo_diff);
    x1_f   = PW'(x1_pre) * PW'(C4);
    x7_f   = PW'(x7_pre) * PW'(C4);
  end

  // ---- rounding and saturation
  function automatic logic signed [OUT_W-1:0] round_sat(input logic signed [63:0] v,
                                                         input int frac);
    logic signed [63:0] r;
    int sh;
    sh = frac - OUT_FRAC;
    r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 64'sd2 ** (OUT_W - 1) - 1)    return {1'b0, {(OUT_W-1){1'b1}}};
    else if (r < -(64'sd2 ** (OUT_W - 1))) return {1'b1, {(OUT_W-1){1'b0}}};
    else                                   return r[OUT_W-1:0];
  endfunction

  always_comb begin
    y[0] = round_sat(64'(x0_f), F12);
    y[4] = round_sat(64'(x4_f), F12);
    y[2] = round_sat(64'(x2_f), F12);
    y[6] = round_sat(64'(x6_f), F12);
    y[3] = round_sat(64'(x3_f), F12);
    y[5] = round_sat(64'(x5_f), F12);
    y[1] = round_sat(64'(x1_f), F24);
    y[7] = round_sat(64'(x7_f), F24);
  end
endmodule
