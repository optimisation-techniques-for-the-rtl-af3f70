// dct_rot: the rot(theta) processing element, a plane rotation built from
// three multipliers and three adders.
//
// With a = sin(theta) and b = cos(theta) it computes
//   y_bx_ay = b*x - a*y   (x cos - y sin)
//   y_ax_by = a*x + b*y   (x sin + y cos)
// by sharing one product: m = b*(x+y); y_ax_by = m + (a-b)*x and
// y_bx_ay = m - (a+b)*y. That arrangement (a shared sum, two side products,
// two output adders whose outputs cross over) follows the source's figure of
// the insides of rot(theta). The three constants arrive as a rot_coef_t in
// Q.12 fixed point, so both outputs carry 12 more fraction bits than the
// inputs. Combinational; the widths are this design's choice and are wide
// enough that nothing overflows.
module dct_rot
  import jpeg_pkg::*;
#(
  parameter int        W    = 16,
  parameter rot_coef_t COEF = ROT_PI_16
) (
  input  logic signed [W-1:0]        x,
  input  logic signed [W-1:0]        y,
  output logic signed [W+COEF_W+1:0] y_bx_ay,
  output logic signed [W+COEF_W+1:0] y_ax_by
);
  localparam int PW = W + COEF_W + 2;
  logic signed [W:0]    xy_sum;
  logic signed [PW-1:0] m_common, m_x, m_y;

  always_comb begin
    xy_sum   = (W+1)'(x) + (W+1)'(y);
    m_common = PW'(xy_sum) * PW'(COEF.b);
    m_x      = PW'(x) * PW'(COEF.a_minus_b);
    m_y      = PW'(y) * PW'(COEF.a_plus_b);
    y_ax_by  = m_common + m_x;
    y_bx_ay  = m_common - m_y;
  end
endmodule
