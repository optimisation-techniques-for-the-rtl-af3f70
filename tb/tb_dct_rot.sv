// tb_dct_rot: checks rot(theta) for the three angles of the DCT against
// x cos - y sin and x sin + y cos computed in real arithmetic. Outputs carry
// 12 fraction bits; the constants are rounded to 12 bits, so an error of a
// few output LSBs per unit of input is allowed.
module tb_dct_rot;
  import jpeg_pkg::*;
  localparam int W = 12;
  localparam real PI = 3.14159265358979;
  logic signed [W-1:0] x, y;
  logic signed [W+COEF_W+1:0] o1[3], o2[3];
  int checks = 0, failures = 0;
  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  dct_rot #(.W(W), .COEF(ROT_PI_16))  u0 (.x(x), .y(y), .y_bx_ay(o1[0]), .y_ax_by(o2[0]));
  dct_rot #(.W(W), .COEF(ROT_3PI_16)) u1 (.x(x), .y(y), .y_bx_ay(o1[1]), .y_ax_by(o2[1]));
  dct_rot #(.W(W), .COEF(ROT_PI_8))   u2 (.x(x), .y(y), .y_bx_ay(o1[2]), .y_ax_by(o2[2]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b);
    real th[3], r1, r2, tol;
    th[0] = PI / 16.0; th[1] = 3.0 * PI / 16.0; th[2] = PI / 8.0;
    x = W'(a); y = W'(b);
    #1;
    tol = 0.5 * (($itor(a) < 0 ? -$itor(a) : $itor(a)) + ($itor(b) < 0 ? -$itor(b) : $itor(b))) / 4096.0 * 2.0 + 0.01;
    for (int k = 0; k < 3; k++) begin
      r1 = $itor(a) * $cos(th[k]) - $itor(b) * $sin(th[k]);
      r2 = $itor(a) * $sin(th[k]) + $itor(b) * $cos(th[k]);
      checks++;
      if (fabs($itor(o1[k]) / 4096.0 - r1) > tol || fabs($itor(o2[k]) / 4096.0 - r2) > tol) begin
        failures++;
        $display("FAIL k=%0d x=%0d y=%0d got %f %f want %f %f", k, a, b,
                 $itor(o1[k]) / 4096.0, $itor(o2[k]) / 4096.0, r1, r2);
      end
    end
  endtask

  initial begin
    check(1, 0);
    check(0, 1);
    check(-2048, 2047);
    for (int i = 0; i < 300; i++)
      check(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
