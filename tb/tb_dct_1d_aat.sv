// tb_dct_1d_aat: drives the 8-point AAT DCT with random and extreme vectors
// and compares every output with the DCT formula evaluated in real
// arithmetic: X(k) = alpha(k) sum x(n) cos((2n+1)k pi/16). The output has one
// fraction bit; an error of at most one output LSB is accepted.
module tb_dct_1d_aat;
  localparam real PI = 3.14159265358979;
  logic signed [7:0]  x [8];
  logic signed [11:0] y [8];
  int checks = 0, failures = 0;
  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  dct_1d_aat #(.IN_W(8), .IN_FRAC(0), .OUT_W(12), .OUT_FRAC(1)) dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector();
    real ref_v, acc;
    #1;
    for (int k = 0; k < 8; k++) begin
      acc = 0.0;
      for (int n = 0; n < 8; n++)
        acc += $itor(x[n]) * $cos((2.0 * n + 1.0) * k * PI / 16.0);
      ref_v = (k == 0) ? acc / $sqrt(2.0) : acc;
      checks++;
      if (fabs($itor(y[k]) / 2.0 - ref_v) > 0.5 + 1e-6) begin
        failures++;
        $display("FAIL k=%0d got %f want %f", k, $itor(y[k]) / 2.0, ref_v);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 8; n++) x[n] = 8'sd127;
    run_vector();
    for (int n = 0; n < 8; n++) x[n] = -8'sd128;
    run_vector();
    for (int n = 0; n < 8; n++) x[n] = (n % 2 == 0) ? 8'sd127 : -8'sd128;
    run_vector();
    // unit impulses expose each input's path
    for (int m = 0; m < 8; m++) begin
      for (int n = 0; n < 8; n++) x[n] = (n == m) ? 8'sd100 : 8'sd0;
      run_vector();
    end
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 8; n++) x[n] = 8'($urandom_range(255));
      run_vector();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
